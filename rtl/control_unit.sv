// control_unit: sequencer of the DA PID controller.
//
// One sample period is B+2 clocks, repeated without pause:
//   ST_LOAD   1 clock   lr:    the finished m(n) goes to the output buffer and
//                              to the m(n-1) shift register, the new A/D sample
//                              to the e(n) shift register
//   ST_CLEAR  1 clock   clacc: accumulator cleared; sc starts the next A/D
//                              conversion, which then has B+1 clocks to finish
//   ST_ACC    B-1 clocks shift + lacc, s_a = 0: add partial product, halve
//   ST_SUB    1 clock   shift + lacc, s_a = 1: subtract the sign-bit product
// The signal names (sc, lr, s_a, lacc, clacc, and shift for the bit clock) are
// the controller's; it runs everything from the one system clock with the bit
// clock as an enable, and the order and lengths of the steps above are this
// design's reading of the controller's five-step operation list.
//
// Interface: outputs are decoded from the state register and a bit counter.
// Timing: outputs are valid during the clock they name; the first ST_LOAD
// follows reset.
module control_unit
  import pid_pkg::*;
#(
  parameter int unsigned DATA_W = pid_pkg::PID_DATA_W
) (
  input  logic clk,
  input  logic rst_n,
  output logic sc,
  output logic lr,
  output logic clacc,
  output logic shift,
  output logic lacc,
  output logic s_a,
  output cu_state_t state
);

  localparam int unsigned CW = $clog2(DATA_W);

  logic [CW-1:0] count;  // add steps done in ST_ACC

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_LOAD;
      count <= '0;
    end else begin
      unique case (state)
        ST_LOAD:  state <= ST_CLEAR;
        ST_CLEAR: begin
          state <= ST_ACC;
          count <= '0;
        end
        ST_ACC: begin
          if (count == CW'(DATA_W - 2)) state <= ST_SUB;
          count <= count + 1'b1;
        end
        ST_SUB:   state <= ST_LOAD;
        default:  state <= ST_LOAD;
      endcase
    end
  end

  always_comb begin
    lr    = (state == ST_LOAD);
    clacc = (state == ST_CLEAR);
    sc    = (state == ST_CLEAR);
    shift = (state == ST_ACC) || (state == ST_SUB);
    lacc  = shift;
    s_a   = (state == ST_SUB);
  end

  // The accumulator is never cleared and loaded in the same clock.
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(clacc && lacc));

endmodule
