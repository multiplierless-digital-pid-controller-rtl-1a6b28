// da_rom: look-up table of the partial products of the DA PID controller.
//
// The table is addressed by one bit of each operand taken at the same bit
// position k and returns the sum of the coefficients whose bit is set. In the
// default configuration the operands are e(n), e(n-1), m(n-1), the address is
// {e_k(n), e_k(n-1), m_k(n-1)}, and the eight words are
//   0, 1, a1, a1+1, a0, a0+1, a0+a1, a0+a1+1       (addresses 0..7),
// the order of the controller's table. With USE_A2 set the derivative operand
// e(n-2) joins as a fourth address bit, {e_k(n), e_k(n-1), e_k(n-2), m_k(n-1)},
// and the table has sixteen words. The contents are computed at elaboration
// from the coefficient parameters, so the table follows any retuning.
//
// Interface: addr in, f out (ROM_W-bit two's complement, ROM_FRAC fraction
// bits). Timing: asynchronous read, purely combinational, as the bit-serial
// accumulator consumes one word per clock. The address order and the contents
// follow the controller description; the asynchronous read and the optional
// fourth operand's place in the address are this design's choices.
module da_rom
  import pid_pkg::*;
#(
  parameter int unsigned ROM_W    = pid_pkg::PID_ROM_W,
  parameter int unsigned ROM_FRAC = pid_pkg::PID_ROM_FRAC,
  parameter int          A0_Q     = pid_pkg::PID_A0_Q,
  parameter int          A1_Q     = pid_pkg::PID_A1_Q,
  parameter bit          USE_A2   = 1'b0,
  parameter int          A2_Q     = pid_pkg::PID_A2_Q,
  localparam int unsigned AW      = USE_A2 ? 4 : 3,
  localparam int unsigned WORDS   = 1 << AW
) (
  input  logic [AW-1:0]             addr,
  output logic signed [ROM_W-1:0]   f
);

  // Position of table address a in the four-operand address space.
  function automatic rom_addr_t full_addr(input logic [3:0] x);
    return USE_A2 ? x : {x[2], x[1], 1'b0, x[0]};
  endfunction

  function automatic int entry(input logic [3:0] a);
    return partial_product(full_addr(a), A0_Q, A1_Q, USE_A2 ? A2_Q : 0, ROM_FRAC);
  endfunction

  function automatic logic [WORDS*ROM_W-1:0] build_table();
    logic [WORDS*ROM_W-1:0] t;
    for (int a = 0; a < WORDS; a++) t[a*ROM_W +: ROM_W] = ROM_W'(entry(4'(a)));
    return t;
  endfunction

  localparam logic [WORDS*ROM_W-1:0] TABLE = build_table();

  // Every entry must be representable in the table format.
  initial begin
    for (int a = 0; a < WORDS; a++) begin
      assert (entry(4'(a)) < (1 <<< (ROM_W-1)) && entry(4'(a)) >= -(1 <<< (ROM_W-1)))
        else $error("da_rom: partial product %0d does not fit in %0d bits", a, ROM_W);
    end
  end

  always_comb f = signed'(TABLE[addr*ROM_W +: ROM_W]);

endmodule
