// da_pid: multiplierless digital PID controller by distributed arithmetic.
//
// Computes, once per sample period, the PID law
//   m(n) = a0*e(n) + a1*e(n-1) + a2*e(n-2) + m(n-1)
// without a multiplier. By default Kd = 0, so a2 = 0 and the e(n-2) operand is
// not built; USE_A2 adds it as a third error register chained behind e(n-1). The three operands sit in LSB-first shift registers;
// at each bit position k their bits address an 8-word table of partial
// products F_k, and a scaling accumulator forms sum_{k>=1} F_k 2^-k - F_0.
// The e(n) register shifts its bits into the e(n-1) register, so after one
// sample the current error becomes the delayed one without a parallel copy.
// The result is truncated to B bits, clamped, and loaded both into the D/A
// output buffer and into the m(n-1) register.
//
// Interface: e_in is the B-bit error sample from the A/D converter (two's
// complement fraction), sampled when lr is high; sc is the start-conversion
// pulse to the A/D converter; m_out is the B-bit controller output for the
// D/A converter; lr marks the clock in which m_out is reloaded.
// Timing: one sample every B+2 clocks (18 at B = 16). A sample taken at an lr
// clock yields its m(n) at the next lr clock; m_out shows it one clock later.
// The structure (table, shift registers, scaling accumulator, buffer, control
// unit) follows the controller description; the reset input, the lr output
// and the single clock domain are choices of this design.
module da_pid
  import pid_pkg::*;
#(
  parameter int unsigned DATA_W   = pid_pkg::PID_DATA_W,
  parameter int unsigned ROM_W    = pid_pkg::PID_ROM_W,
  parameter int unsigned ROM_FRAC = pid_pkg::PID_ROM_FRAC,
  parameter int          A0_Q     = pid_pkg::PID_A0_Q,
  parameter int          A1_Q     = pid_pkg::PID_A1_Q,
  parameter bit          USE_A2   = 1'b0,
  parameter int          A2_Q     = pid_pkg::PID_A2_Q
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [DATA_W-1:0]  e_in,
  output logic                      sc,
  output logic                      lr,
  output logic signed [DATA_W-1:0]  m_out
);

  localparam int unsigned ACC_W = ROM_W + DATA_W + 1;

  logic      clacc, shift, lacc, s_a;

  logic e0_bit, e1_bit, m1_bit;

  logic signed [ROM_W-1:0]  f;
  logic signed [ACC_W-1:0]  acc;
  logic signed [DATA_W-1:0] m_word;

  control_unit #(.DATA_W(DATA_W)) u_ctrl (
    .clk, .rst_n, .sc, .lr, .clacc, .shift, .lacc, .s_a, .state()
  );

  // e(n): loaded from the A/D converter.
  shift_reg #(.W(DATA_W)) u_sr_e0 (
    .clk, .rst_n, .load(lr), .shift, .d(e_in), .sin(1'b0),
    .sout(e0_bit), .q()
  );

  // e(n-1): filled serially from the e(n) register.
  shift_reg #(.W(DATA_W)) u_sr_e1 (
    .clk, .rst_n, .load(1'b0), .shift, .d('0), .sin(e0_bit),
    .sout(e1_bit), .q()
  );

  // m(n-1): loaded with the result of the previous sample.
  shift_reg #(.W(DATA_W)) u_sr_m1 (
    .clk, .rst_n, .load(lr), .shift, .d(m_word), .sin(1'b0),
    .sout(m1_bit), .q()
  );

  // e(n-2): only with the derivative term, filled from the e(n-1) register
  // and taking its place in the table address.
  logic [(USE_A2 ? 4 : 3)-1:0] rom_addr;
  if (USE_A2) begin : g_e2
    logic e2_bit;
    shift_reg #(.W(DATA_W)) u_sr_e2 (
      .clk, .rst_n, .load(1'b0), .shift, .d('0), .sin(e1_bit),
      .sout(e2_bit), .q()
    );
    assign rom_addr = {e0_bit, e1_bit, e2_bit, m1_bit};
  end else begin : g_addr3
    assign rom_addr = {e0_bit, e1_bit, m1_bit};
  end

  da_rom #(.ROM_W(ROM_W), .ROM_FRAC(ROM_FRAC), .A0_Q(A0_Q), .A1_Q(A1_Q),
           .USE_A2(USE_A2), .A2_Q(A2_Q)) u_rom (
    .addr(rom_addr), .f
  );

  scaling_acc #(.DATA_W(DATA_W), .ROM_W(ROM_W)) u_acc (
    .clk, .rst_n, .clr(clacc), .en(lacc), .sub(s_a), .f, .acc
  );

  out_buffer #(.DATA_W(DATA_W), .ROM_W(ROM_W), .ROM_FRAC(ROM_FRAC)) u_buf (
    .clk, .rst_n, .load(lr), .acc, .word(m_word), .sat(), .q(m_out)
  );

endmodule
