// shift_reg: parallel-in serial-out shift register, LSB first.
//
// The DA controller holds each operand (e(n), e(n-1), m(n-1)) in one of these
// and presents one bit per clock to the look-up table, least significant bit
// first, so that the sign bit arrives last. The serial input lets two of them
// form a delay line: feeding the bits of the e(n) register into the e(n-1)
// register leaves e(n) in it after W shifts, ready to be e(n-1) of the next
// sample, as the chained SR1/SR2 pair of the generic DA structure does.
//
// Interface: load (parallel load of d, has priority), shift (shift right by
// one, sin enters at the MSB), sout = current LSB, q = whole register.
// Timing: both operations take effect at the rising clock edge; reset clears.
module shift_reg #(
  parameter int unsigned W = pid_pkg::PID_DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] d,
  input  logic         sin,
  output logic         sout,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (load)   q <= d;
    else if (shift)  q <= {sin, q[W-1:1]};
  end

  assign sout = q[0];

endmodule
