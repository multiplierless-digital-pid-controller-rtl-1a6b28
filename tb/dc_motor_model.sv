// dc_motor_model: behavioural model of the controlled plant, for simulation
// only. A DC motor with transfer function G(s) = 20/(s+4) from drive voltage
// to speed, sampled with a zero-order hold: on every clock with step high the
// speed advances by one sampling period T,
//   c <= c*exp(-4T) + 5*(1 - exp(-4T))*u,
// with u the drive voltage held over the period. A tachometer of ratio 0.2
// gives the feedback voltage. Speed is in the unit whose steady state is
// 5 per volt of drive.
module dc_motor_model #(
  parameter real T = 1.0e-4
) (
  input  logic clk,
  input  logic step,
  input  real  u,
  output real  c,
  output real  tach
);
  localparam real AD = $exp(-4.0 * T);

  initial c = 0.0;

  always @(posedge clk) begin
    if (step) c <= c * AD + 5.0 * (1.0 - AD) * u;
  end

  assign tach = 0.2 * c;
endmodule
