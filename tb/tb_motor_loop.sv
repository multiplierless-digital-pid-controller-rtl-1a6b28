// tb_motor_loop: closed-loop speed control of a DC motor by the DA PID
// controller, the experiment the controller was designed for.
//
// Loop: set-point r = 100 mV; error e = r - 0.2*speed is digitised by an A/D
// model with a +/-125 mV range (16 bits); the controller output drives the
// motor model G(s) = 20/(s+4) through a D/A model with the same range. One
// controller sample period (18 clocks) is one sampling period T = 0.1 ms, so
// the 10000 samples simulated cover 1 s. Coefficients are the defaults,
// a0 = 0.7502 and a1 = -0.7498 (Kp = 0.75, Ki = 4.75, Kd = 0).
//
// Checks: every controller output equals the fixed-point reference
//   m(n) = clamp(m(n-1) + floor((12291*e(n) - 12285*e(n-1)) / 2^14));
// the same motor driven by the error alone (no controller) settles at about
// half the desired speed; with the controller the speed ends within 10 % of
// the desired 0.5 (= 5 * r) and at least 1.7 times the uncontrolled speed.
module tb_motor_loop;
  localparam int  B      = 16;
  localparam real VFS    = 0.125;     // converter range, volts
  localparam real R      = 0.100;     // set-point, volts
  localparam int  N      = 10000;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic signed [B-1:0] e_in = '0;
  logic sc, lr;
  logic signed [B-1:0] m_out;

  real u_pid = 0.0, u_open = 0.0;
  real c_pid, c_open, tach_pid, tach_open;
  logic step = 0;

  da_pid dut (.clk, .rst_n, .e_in, .sc, .lr, .m_out);

  dc_motor_model motor_pid  (.clk, .step, .u(u_pid),  .c(c_pid),  .tach(tach_pid));
  dc_motor_model motor_open (.clk, .step, .u(u_open), .c(c_open), .tach(tach_open));

  always #5 clk = ~clk;

  initial begin
    repeat (N * 18 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [B-1:0] adc(input real v);
    real x;
    x = $floor(v / VFS * 32768.0);
    if (x > 32767.0)  x = 32767.0;
    if (x < -32768.0) x = -32768.0;
    return B'($rtoi(x));
  endfunction

  initial begin
    longint ref_m = 0, ref_e1 = 0, pend_e = 0, expv, sum;
    bit pend_valid = 0;
    int mismatches = 0, n = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    while (n < N) begin
      @(negedge clk);
      if (lr) begin
        // Controller output of the previous sample.
        if (pend_valid) begin
          sum  = 64'sd12291 * pend_e - 64'sd12285 * ref_e1 + (ref_m <<< 14);
          expv = sum >>> 14;
          if (expv > 32767)  expv = 32767;
          if (expv < -32768) expv = -32768;
          ref_e1 = pend_e;
          ref_m  = expv;
        end else expv = 0;
        // The sample taken now.
        e_in   = adc(R - tach_pid);
        pend_e = longint'(e_in);
        pend_valid = 1;
        @(posedge clk); #1;
        checks++;
        if (longint'(m_out) != expv) begin
          failures++;
          if (mismatches++ < 10) $display("ERROR sample %0d: m_out=%0d expected %0d", n, m_out, expv);
        end
        // Advance both motors by one sampling period.
        u_pid  = real'(m_out) / 32768.0 * VFS;
        u_open = real'(adc(R - tach_open)) / 32768.0 * VFS;
        step = 1;
        @(posedge clk); #1 step = 0;
        n++;
        if (n % 1000 == 0)
          $display("t=%0.1f s  speed with controller %0.4f  without %0.4f", n * 1.0e-4, c_pid, c_open);
      end
    end
    $display("final speed: with controller %0.4f, without %0.4f, desired %0.4f", c_pid, c_open, 5.0 * R);
    checks++;
    if (c_open < 0.45 * 5.0 * R || c_open > 0.55 * 5.0 * R) begin
      failures++; $display("ERROR uncontrolled speed is not about half the desired speed");
    end
    checks++;
    if (c_pid < 0.9 * 5.0 * R || c_pid > 1.05 * 5.0 * R) begin
      failures++; $display("ERROR controlled speed not within 10 %% of the desired speed");
    end
    checks++;
    if (c_pid < 1.7 * c_open) begin
      failures++; $display("ERROR controller does not raise the speed enough");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
