// tb_da_pid: end-to-end test of the DA PID controller at its default size.
//
// An A/D converter model answers every sc pulse with the next error sample a
// few clocks later. At every lr clock the testbench notes the sample the
// controller takes and predicts the output of the previous one with ordinary
// multiplication:
//   m(n) = clamp(m(n-1) + floor((A0*e(n) + A1*e(n-1)) / 2^14))
// where A0 = 12291 and A1 = -12285 are a0 = 0.7502 and a1 = -0.7498 in Q2.14.
// It checks m_out after each lr clock, the 18-clock sample period, one sc per
// period, and counts the mechanisms the design has: sign-bit subtraction
// (negative operands), the e(n) -> e(n-1) serial transfer, integration with
// e = 0, and clamping at both ends. Each of them must occur.
module tb_da_pid;
  localparam int  B      = 16;
  localparam int  PERIOD = B + 2;
  localparam longint A0  = 12291;
  localparam longint A1  = -12285;

  int checks = 0, failures = 0;
  int n_neg_e = 0, n_neg_m = 0, n_e1_used = 0, n_hold = 0, n_pos_sat = 0, n_neg_sat = 0;

  logic clk = 0, rst_n = 0;
  logic signed [B-1:0] e_in = '0;
  logic sc, lr;
  logic signed [B-1:0] m_out;

  da_pid dut (.clk, .rst_n, .e_in, .sc, .lr, .m_out);

  always #5 clk = ~clk;

  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Error sample sequence: phases of random, zero, large constant and small
  // values so that the output both integrates and clamps.
  function automatic logic signed [B-1:0] sample(input int n);
    if (n < 300)       return B'($urandom);
    else if (n < 350)  return '0;
    else if (n < 1600) return B'(16'sd30000);
    else if (n < 1650) return '0;
    else if (n < 3800) return B'(-16'sd30000);
    else if (n < 4000) return B'($signed($urandom % 4001) - 2000);
    else               return B'($urandom);
  endfunction

  localparam int N_SAMPLES = 4200;

  // A/D converter model: new sample three clocks after sc (ignored in reset).
  int n_conv = 0;
  always @(posedge clk) begin
    if (sc && rst_n) begin
      repeat (3) @(negedge clk);
      e_in <= sample(n_conv);
      n_conv <= n_conv + 1;
    end
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("ERROR %s: got %0d expected %0d (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  initial begin
    longint ref_m = 0, ref_e1 = 0, pend_e = 0, expv, sum;
    bit pend_valid = 0;
    int unsigned last_lr = 0;
    int n_lr = 0, n_sc = 0;
    // Release reset right after a clock edge, so that the first negedge
    // below already sees the lr clock that follows reset.
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    while (n_lr < N_SAMPLES) begin
      @(negedge clk);
      if (sc) n_sc++;
      if (lr) begin
        if (n_lr > 0) check("sample period", longint'(cycle - last_lr), PERIOD);
        last_lr = cycle;
        n_lr++;
        if (pend_valid) begin
          sum  = A0 * pend_e + A1 * ref_e1 + (ref_m <<< 14);
          expv = sum >>> 14;
          if (expv > 32767)  begin expv = 32767;  n_pos_sat++; end
          if (expv < -32768) begin expv = -32768; n_neg_sat++; end
          if (pend_e < 0) n_neg_e++;
          if (ref_m < 0) n_neg_m++;
          if (ref_e1 != 0 && ref_e1 != pend_e) n_e1_used++;
          if (pend_e == 0 && ref_e1 == 0) n_hold++;
          ref_e1 = pend_e;
          ref_m  = expv;
        end else begin
          expv = 0;
        end
        pend_e = longint'(e_in);
        pend_valid = 1;
        @(posedge clk); #1;
        check("m_out", longint'(m_out), expv);
      end
    end
    check("one sc per period", n_sc, n_lr - 1);
    $display("mechanisms: negative e=%0d negative m(n-1)=%0d e(n-1) transfer=%0d hold=%0d clamp+=%0d clamp-=%0d",
             n_neg_e, n_neg_m, n_e1_used, n_hold, n_pos_sat, n_neg_sat);
    if (n_neg_e == 0 || n_neg_m == 0 || n_e1_used == 0 || n_hold == 0 || n_pos_sat == 0 || n_neg_sat == 0) begin
      failures++;
      $display("ERROR a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
