// tb_scaling_acc: feeds random table words through a full DA sequence
// (clear, B-1 add-and-halve steps, one subtract) and compares the result with
// sum_{k=1}^{B-1} F_k 2^(B-1-k) - F_0 2^(B-1), evaluated with integer
// multiplication in the testbench. Also checks that a step without en leaves
// the accumulator unchanged and that clear returns it to zero.
module tb_scaling_acc;
  localparam int DATA_W = 16;
  localparam int ROM_W  = 16;
  localparam int ACC_W  = ROM_W + DATA_W + 1;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clr = 0, en = 0, sub = 0;
  logic signed [ROM_W-1:0] f = '0;
  logic signed [ACC_W-1:0] acc;

  scaling_acc dut (.clk, .rst_n, .clr, .en, .sub, .f, .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [ROM_W-1:0] pick(input int mode);
    case (mode)
      0: return 16'sh7fff;
      1: return -16'sh8000;
      default: return ROM_W'($urandom);
    endcase
  endfunction

  initial begin
    longint expected;
    logic signed [ROM_W-1:0] fk [DATA_W];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      for (int k = 0; k < DATA_W; k++) fk[k] = pick((n < 2) ? n : 2);
      expected = 0;
      for (int k = 1; k < DATA_W; k++) expected += longint'(fk[k]) * (longint'(1) <<< (DATA_W-1-k));
      expected -= longint'(fk[0]) * (longint'(1) <<< (DATA_W-1));
      @(negedge clk); clr = 1; en = 0;
      @(negedge clk); clr = 0;
      for (int k = DATA_W-1; k >= 0; k--) begin
        en = 1; sub = (k == 0); f = fk[k];
        @(negedge clk);
        // Hold a cycle with en low now and then.
        if (($urandom % 8) == 0) begin
          logic signed [ACC_W-1:0] held;
          en = 0; held = acc; f = ROM_W'($urandom);
          @(negedge clk);
          checks++;
          if (acc !== held) begin failures++; $display("ERROR acc changed without en"); end
        end
      end
      en = 0; sub = 0;
      checks++;
      if (longint'(acc) != expected) begin
        failures++;
        $display("ERROR run %0d: acc=%0d expected %0d", n, acc, expected);
      end
    end
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    checks++;
    if (acc != 0) begin failures++; $display("ERROR clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
