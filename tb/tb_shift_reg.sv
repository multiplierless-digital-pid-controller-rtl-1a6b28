// tb_shift_reg: random parallel loads, shifts and serial input on a 16-bit
// shift register, compared each clock with a reference model kept in the
// testbench; also checks that the serial output delivers a loaded word LSB
// first and that a chained second register ends up holding that word.
module tb_shift_reg;
  localparam int W = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, load = 0, shift = 0, sin = 0;
  logic [W-1:0] d = '0, q, model;
  logic sout;
  logic [W-1:0] q2;
  logic sout2;

  shift_reg dut  (.clk, .rst_n, .load, .shift, .d, .sin, .sout, .q);
  shift_reg #(.W(W)) dut2 (.clk, .rst_n, .load(1'b0), .shift, .d('0), .sin(sout),
                           .sout(sout2), .q(q2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] word;
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Random operations against the model.
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load  = ($urandom % 4) == 0;
      shift = ($urandom % 2) == 0;
      sin   = $urandom % 2;
      d     = W'($urandom);
      if (load) model = d;
      else if (shift) model = {sin, model[W-1:1]};
      @(posedge clk); #1;
      check("q", q, model);
      check("sout", W'(sout), W'(model[0]));
    end
    // LSB-first delivery and chaining.
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      word = W'($urandom);
      load = 1; shift = 0; d = word;
      @(negedge clk);
      load = 0; shift = 1;
      for (int b = 0; b < W; b++) begin
        check("serial bit", W'(sout), W'(word[b]));
        @(negedge clk);
      end
      shift = 0;
      check("chained register", q2, word);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
