// tb_control_unit: follows the control unit for many sample periods and
// checks that every period is B+2 = 18 clocks, that it holds exactly one lr,
// one clacc and one sc clock, and 16 shift clocks with lacc, of which only
// the last subtracts (s_a), in the order lr, clacc/sc, shifts.
module tb_control_unit;
  import pid_pkg::*;
  localparam int B = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic sc, lr, clacc, shift, lacc, s_a;
  cu_state_t state;

  control_unit dut (.clk, .rst_n, .sc, .lr, .clacc, .shift, .lacc, .s_a, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bits(input int t, input logic [5:0] got, input logic [5:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR clock %0d of period: {sc,lr,clacc,shift,lacc,s_a}=%b expected %b", t, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (!lr) begin failures++; $display("ERROR first clock after reset is not lr"); end
    for (int p = 0; p < 200; p++) begin
      for (int t = 0; t < B + 2; t++) begin
        logic [5:0] exp;
        if (t == 0)          exp = 6'b010000;          // lr
        else if (t == 1)     exp = 6'b101000;          // sc, clacc
        else if (t == B + 1) exp = 6'b000111;          // shift, lacc, s_a
        else                 exp = 6'b000110;          // shift, lacc
        expect_bits(t, {sc, lr, clacc, shift, lacc, s_a}, exp);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
