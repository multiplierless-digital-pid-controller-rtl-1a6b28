// tb_da_rom: checks the eight partial products of the DA look-up table.
// Expected words are written out by hand from a0 = 0.7502 and a1 = -0.7498 in
// Q2.14 (12291 and -12285) and one = 16384, in the address order
// {e_k(n), e_k(n-1), m_k(n-1)}. The read is combinational, so each address is
// applied and checked after a short delay. A second instance with the e(n-2)
// operand (USE_A2) is checked against sums of a0 = 8194, a1 = -10238,
// a2 = 2048 and one = 8192 (Q3.13) selected by the address bits
// {e_k(n), e_k(n-1), e_k(n-2), m_k(n-1)}.
module tb_da_rom;
  import pid_pkg::*;

  int checks = 0, failures = 0;
  logic [2:0] addr;
  logic signed [15:0] f;

  da_rom dut (.addr(addr[2:0]), .f);

  logic [3:0] addr4;
  logic signed [15:0] f4;
  da_rom #(.ROM_FRAC(13), .A0_Q(8194), .A1_Q(-10238), .USE_A2(1'b1), .A2_Q(2048))
    dut4 (.addr(addr4), .f(f4));

  // 0, 1, a1, a1+1, a0, a0+1, a0+a1, a0+a1+1
  localparam int EXPECT [8] = '{0, 16384, -12285, 4099, 12291, 28675, 6, 16390};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 3; pass++) begin
      for (int a = 0; a < 8; a++) begin
        addr = 3'((pass == 1) ? 7 - a : a);
        #5;
        checks++;
        if (int'(f) != EXPECT[addr]) begin
          failures++;
          $display("ERROR addr=%0d f=%0d expected %0d", addr, f, EXPECT[addr]);
        end
      end
    end
    for (int a = 0; a < 16; a++) begin
      int exp4;
      addr4 = 4'(a);
      exp4 = (a[3] ? 8194 : 0) + (a[2] ? -10238 : 0) + (a[1] ? 2048 : 0) + (a[0] ? 8192 : 0);
      #5;
      checks++;
      if (int'(f4) != exp4) begin
        failures++;
        $display("ERROR 16-word table addr=%0d f=%0d expected %0d", a, f4, exp4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
