// tb_out_buffer: applies random and edge-case accumulator values and checks
// the converted word (floor(acc / 2^14), clamped to [-32768, 32767]), the
// clamp flag, and that the buffer only changes when load is high.
module tb_out_buffer;
  localparam int DATA_W = 16;
  localparam int ACC_W  = 33;
  int checks = 0, failures = 0;
  int n_pos_sat = 0, n_neg_sat = 0;

  logic clk = 0, rst_n = 0, load = 0;
  logic signed [ACC_W-1:0] acc = '0;
  logic signed [DATA_W-1:0] word, q, held;
  logic sat;

  out_buffer dut (.clk, .rst_n, .load, .acc, .word, .sat, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a, e;
    bit esat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0: a = (longint'(32767) <<< 14) + 16383;      // largest unclamped
        1: a = longint'(32768) <<< 14;                // smallest clamped high
        2: a = -(longint'(32768) <<< 14);             // smallest unclamped
        3: a = -(longint'(32768) <<< 14) - 1;         // clamped low
        4: a = -1;                                    // floors to -1
        default: begin
          a = longint'({$urandom, $urandom});
          a = a >>> (31 + ($urandom % 32));           // spread of magnitudes
        end
      endcase
      e = a >>> 14;                                   // floor division
      esat = 0;
      if (e > 32767)  begin e = 32767;  esat = 1; n_pos_sat++; end
      if (e < -32768) begin e = -32768; esat = 1; n_neg_sat++; end
      @(negedge clk);
      acc = ACC_W'(a);
      load = $urandom % 2;
      held = q;
      #1;
      checks++;
      if (longint'(word) != e || sat != esat) begin
        failures++;
        $display("ERROR acc=%0d word=%0d sat=%0b expected %0d %0b", a, word, sat, e, esat);
      end
      @(posedge clk); #1;
      checks++;
      if (load ? (longint'(q) != e) : (q !== held)) begin
        failures++;
        $display("ERROR buffer q=%0d load=%0b", q, load);
      end
    end
    checks++;
    if (n_pos_sat == 0 || n_neg_sat == 0) begin
      failures++;
      $display("ERROR clamping not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
