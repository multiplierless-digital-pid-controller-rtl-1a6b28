// scaling_acc: the add/subtract scaling accumulator of a bit-serial DA unit.
//
// It evaluates y = sum_{k=1}^{B-1} F_k 2^-k - F_0 from the partial products
// F_k delivered one per clock, least significant bit position first:
//   clear:            acc = 0
//   add   (k=B-1..1): acc = (acc + F_k) / 2      (add, then shift right 1 bit)
//   subtract (k=0):   acc = acc - F_0
// The shift-right of the controller's operation list is done without losing
// the bits shifted out: the accumulator is B-1 bits wider at its low end than
// a table word, so the result is the exact inner product. Three integer bits
// (one more than a table word, plus a guard bit) make overflow impossible.
// Keeping all bits is this design's choice; the add/shift/subtract sequence is
// the controller's.
//
// Interface: clr (clacc) clears, en (lacc) loads the new value, sub (s/a)
// selects subtract. f is a table word with ROM_FRAC fraction bits; acc has
// ROM_FRAC+B-1 fraction bits. Timing: one step per enabled clock; a clear has
// priority over en.
module scaling_acc #(
  parameter int unsigned DATA_W = pid_pkg::PID_DATA_W,
  parameter int unsigned ROM_W  = pid_pkg::PID_ROM_W,
  localparam int unsigned ACC_W = ROM_W + DATA_W + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     en,
  input  logic                     sub,
  input  logic signed [ROM_W-1:0]  f,
  output logic signed [ACC_W-1:0]  acc
);

  logic signed [ACC_W-1:0] f_aligned;
  logic signed [ACC_W-1:0] sum;

  always_comb begin
    // Table word placed at the integer/fraction split of the accumulator.
    f_aligned = ACC_W'(f) <<< (DATA_W - 1);
    sum       = sub ? (acc - f_aligned) : (acc + f_aligned);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= sub ? sum : (sum >>> 1);
  end

endmodule
