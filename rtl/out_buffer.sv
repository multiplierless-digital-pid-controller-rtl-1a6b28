// out_buffer: converts the accumulator to a controller output word and holds
// it for the D/A converter.
//
// The accumulator holds m(n) with ROM_FRAC+B-1 fraction bits. The output word
// keeps B-1 fraction bits: the lower ROM_FRAC bits are dropped (truncation
// toward minus infinity, as discarding the bits shifted out of a scaling
// accumulator does), and a value outside [-1, 1) is clamped to the largest or
// smallest word. The same converted word is fed back as m(n-1), so the
// integrating feedback never wraps around. Truncation and clamping are choices
// of this design; loading the D/A buffer with lr is the controller's.
//
// Interface: acc in, word = converted value (combinational, for the m(n-1)
// shift register), sat = word was clamped, load (lr) captures word into q.
// Timing: q changes at the clock edge on which load is high.
module out_buffer #(
  parameter int unsigned DATA_W   = pid_pkg::PID_DATA_W,
  parameter int unsigned ROM_W    = pid_pkg::PID_ROM_W,
  parameter int unsigned ROM_FRAC = pid_pkg::PID_ROM_FRAC,
  localparam int unsigned ACC_W   = ROM_W + DATA_W + 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  logic signed [ACC_W-1:0]   acc,
  output logic signed [DATA_W-1:0]  word,
  output logic                      sat,
  output logic signed [DATA_W-1:0]  q
);

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((1 <<< (DATA_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(1 <<< (DATA_W-1));

  logic signed [ACC_W-1:0] scaled;

  always_comb begin
    scaled = acc >>> ROM_FRAC;
    sat    = 1'b0;
    if (scaled > MAXV) begin
      word = MAXV[DATA_W-1:0];
      sat  = 1'b1;
    end else if (scaled < MINV) begin
      word = MINV[DATA_W-1:0];
      sat  = 1'b1;
    end else begin
      word = scaled[DATA_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= word;
  end

endmodule
