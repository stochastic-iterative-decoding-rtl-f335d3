// Channel value to bit probability.
//
// For BPSK (bit 0 sent as +1, bit 1 as -1) on an additive white Gaussian
// noise channel, the probability that a received value y came from a 1 is
// 1 / (1 + exp(g*y)) with g = 2/sigma^2. The input y is signed with
// Y_W-1 fraction bits, gain g is unsigned with G_FRAC fraction bits. The
// product g*y is rounded towards minus infinity to 1/16, clamped to [-8, 8),
// and looks up a 256-entry table computed at elaboration from the formula;
// the table entry is the probability as a PROB_W-bit fraction of 2^PROB_W,
// rounded and capped at 2^PROB_W - 1. Purely combinational.
// The decoder only needs "the probability that the bit is a 1" for each
// channel value; the BPSK/Gaussian formula, the table and its 8-bit formats
// are this design's choices.
module prob_mapper #(
  parameter int Y_W    = 8,
  parameter int G_W    = 8,
  parameter int G_FRAC = 4,
  parameter int PROB_W = 8
) (
  input  logic [Y_W-1:0]    y,
  input  logic [G_W-1:0]    gain,
  output logic [PROB_W-1:0] prob
);

  typedef logic [PROB_W-1:0] tab_t [256];

  function automatic tab_t make_table();
    tab_t t;
    for (int i = 0; i < 256; i++) begin
      real llr, p;
      int  v;
      llr = real'(i - 128) / 16.0;
      p   = 1.0 / (1.0 + $exp(llr));
      v   = $rtoi(p * real'(1 << PROB_W) + 0.5);
      if (v > (1 << PROB_W) - 1) v = (1 << PROB_W) - 1;
      t[i] = PROB_W'(v);
    end
    return t;
  endfunction

  localparam tab_t TABLE = make_table();

  localparam int PW = Y_W + G_W + 1;
  localparam int SH = Y_W - 1 + G_FRAC - 4;    // shift to 4 fraction bits

  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] q;
  logic        [7:0]    idx;

  always_comb begin
    prod = PW'($signed(y)) * $signed({1'b0, gain});
    q    = prod >>> SH;
    if (q > 127)       idx = 8'd255;
    else if (q < -128) idx = 8'd0;
    else               idx = 8'(q + 128);
    prob = TABLE[idx];
  end

endmodule
