// Carrier source for many stochastic sequence generators.
//
// A 31-bit maximal-length Fibonacci LFSR (x^31 + x^28 + 1, period 2^31-1)
// produces one pseudo-random bit per cycle, and a plain shift register
// extends its state to LEN bits, so taps[d] is the PRBS delayed by d cycles.
// Generators take successive taps as their carriers: a generator with K
// stages uses a window of 2K taps, and stage s uses tap base + (K-1-s), i.e.
// the register shifts against the direction of the modulator pipeline so that
// the carriers combined into one output bit are all different PRBS bits.
// Reset puts the register in the state it would have after the LFSR, started
// from SEED (must be non-zero), has run long enough to fill all LEN taps, so
// every carrier is a live PRBS stream from the first cycle.
// Drawing all carriers from successive taps of one maximal-length PRBS, with
// the register running against the pipeline and at least 2K long, is the
// published scheme; the polynomial, the seed and the reset state are this
// design's choices.
module prbs_carrier_source #(
  parameter int          LEN  = 2560,
  parameter logic [30:0] SEED = 31'h5A5A_1234
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic [LEN-1:0] taps
);

  localparam int RL = (LEN > 31) ? LEN : 31;

  function automatic logic [RL-1:0] reset_state();
    logic [RL-1:0] r;
    r = RL'(SEED);
    for (int i = 0; i < RL - 31; i++) r = {r[RL-2:0], r[30] ^ r[27]};
    return r;
  endfunction

  localparam logic [RL-1:0] INIT = reset_state();

  logic [RL-1:0] sr;
  logic          fb;

  assign fb = sr[30] ^ sr[27];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= INIT;
    else        sr <= {sr[RL-2:0], fb};
  end

  assign taps = sr[LEN-1:0];

endmodule
