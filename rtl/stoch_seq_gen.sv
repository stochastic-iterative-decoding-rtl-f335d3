// Pipelined stochastic sequence generator.
//
// K modulator stages in a chain turn the K-bit unsigned fraction prob/2^K into
// a bit stream whose probability of a 1 is prob/2^K. The first stage's input
// is the all-zero stream. Since each stage computes Pin/2 + mod/2, the last
// stage carries weight 1/2 and the first 1/2^K, so prob[K-1] (the MSB) drives
// the last stage and prob[0] the first. carriers[s] is the p=0.5 carrier of
// stage s; it must be independent of the other stages' carriers at the time
// their contributions meet at the output. The stream reflects a new prob
// value K cycles after it is applied.
// The chain itself follows the published pipelined modulator. Its stage
// equations fix the bit order used here (LSB first); a sentence of the
// same description that puts the MSB first is not followed, since the
// generated probability would then be bit-reversed.
module stoch_seq_gen #(
  parameter int K = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] prob,
  input  logic [K-1:0] carriers,
  output logic         out_bit
);

  logic [K:0] chain;
  assign chain[0] = 1'b0;

  for (genvar s = 0; s < K; s++) begin : g_stage
    stoch_modulator u_mod (
      .clk, .rst_n,
      .in_bit (chain[s]),
      .carrier(carriers[s]),
      .mod_bit(prob[s]),
      .out_bit(chain[s+1])
    );
  end

  assign out_bit = chain[K];

endmodule
