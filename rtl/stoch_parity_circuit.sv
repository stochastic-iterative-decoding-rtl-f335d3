// Stochastic parity-check circuit.
//
// Each input carries a Bernoulli bit stream whose probability of a 1 is the
// message value. The exclusive-OR of independent streams has probability
// P(A)(1-P(B)) + (1-P(A))P(B), which is exactly the parity-check update of
// belief propagation, so the whole circuit is one N_IN-input XOR gate
// (higher fan-in rather than a cascade). With REGISTERED=1 a D flip-flop
// re-times the output for fully synchronous operation; the decoder with
// broadcast initialization removes this flip-flop (REGISTERED=0), so the
// output is then combinational. The flip-flop clears to 0 on reset.
// Both forms follow the published circuit; the reset value of the
// flip-flop is this design's choice.
module stoch_parity_circuit #(
  parameter int N_IN       = 2,
  parameter bit REGISTERED = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_IN-1:0] in_bits,
  output logic            out_bit
);

  logic x;
  assign x = ^in_bits;

  if (REGISTERED) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) out_bit <= 1'b0;
      else        out_bit <= x;
    end
  end else begin : g_comb
    assign out_bit = x;
  end

endmodule
