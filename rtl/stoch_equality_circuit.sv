// Stochastic equality circuit.
//
// The J input of a JK flip-flop is the AND of the input streams and the K
// input is the AND of their inverses. A JK flip-flop driven with
// probabilities P1 on J and P2 on K outputs a stream of probability
// P1/(P1+P2), so with P1 = prod P(x) and P2 = prod (1-P(x)) the output is the
// equality-node (variable-node) update of belief propagation: the output is
// set when all inputs are 1, cleared when all are 0, and held otherwise.
//
// in_j feeds the J gate and in_k the K gate. Both get the same edges in the
// normal (lower-intricacy) wiring; with higher-intricacy layer interleaving
// they come from different layers, and then J=K=1 toggles the flip-flop.
// load forces Q to load_val on the next edge, which the decoder uses to
// broadcast a channel bit at the start of a codeword. Reset clears Q.
// The AND/AND/JK structure and the wide-gate form are the published
// circuit; giving load priority over J and K is this design's choice.
module stoch_equality_circuit #(
  parameter int N_IN = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic            load_val,
  input  logic [N_IN-1:0] in_j,
  input  logic [N_IN-1:0] in_k,
  output logic            q
);

  logic j, k;
  assign j = &in_j;
  assign k = &(~in_k);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= 1'b0;
    else if (load) q <= load_val;
    else begin
      unique case ({j, k})
        2'b10:   q <= 1'b1;
        2'b01:   q <= 1'b0;
        2'b11:   q <= ~q;
        default: q <= q;
      endcase
    end
  end

endmodule
