// Equality (variable) node of a stochastic decoder.
//
// The node has DEG factor-graph edges and one channel edge. For every graph
// edge k an equality circuit combines the channel bit with the bits arriving
// on the other DEG-1 graph edges, so its output excludes what came in on
// edge k. One more equality circuit combines the channel bit with all DEG
// graph edges; its output dec_bit goes to the threshold up/down counter.
// in_j/chan_bit and in_k/chan_k are the bits seen by the J and K gates
// (identical except under higher-intricacy layer interleaving, where the K
// side takes its edges and its channel stream from other layers; only then
// can J and K both be high, which toggles the flip-flop).
// The separate chan_k is this design's reading of routing "edges" separately:
// with one shared channel bit J and K could never be high together. While bcast is high every
// circuit loads the channel bit, so on the next cycle the node drives the
// channel bit out on all edges (broadcast initialization). All outputs are
// registered (JK flip-flops).
module stoch_equality_node #(
  parameter int DEG = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           bcast,
  input  logic           chan_bit,
  input  logic           chan_k,
  input  logic [DEG-1:0] in_j,
  input  logic [DEG-1:0] in_k,
  output logic [DEG-1:0] out_edges,
  output logic           dec_bit
);

  // Edge circuits: channel plus the other DEG-1 edges.
  for (genvar k = 0; k < DEG; k++) begin : g_edge
    logic [DEG-1:0] sj, sk;
    always_comb begin
      sj = in_j;
      sk = in_k;
      sj[k] = chan_bit;  // slot of edge k carries the channel bit instead
      sk[k] = chan_k;
    end
    stoch_equality_circuit #(.N_IN(DEG)) u_ec (
      .clk, .rst_n, .load(bcast), .load_val(chan_bit),
      .in_j(sj), .in_k(sk), .q(out_edges[k])
    );
  end

  // Decision circuit: channel plus every graph edge.
  stoch_equality_circuit #(.N_IN(DEG + 1)) u_dec (
    .clk, .rst_n, .load(bcast), .load_val(chan_bit),
    .in_j({in_j, chan_bit}), .in_k({in_k, chan_k}), .q(dec_bit)
  );

endmodule
