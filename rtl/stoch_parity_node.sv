// Parity-check node of a stochastic decoder.
//
// A node with DEG edges holds DEG parity circuits; the circuit for edge k
// takes the bits arriving on every other edge, so each outgoing message is
// extrinsic. rand_bit is the optional randomizing input edge: it enters every
// constituent circuit, so a 1 on it inverts all outputs at once and a 0
// leaves them as they would be without it. Tie it to 0 when the feature is
// not used. Outputs are combinational (REGISTERED=0) or one cycle late
// (REGISTERED=1).
// Node construction and the randomizing edge follow the published design;
// using one XOR of DEG-1 edge inputs plus the random bit per output is the
// wide-gate form of it.
module stoch_parity_node #(
  parameter int DEG        = 3,
  parameter bit REGISTERED = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [DEG-1:0] in_edges,
  input  logic           rand_bit,
  output logic [DEG-1:0] out_edges
);

  for (genvar k = 0; k < DEG; k++) begin : g_edge
    logic [DEG-1:0] sel;
    always_comb begin
      sel = in_edges;
      sel[k] = rand_bit;  // other edges plus the randomizing edge
    end
    stoch_parity_circuit #(.N_IN(DEG), .REGISTERED(REGISTERED)) u_pc (
      .clk, .rst_n, .in_bits(sel), .out_bit(out_edges[k])
    );
  end

endmodule
