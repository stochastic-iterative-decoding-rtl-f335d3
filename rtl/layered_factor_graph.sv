// Layered stochastic factor graph of a parity-check matrix.
//
// The graph is built at elaboration from H (row i = parity node i, column j =
// equality node j, a 1 = an edge; edges are numbered row by row). L identical
// copies (layers) of the graph are instantiated. Every edge is a pair of
// wires, one per direction. Within the layered graph, edge e of the equality
// node in layer l connects to the parity node of layer (l + off(e)) mod L,
// where off(e) = (5e + L - 1) mod L is a fixed cyclic shift chosen per edge.
// For three layers of the Hamming graph, edge 0 (E0-P0) then joins E0 of
// layer 0 to P0 of layer 2, layer 1 to layer 0 and layer 2 to layer 1, the
// documented example of a three-layer graph. With L = 1 this is the
// ordinary graph. Each edge is therefore a permutation of
// the layers, which spreads every node's messages over several layers and
// lengthens the graph's cycles.
//
// With HIGH_INTRICACY = 1 the K gates of an equality node take edge e from a
// second permutation, layer (l + off(e) + 1 + (3e mod (L-1))) mod L, and
// their channel bit from the generator of the same codeword bit in layer
// (l + 1) mod L, so J and K see different streams and the JK flip-flop can
// toggle; otherwise both gates see the same bits.
//
// Equality nodes are registered (JK flip-flops); parity nodes are
// combinational unless PAR_REG = 1, so a message crosses one edge pair per
// cycle. bcast loads each equality node with its channel bit. dec_bits[j]
// collects the decision bits of equality node j from all L layers.
module layered_factor_graph
  import stoch_pkg::*;
#(
  parameter int                      N              = HAM_N,
  parameter int                      M              = HAM_M,
  parameter bit [0:M-1][0:N-1]       H              = HAMMING_H,
  parameter int                      L              = 16,
  parameter bit                      HIGH_INTRICACY = 1'b0,
  parameter bit                      PAR_REG        = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  bcast,
  input  logic [L-1:0][N-1:0]   chan_bits,
  input  logic [L-1:0][M-1:0]   rand_bits,
  output logic [N-1:0][L-1:0]   dec_bits
);

  // ---- graph structure, computed from H -------------------------------
  function automatic int num_edges();
    int n = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        if (H[i][j]) n++;
    return n;
  endfunction

  function automatic int col_deg(int j);
    int d = 0;
    for (int i = 0; i < M; i++) if (H[i][j]) d++;
    return d;
  endfunction

  function automatic int row_deg(int i);
    int d = 0;
    for (int j = 0; j < N; j++) if (H[i][j]) d++;
    return d;
  endfunction

  // Index of edge (i, j) in row-major numbering.
  function automatic int edge_id(int i, int j);
    int n = 0;
    for (int a = 0; a < M; a++)
      for (int b = 0; b < N; b++) begin
        if (a == i && b == j) return n;
        if (H[a][b]) n++;
      end
    return -1;
  endfunction

  // k-th edge of column j / of row i.
  function automatic int col_edge(int j, int k);
    int c = 0;
    for (int i = 0; i < M; i++)
      if (H[i][j]) begin
        if (c == k) return edge_id(i, j);
        c++;
      end
    return -1;
  endfunction

  function automatic int row_edge(int i, int k);
    int c = 0;
    for (int j = 0; j < N; j++)
      if (H[i][j]) begin
        if (c == k) return edge_id(i, j);
        c++;
      end
    return -1;
  endfunction

  function automatic int off_j(int e);
    return (5 * e + L - 1) % L;
  endfunction

  function automatic int off_k(int e);
    if (!HIGH_INTRICACY || L == 1) return off_j(e);
    return (off_j(e) + 1 + ((3 * e) % (L - 1))) % L;
  endfunction

  localparam int NE = num_edges();

  // v2c[l][e]: from the equality node in layer l along edge e.
  // c2v[m][e]: from the parity node in layer m along edge e.
  logic [NE-1:0] v2c [L];
  logic [NE-1:0] c2v [L];

  for (genvar l = 0; l < L; l++) begin : g_layer

    for (genvar j = 0; j < N; j++) begin : g_eq
      localparam int D = col_deg(j);
      logic [D-1:0] ij, ik, oe;
      logic         db;
      for (genvar k = 0; k < D; k++) begin : g_e
        localparam int E = col_edge(j, k);
        assign ij[k]      = c2v[(l + off_j(E)) % L][E];
        assign ik[k]      = c2v[(l + off_k(E)) % L][E];
        assign v2c[l][E]  = oe[k];
      end
      stoch_equality_node #(.DEG(D)) u_eq (
        .clk, .rst_n, .bcast,
        .chan_bit(chan_bits[l][j]),
        .chan_k(chan_bits[HIGH_INTRICACY ? (l + 1) % L : l][j]),
        .in_j(ij), .in_k(ik), .out_edges(oe), .dec_bit(db)
      );
      assign dec_bits[j][l] = db;
    end

    for (genvar i = 0; i < M; i++) begin : g_pc
      localparam int D = row_deg(i);
      logic [D-1:0] ie, oe;
      for (genvar k = 0; k < D; k++) begin : g_e
        localparam int E = row_edge(i, k);
        assign ie[k]     = v2c[(l + L - off_j(E)) % L][E];
        assign c2v[l][E] = oe[k];
      end
      stoch_parity_node #(.DEG(D), .REGISTERED(PAR_REG)) u_pc (
        .clk, .rst_n, .in_edges(ie), .rand_bit(rand_bits[l][i]), .out_edges(oe)
      );
    end

  end

endmodule
