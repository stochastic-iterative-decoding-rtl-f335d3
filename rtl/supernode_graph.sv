// Single-layer factor graph of H with supernodes as equality nodes.
//
// Column j of H becomes a supernode with col_deg(j) edges, row i a parity
// node (combinational XOR, no flip-flop) with an optional randomizing input.
// Each supernode owns col_deg(j)+1 sequence generators; gen_carriers supplies
// K carrier bits per generator, numbered supernode by supernode (its edge
// generators, then its decision generator). init starts a codeword: every
// supernode loads p_ch[j] into its generators and clears its accumulators.
// nc is the number of cycles per supernode update. dec_bits[j] is the
// decision stream of supernode j for its up/down counter.
module supernode_graph
  import stoch_pkg::*;
#(
  parameter int                N     = HAM_N,
  parameter int                M     = HAM_M,
  parameter bit [0:M-1][0:N-1] H     = HAMMING_H,
  parameter int                K     = 8,
  parameter int                ACC_W = 16,
  parameter int                NGEN  = 19      // must equal edges(H) + N
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  init,
  input  logic [N-1:0][K-1:0]   p_ch,
  input  logic [ACC_W-1:0]      nc,
  input  logic [NGEN-1:0][K-1:0] gen_carriers,
  input  logic [M-1:0]          rand_bits,
  output logic [N-1:0]          dec_bits
);

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

  function automatic int edge_id(int i, int j);
    int n = 0;
    for (int a = 0; a < M; a++)
      for (int b = 0; b < N; b++) begin
        if (a == i && b == j) return n;
        if (H[a][b]) n++;
      end
    return -1;
  endfunction

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

  function automatic int gen_base(int j);
    int b = 0;
    for (int c = 0; c < j; c++) b += col_deg(c) + 1;
    return b;
  endfunction

  localparam int NE = gen_base(N) - N;

  if (NGEN != NE + N) begin : g_bad_ngen
    $error("supernode_graph: NGEN must be the number of edges of H plus N");
  end

  logic [NE-1:0] v2c, c2v;

  for (genvar j = 0; j < N; j++) begin : g_sn
    localparam int D = col_deg(j);
    localparam int B = gen_base(j);
    logic [D-1:0]     ie, oe;
    logic [(D+1)*K-1:0] car;
    for (genvar k = 0; k < D; k++) begin : g_e
      localparam int E = col_edge(j, k);
      assign ie[k]  = c2v[E];
      assign v2c[E] = oe[k];
    end
    for (genvar g = 0; g <= D; g++) begin : g_c
      assign car[g*K +: K] = gen_carriers[B + g];
    end
    supernode #(.DEG(D), .K(K), .ACC_W(ACC_W)) u_sn (
      .clk, .rst_n, .init, .p_ch(p_ch[j]), .nc, .in_edges(ie), .carriers(car),
      .out_edges(oe), .dec_bit(dec_bits[j])
    );
  end

  for (genvar i = 0; i < M; i++) begin : g_pc
    localparam int D = row_deg(i);
    logic [D-1:0] ie, oe;
    for (genvar k = 0; k < D; k++) begin : g_e
      localparam int E = row_edge(i, k);
      assign ie[k]  = v2c[E];
      assign c2v[E] = oe[k];
    end
    stoch_parity_node #(.DEG(D), .REGISTERED(1'b0)) u_pc (
      .clk, .rst_n, .in_edges(ie), .rand_bit(rand_bits[i]), .out_edges(oe)
    );
  end

endmodule
