// Stochastic iterative decoder for a binary LDPC / Hamming code.
//
// Belief propagation is carried out on the code's factor graph with every
// message represented as a random bit stream whose density of 1s is the
// message probability. Parity nodes are XOR gates, equality nodes are AND
// gates driving JK flip-flops, and each edge is a pair of single wires, so
// the whole graph iterates once per clock cycle.
//
// Data path for one codeword:
//   noisy values -> llr_scaler (x beta/max|n|) -> prob_mapper (P(bit=1))
//   -> one pipelined sequence generator per equality node and layer
//   -> layered_factor_graph (L copies of the graph, edges permuted across
//      layers) -> one threshold_counter per codeword bit (sums all layers)
//   -> decoded bits (inverted sign bits), syndrome_check -> cw_valid.
// All generators draw their carriers from successive taps of one PRBS
// register (prbs_carrier_source). rand_prob sets the probability of the
// randomizing stream fed to every parity node (0 switches randomization off).
//
// Operation (decoder_ctrl): pulse start with the codeword on noisy, chan_gain
// (2/sigma^2, Q4.4), rand_prob, t_init, t_check and max_cycles stable. The
// decoder scales, loads and fills the generators (K+3 cycles), broadcasts
// the channel bits for one cycle, then runs. Counting starts after t_init
// cycles; decoding stops after max_cycles cycles, or early (t_check != 0)
// once every counter has |count| >= t_check and the decisions satisfy every
// parity check. done pulses for one cycle; decoded, cw_valid and cycles
// stay valid until the next start.
//
// SUPERNODE = 1 builds the supernode variant instead: a single-layer graph
// whose equality nodes are supernodes (accumulate nc_cycles incoming bits per
// edge, evaluate the equality constraint in fixed point, re-emit streams from
// their own generators); nc_cycles is ignored otherwise.
//
// LLR_SCALE = 0 bypasses the scaling: the channel values (their top 8 bits)
// go straight to the probability mapping, as in the decoders that are
// evaluated without LLR scaling (broadcast or layering alone, supernodes).
//
// PARITY_FF = 1 puts the D flip-flop back into every parity circuit, as in
// the first prototype decoder; parity answers then arrive one cycle later.
// Broadcast initialization removes it, so it is off by default.
//
// Defaults follow the combined decoder: (7,4) Hamming code, beta = 0.8, 16
// layers, broadcast initialization, parity circuits without flip-flops.
// The 8-bit probability resolution, the input formats, the lower-intricacy
// layer permutation and the carrier polynomial are this design's choices.
module stochastic_decoder
  import stoch_pkg::*;
#(
  parameter int                N              = HAM_N,
  parameter int                M              = HAM_M,
  parameter bit [0:M-1][0:N-1] H              = HAMMING_H,
  parameter int                L              = 16,
  parameter int                K              = 8,
  parameter int                IN_W           = 8,
  parameter int                BETA_Q         = 205,
  parameter int                BETA_FRAC      = 8,
  parameter bit                HIGH_INTRICACY = 1'b0,
  parameter bit                SUPERNODE      = 1'b0,
  parameter bit                PARITY_FF      = 1'b0,
  parameter bit                LLR_SCALE      = 1'b1,
  parameter logic [30:0]       SEED           = 31'h5A5A_1234
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [N-1:0][IN_W-1:0] noisy,
  input  logic [7:0]             chan_gain,
  input  logic [K-1:0]           rand_prob,
  input  cnt_t                   t_init,
  input  cnt_t                   t_check,
  input  cnt_t                   max_cycles,
  input  logic [15:0]            nc_cycles,
  output logic                   busy,
  output logic                   done,
  output logic [N-1:0]           decoded,
  output logic                   cw_valid,
  output logic                   early,
  output cnt_t                   cycles
);

  function automatic int num_edges();
    int n = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        if (H[i][j]) n++;
    return n;
  endfunction

  localparam int OUT_FRAC = 7;
  if (IN_W < OUT_FRAC + 1) begin : g_in_w_check
    $error("IN_W must be at least OUT_FRAC + 1");
  end
  localparam int NE       = num_edges();
  localparam int LY       = SUPERNODE ? 1 : L;  // layers actually built
  // sequence generators: per layer one per equality node and one per parity
  // node, or, with supernodes, one per edge and per decision plus one per
  // parity node
  localparam int NG       = SUPERNODE ? (NE + N + M) : (N + M) * L;
  localparam int LEN      = NG * 2 * K;         // carrier taps, 2K per generator

  // ---- control --------------------------------------------------------
  logic scale_go, load, bcast, cnt_clr, cnt_en, all_reached;

  decoder_ctrl #(.FILL_CYC(K + 1)) u_ctrl (
    .clk, .rst_n, .start,
    .t_init, .max_cycles,
    .t_check_en (t_check != '0),
    .all_reached, .cw_valid,
    .scale_go, .load, .bcast, .cnt_clr, .cnt_en,
    .busy, .done, .early, .cycles
  );

  // ---- channel preprocessing -----------------------------------------
  logic [N-1:0][OUT_FRAC:0] scaled;
  logic                     scaled_vld;
  logic [N-1:0][K-1:0]      prob_c, prob_r;
  logic [K-1:0]             rprob_r;

  llr_scaler #(.N(N), .IN_W(IN_W), .BETA_Q(BETA_Q), .BETA_FRAC(BETA_FRAC),
               .OUT_FRAC(OUT_FRAC)) u_scale (
    .clk, .rst_n, .start(scale_go), .noisy, .scaled, .valid(scaled_vld)
  );

  for (genvar j = 0; j < N; j++) begin : g_map
    logic [OUT_FRAC:0] y;
    if (!LLR_SCALE) begin : g_raw
      // channel value as Q1.OUT_FRAC without scaling (IN_W >= OUT_FRAC+1)
      assign y = noisy[j][IN_W-1 -: OUT_FRAC + 1];
    end else begin : g_scl
      assign y = scaled[j];
    end
    prob_mapper #(.Y_W(OUT_FRAC + 1), .G_W(8), .G_FRAC(4), .PROB_W(K)) u_map (
      .y, .gain(chan_gain), .prob(prob_c[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prob_r  <= '0;
      rprob_r <= '0;
    end else if (load) begin
      prob_r  <= prob_c;
      rprob_r <= rand_prob;
    end
  end

  // ---- stochastic sequence generation --------------------------------
  logic [LEN-1:0]         taps;

  prbs_carrier_source #(.LEN(LEN), .SEED(SEED)) u_prbs (.clk, .rst_n, .taps);

  // Carrier of stage s of generator g: tap 2Kg + (K-1-s).
  function automatic logic [K-1:0] carriers_of(int g, logic [LEN-1:0] t);
    logic [K-1:0] c;
    for (int s = 0; s < K; s++) c[s] = t[2 * K * g + (K - 1 - s)];
    return c;
  endfunction

  logic [LY-1:0][M-1:0]   rand_bits;
  logic [N-1:0][LY-1:0]   dec_bits;

  for (genvar l = 0; l < LY; l++) begin : g_rgen
    for (genvar i = 0; i < M; i++) begin : g_rnd
      stoch_seq_gen #(.K(K)) u_gen (
        .clk, .rst_n, .prob(rprob_r),
        .carriers(carriers_of(NG - LY * M + l * M + i, taps)),
        .out_bit(rand_bits[l][i])
      );
    end
  end

  if (SUPERNODE) begin : g_super
    // ---- supernode decoder: generators live inside the supernodes ------
    logic [NE+N-1:0][K-1:0] gen_car;
    for (genvar g = 0; g < NE + N; g++) begin : g_car
      assign gen_car[g] = carriers_of(g, taps);
    end
    supernode_graph #(.N(N), .M(M), .H(H), .K(K), .ACC_W(16), .NGEN(NE + N)) u_graph (
      .clk, .rst_n, .init(bcast), .p_ch(prob_r), .nc(nc_cycles),
      .gen_carriers(gen_car), .rand_bits(rand_bits[0]), .dec_bits(dec_bits)
    );
  end else begin : g_layered
    // ---- layered stochastic decoder --------------------------------------
    logic [L-1:0][N-1:0] chan_bits;
    for (genvar l = 0; l < L; l++) begin : g_gen
      for (genvar j = 0; j < N; j++) begin : g_ch
        stoch_seq_gen #(.K(K)) u_gen (
          .clk, .rst_n, .prob(prob_r[j]),
          .carriers(carriers_of(l * N + j, taps)),
          .out_bit(chan_bits[l][j])
        );
      end
    end
    layered_factor_graph #(.N(N), .M(M), .H(H), .L(L),
                           .HIGH_INTRICACY(HIGH_INTRICACY), .PAR_REG(PARITY_FF)) u_graph (
      .clk, .rst_n, .bcast, .chan_bits, .rand_bits, .dec_bits
    );
  end

  // ---- threshold conversion and codeword check ------------------------
  logic [N-1:0] reached;

  for (genvar j = 0; j < N; j++) begin : g_cnt
    cnt_t count;
    threshold_counter #(.N_IN(LY), .CNT_W(CNT_W)) u_cnt (
      .clk, .rst_n, .clr(cnt_clr), .en(cnt_en), .in_bits(dec_bits[j]),
      .t_check, .count(count), .decision(decoded[j]), .reached(reached[j])
    );
  end

  assign all_reached = &reached;

  syndrome_check #(.N(N), .M(M), .H(H)) u_syn (.bits(decoded), .valid(cw_valid));

  logic unused;
  assign unused = scaled_vld;

endmodule
