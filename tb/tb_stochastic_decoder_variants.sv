// Workload test of the layered decoder in its alternative settings: 5
// layers instead of 16, higher-intricacy interleaving (J and K gates of each
// equality circuit routed to different layers) and beta = 0.9
// (BETA_Q = 230), on the (7,4) Hamming code. Everything else is at its
// default (8-bit probabilities, broadcast initialization, parity circuits
// without flip-flops).
//
// Codewords and noise as in the other system tests (random Hamming
// codewords, BPSK 0 -> +1, Gaussian noise by Box-Muller, 5 fraction bits).
//  A. noiseless words, 300 cycles: exact decode, valid codeword, latency
//     K + 5 + 300, scaled maximum 0.9 (115 in Q1.7).
//  B. one weak wrong bit per word, 1000 cycles: at least 18 of 20 corrected.
//  C. Eb/N0 = 4 dB, 60 words, 1000 cycles: decoded bit errors must not
//     exceed hard-decision errors.
// Counted: cycles in which a degree-3 equality circuit sees J and K both
// high (the toggle that only higher intricacy allows) must be non-zero.
module tb_stochastic_decoder_variants;
  import stoch_pkg::*;
  localparam int N = 7, K = 8;

  logic clk = 0, rst_n = 0;
  logic start;
  logic [N-1:0][7:0] noisy;
  logic [7:0] chan_gain;
  logic [K-1:0] rand_prob;
  cnt_t t_init, t_check, max_cycles, cycles;
  logic [15:0] nc_cycles;
  logic busy, done, cw_valid, early;
  logic [N-1:0] decoded;

  int checks = 0, failures = 0;
  int n_toggle = 0, n_corrected = 0;

  stochastic_decoder #(.L(5), .HIGH_INTRICACY(1'b1), .BETA_Q(230)) dut (
    .clk, .rst_n, .start, .noisy, .chan_gain, .rand_prob, .t_init, .t_check, .max_cycles, .nc_cycles,
    .busy, .done, .decoded, .cw_valid, .early, .cycles);

  always #5 clk = ~clk;

  always @(posedge clk)
    if (dut.g_layered.u_graph.g_layer[0].g_eq[6].u_eq.g_edge[0].u_ec.j &&
        dut.g_layered.u_graph.g_layer[0].g_eq[6].u_eq.g_edge[0].u_ec.k) n_toggle++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [N-1:0] encode(logic [3:0] d);
    logic [N-1:0] c;
    c[1] = d[0]; c[2] = d[1]; c[4] = d[2]; c[6] = d[3];
    c[0] = c[1] ^ c[4] ^ c[6];
    c[3] = c[1] ^ c[2] ^ c[6];
    c[5] = c[2] ^ c[4] ^ c[6];
    return c;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic logic [7:0] quant(real y);
    int q;
    q = $rtoi($floor(y * 32.0 + 0.5));
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return 8'(q);
  endfunction

  // Decode one codeword; returns the cycles from start to done.
  task automatic decode(output int lat);
    int t = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t = 1;
    while (!done) begin
      @(negedge clk);
      t++;
    end
    lat = t;
    @(negedge clk);
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] cw, hard;
    int lat, err_dec, err_hard, ok_b;
    real sigma;
    start = 0; noisy = '0; chan_gain = 8'd92; rand_prob = '0;
    t_init = 0; t_check = 0; max_cycles = 300; nc_cycles = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- A: noiseless ----
    for (int w = 0; w < 8; w++) begin
      cw = encode(4'($urandom));
      for (int j = 0; j < N; j++) noisy[j] = cw[j] ? 8'hE0 : 8'h20;
      decode(lat);
      check(decoded == cw, $sformatf("A decoded %b sent %b", decoded, cw));
      check(cw_valid, "A valid");
      check(lat == K + 5 + 300, $sformatf("A latency %0d", lat));
      check($signed(dut.scaled[0]) == 115 || $signed(dut.scaled[0]) == -115,
            $sformatf("A scaled max %0d", $signed(dut.scaled[0])));
    end

    // ---- B: one weak wrong bit ----
    ok_b = 0;
    max_cycles = 1000;
    for (int w = 0; w < 20; w++) begin
      int bad;
      cw = encode(4'($urandom));
      bad = $urandom % N;
      for (int j = 0; j < N; j++) noisy[j] = cw[j] ? 8'hE0 : 8'h20;
      noisy[bad] = cw[bad] ? 8'h06 : 8'hFA;
      decode(lat);
      if (decoded == cw) begin
        ok_b++;
        n_corrected++;
      end
    end
    check(ok_b >= 18, $sformatf("B corrected %0d of 20", ok_b));
    $display("B: corrected %0d of 20 single weak errors", ok_b);

    // ---- C: AWGN at 4 dB ----
    sigma = $sqrt(1.0 / (2.0 * (4.0 / 7.0) * $pow(10.0, 0.4)));
    chan_gain = 8'($rtoi(2.0 / (sigma * sigma) * 16.0 + 0.5));
    err_dec = 0; err_hard = 0;
    for (int w = 0; w < 60; w++) begin
      cw = encode(4'($urandom));
      for (int j = 0; j < N; j++) begin
        noisy[j] = quant((cw[j] ? -1.0 : 1.0) + sigma * gauss());
        hard[j]  = noisy[j][7];
      end
      decode(lat);
      for (int j = 0; j < N; j++) begin
        err_dec  += int'(decoded[j] != cw[j]);
        err_hard += int'(hard[j] != cw[j]);
      end
    end
    check(err_dec <= err_hard, $sformatf("C errors decoded %0d hard %0d", err_dec, err_hard));
    $display("C: 4 dB, 60 words: bit errors hard-decision %0d, decoded %0d", err_hard, err_dec);

    check(n_toggle > 0, "JK toggle under higher intricacy");
    check(n_corrected > 0, "corrections");
    $display("toggle cycles (node 6, layer 0, edge 0): %0d", n_toggle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
