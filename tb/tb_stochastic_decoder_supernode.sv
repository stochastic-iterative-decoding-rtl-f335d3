// End-to-end test of the supernode variant of stochastic_decoder
// (SUPERNODE = 1): (7,4) Hamming code, single layer of supernodes, 8-bit
// probabilities, beta = 0.8, 100 cycles per supernode update in phase A and
// 200 in phases B-E (2000 cycles per word in B and C). Supernode updates are
// counted as one more mechanism.
//
// Codewords are random Hamming codewords (free bits 1, 2, 4, 6), sent as
// BPSK (0 -> +1, 1 -> -1), with Gaussian noise drawn by the Box-Muller
// method and quantized with 5 fraction bits. Phases:
//  A. noiseless words, fixed duration of 300 cycles: every word must decode
//     exactly, be a valid codeword, take exactly 300 run cycles and finish
//     K + 5 + 300 cycles after start; the scaled maximum must be 0.8.
//  B. one bit per word received with the wrong sign but a small magnitude:
//     the decoder must correct it (decoded = sent) in at least 90% of words.
//  C. Eb/N0 = 4 dB, 60 words, 2000 cycles: the decoded bit errors must not
//     exceed the bit errors of a plain sign decision of the received values.
//  D. training and early stop: t_init = 50, t_check = 200: some decodes
//     must stop early, and every early stop must return a valid codeword.
//  E. parity-node randomization at probability 8/256 on noiseless words:
//     decoding must stay correct.
//  F. the long supernode schedule: n_c = 2000 cycles per update and 20,000
//     cycles per word (ten updates), 8 words at 4 dB: decoded bit errors
//     must not exceed hard-decision errors, and node 6 must update exactly
//     ten times per word.
// Counted mechanisms (each must occur): broadcast initialization, LLR
// scaling, counters held during training, early stop, fixed-duration stop,
// corrected bit errors, randomizing bits.
module tb_stochastic_decoder_supernode;
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
  int n_bcast = 0, n_scaled = 0, n_train = 0, n_early = 0, n_fixed = 0;
  int n_corrected = 0, n_rand = 0, n_update = 0;

  stochastic_decoder #(.SUPERNODE(1'b1)) dut (.clk, .rst_n, .start, .noisy, .chan_gain, .rand_prob, .t_init,
                          .t_check, .max_cycles, .nc_cycles, .busy, .done, .decoded, .cw_valid, .early,
                          .cycles);

  always #5 clk = ~clk;

  // mechanism monitors
  always @(posedge clk) begin
    if (dut.bcast) n_bcast++;
    if (dut.cnt_clr && !dut.bcast) n_train++;
    if (dut.rand_bits != '0) n_rand++;
    if (dut.g_super.u_graph.g_sn[6].u_sn.update) n_update++;
  end

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
    t_init = 0; t_check = 0; max_cycles = 300; nc_cycles = 16'd100;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- A: noiseless, fixed duration ----
    for (int w = 0; w < 8; w++) begin
      cw = encode(4'($urandom));
      for (int j = 0; j < N; j++) noisy[j] = cw[j] ? 8'hE0 : 8'h20;  // -1.0 / +1.0
      decode(lat);
      check(decoded == cw, $sformatf("A decoded %b sent %b cnt0 %0d", decoded, cw, $signed(dut.g_cnt[0].count)));
      check(cw_valid, "A valid");
      check(cycles == 300 && !early, "A run cycles");
      check(lat == K + 5 + 300, $sformatf("A latency %0d", lat));
      check($signed(dut.scaled[0]) == 102 || $signed(dut.scaled[0]) == -102, "A scaled max");
      if (!early) n_fixed++;
      n_scaled++;
    end

    // ---- B: one weak wrong bit ----
    ok_b = 0;
    for (int w = 0; w < 20; w++) begin
      int bad;
      cw = encode(4'($urandom));
      bad = $urandom % N;
      for (int j = 0; j < N; j++) noisy[j] = cw[j] ? 8'hE0 : 8'h20;
      noisy[bad] = cw[bad] ? 8'h06 : 8'hFA;   // wrong sign, |y| = 0.19
      max_cycles = 2000; nc_cycles = 16'd200;
      decode(lat);
      if (decoded == cw) begin
        ok_b++;
        n_corrected++;
      end
    end
    check(ok_b >= 18, $sformatf("B corrected %0d of 20", ok_b));
    $display("B: corrected %0d of 20 single weak errors", ok_b);

    // ---- C: AWGN at Eb/N0 = 4 dB ----
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
        if (hard[j] != cw[j] && decoded[j] == cw[j]) n_corrected++;
      end
    end
    check(err_dec <= err_hard, $sformatf("C errors decoded %0d hard %0d", err_dec, err_hard));
    $display("C: 4 dB, 60 words: bit errors hard-decision %0d, decoded %0d", err_hard, err_dec);

    // ---- D: training phase and early termination ----
    t_init = 50; t_check = 200; max_cycles = 3000;
    for (int w = 0; w < 20; w++) begin
      cw = encode(4'($urandom));
      for (int j = 0; j < N; j++) noisy[j] = quant((cw[j] ? -1.0 : 1.0) + sigma * gauss());
      decode(lat);
      if (early) begin
        n_early++;
        check(cw_valid, "D early stop gives a codeword");
        check(cycles < 3000, "D early stop before max");
      end else n_fixed++;
    end
    $display("D: %0d of 20 decodes stopped early", n_early);
    t_init = 0; t_check = 0;

    // ---- E: parity randomization ----
    rand_prob = 8'd8; max_cycles = 600;
    for (int w = 0; w < 6; w++) begin
      cw = encode(4'($urandom));
      for (int j = 0; j < N; j++) noisy[j] = cw[j] ? 8'hE0 : 8'h20;
      decode(lat);
      check(decoded == cw, "E decoded with randomization");
    end
    rand_prob = '0;

    // ---- F: n_c = 2000, 20,000 cycles per word ----
    nc_cycles = 16'd2000; max_cycles = 20000;
    err_dec = 0; err_hard = 0;
    for (int w = 0; w < 8; w++) begin
      int upd0;
      cw = encode(4'($urandom));
      for (int j = 0; j < N; j++) begin
        noisy[j] = quant((cw[j] ? -1.0 : 1.0) + sigma * gauss());
        hard[j]  = noisy[j][7];
      end
      upd0 = n_update;
      decode(lat);
      check(n_update - upd0 == 10, $sformatf("F updates per word %0d", n_update - upd0));
      check(cycles == 20000, "F run cycles");
      for (int j = 0; j < N; j++) begin
        err_dec  += int'(decoded[j] != cw[j]);
        err_hard += int'(hard[j] != cw[j]);
      end
    end
    check(err_dec <= err_hard, $sformatf("F errors decoded %0d hard %0d", err_dec, err_hard));
    $display("F: n_c 2000, 20000 cycles, 8 words: bit errors hard-decision %0d, decoded %0d", err_hard, err_dec);

    // ---- mechanisms ----
    check(n_bcast > 0, "broadcast");
    check(n_scaled > 0, "llr scaling");
    check(n_train > 0, "training phase");
    check(n_early > 0, "early stop");
    check(n_fixed > 0, "fixed-duration stop");
    check(n_corrected > 0, "corrections");
    check(n_rand > 0, "randomization");
    check(n_update > 0, "supernode updates");
    $display("supernode updates (node 6): %0d", n_update);
    $display("mechanisms: broadcast=%0d scaled=%0d train_cycles=%0d early=%0d fixed=%0d corrected=%0d rand_cycles=%0d",
             n_bcast, n_scaled, n_train, n_early, n_fixed, n_corrected, n_rand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
