// Bit-error-rate sweep on the (7,4) Hamming code comparing two builds that
// receive exactly the same noisy words:
//   u_comb  the combined decoder, all parameters at their defaults (LLR
//           scaling beta = 0.8, 16 layers, broadcast initialization);
//   u_bcast broadcast initialization alone: one layer, no LLR scaling.
// Both run 1000 cycles per word with fixed duration. Codewords are random,
// sent as BPSK (0 -> +1, 1 -> -1) with Gaussian noise (Box-Muller),
// quantized with 6 fraction bits (range -2..2, read by the decoders as
// Q1.7, so the channel gain is doubled). For Eb/N0 = 2, 3, 4, 5 and 6 dB,
// WORDS words each, the bit errors of a plain sign decision and of both
// decoders are printed. Checks: at every point the combined decoder makes
// no more bit errors than the sign decision, and over the sweep at most
// 15% more than the broadcast-only decoder (statistical margin).
module tb_ber_sweep;
  import stoch_pkg::*;
  localparam int N = 7, K = 8, WORDS = 400;

  logic clk = 0, rst_n = 0;
  logic start;
  logic [N-1:0][7:0] noisy;
  logic [7:0] chan_gain;
  logic [K-1:0] rand_prob;
  cnt_t t_init, t_check, max_cycles;
  logic [15:0] nc_cycles;
  cnt_t cyc_a, cyc_b;
  logic busy_a, done_a, valid_a, early_a, busy_b, done_b, valid_b, early_b;
  logic [N-1:0] dec_a, dec_b;

  int checks = 0, failures = 0;

  stochastic_decoder u_comb (
    .clk, .rst_n, .start, .noisy, .chan_gain, .rand_prob, .t_init, .t_check, .max_cycles, .nc_cycles,
    .busy(busy_a), .done(done_a), .decoded(dec_a), .cw_valid(valid_a), .early(early_a), .cycles(cyc_a));

  stochastic_decoder #(.L(1), .LLR_SCALE(1'b0)) u_bcast (
    .clk, .rst_n, .start, .noisy, .chan_gain, .rand_prob, .t_init, .t_check, .max_cycles, .nc_cycles,
    .busy(busy_b), .done(done_b), .decoded(dec_b), .cw_valid(valid_b), .early(early_b), .cycles(cyc_b));

  always #5 clk = ~clk;

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
    q = $rtoi($floor(y * 64.0 + 0.5));
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return 8'(q);
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] cw, hard;
    int tot_a = 0, tot_b = 0;
    real sigma;
    int g;
    start = 0; noisy = '0; chan_gain = '0; rand_prob = '0;
    t_init = 0; t_check = 0; max_cycles = 1000; nc_cycles = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int db = 2; db <= 6; db++) begin
      int e_h, e_a, e_b;
      e_h = 0; e_a = 0; e_b = 0;
      sigma = $sqrt(1.0 / (2.0 * (4.0 / 7.0) * $pow(10.0, real'(db) / 10.0)));
      g = $rtoi(2.0 * 2.0 / (sigma * sigma) * 16.0 + 0.5);
      chan_gain = (g > 255) ? 8'd255 : 8'(g);   // Q4.4 saturates at 15.9
      for (int w = 0; w < WORDS; w++) begin
        cw = encode(4'($urandom));
        for (int j = 0; j < N; j++) begin
          noisy[j] = quant((cw[j] ? -1.0 : 1.0) + sigma * gauss());
          hard[j]  = noisy[j][7];
        end
        @(negedge clk); start = 1;
        @(negedge clk); start = 0;
        while (!done_a) @(negedge clk);
        check(done_b, "both builds finish together");
        @(negedge clk);
        for (int j = 0; j < N; j++) begin
          e_h += int'(hard[j] != cw[j]);
          e_a += int'(dec_a[j] != cw[j]);
          e_b += int'(dec_b[j] != cw[j]);
        end
      end
      check(e_a <= e_h, $sformatf("%0d dB: combined %0d above sign decision %0d", db, e_a, e_h));
      tot_a += e_a;
      tot_b += e_b;
      $display("Eb/N0 %0d dB, %0d bits: errors sign %0d, broadcast only %0d, combined %0d",
               db, WORDS * N, e_h, e_b, e_a);
    end
    check(tot_a * 20 <= tot_b * 23, $sformatf("combined %0d clearly above broadcast only %0d", tot_a, tot_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
