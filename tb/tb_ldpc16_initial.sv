// Workload test: the irregular (16,8) ring-structured LDPC code of the first
// prototype decoder, run the way that decoder was run: one layer, a D
// flip-flop in every parity circuit, a training phase (t_init = 100) and the
// T_CHECK stop rule (t_check = 100, at most 3000 cycles), and no LLR
// scaling (LLR_SCALE = 0). Received values are quantized with 6 fraction
// bits (range -2..2), which the decoder reads as Q1.7, i.e. halved; the
// channel gain is doubled to make up for it. Codewords use the
// free bits 1, 2, 4, ..., 14; bit 0 and the odd bits 3..15 follow from the
// eight checks. Noiseless words must decode exactly and stop early with a
// valid codeword; at Eb/N0 = 4 dB (rate 1/2) over 40 words the decoded bit
// errors must not exceed those of a plain sign decision, and at least one
// decode must stop early.
module tb_ldpc16_initial;
  import stoch_pkg::*;
  localparam int N = 16, K = 8;

  logic clk = 0, rst_n = 0;
  logic start;
  logic [N-1:0][7:0] noisy;
  logic [7:0] chan_gain;
  logic [K-1:0] rand_prob;
  cnt_t t_init, t_check, max_cycles, cycles;
  logic [15:0] nc_cycles;
  logic busy, done, cw_valid, early;
  logic [N-1:0] decoded;
  int checks = 0, failures = 0, n_early = 0;

  stochastic_decoder #(.N(LDPC16_N), .M(LDPC16_M), .H(LDPC16_H), .L(1), .PARITY_FF(1'b1),
                       .LLR_SCALE(1'b0)) dut (
    .clk, .rst_n, .start, .noisy, .chan_gain, .rand_prob, .t_init, .t_check, .max_cycles,
    .nc_cycles, .busy, .done, .decoded, .cw_valid, .early, .cycles);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [N-1:0] encode(logic [7:0] d);
    logic [N-1:0] c;
    c = '0;
    c[1] = d[0];
    for (int i = 1; i < 8; i++) c[2*i] = d[i];
    c[0] = 1'b0;
    for (int i = 1; i < 8; i++) c[0] ^= c[2*i];
    for (int i = 1; i < 8; i++) c[2*i+1] = c[2*i-1] ^ c[2*i];
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

  task automatic decode();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] cw, hard;
    int err_dec = 0, err_hard = 0;
    real sigma;
    start = 0; noisy = '0; rand_prob = '0; nc_cycles = '0;
    t_init = 100; t_check = 100; max_cycles = 3000;
    sigma = $sqrt(1.0 / (2.0 * 0.5 * $pow(10.0, 0.4)));
    chan_gain = 8'($rtoi(2.0 * 2.0 / (sigma * sigma) * 16.0 + 0.5));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 6; w++) begin
      cw = encode(8'($urandom));
      for (int j = 0; j < N; j++) noisy[j] = cw[j] ? 8'hC0 : 8'h40;
      decode();
      check(decoded == cw, "noiseless decode");
      check(cw_valid && early, "noiseless early stop");
    end
    for (int w = 0; w < 40; w++) begin
      cw = encode(8'($urandom));
      for (int j = 0; j < N; j++) begin
        noisy[j] = quant((cw[j] ? -1.0 : 1.0) + sigma * gauss());
        hard[j]  = noisy[j][7];
      end
      decode();
      if (early) n_early++;
      for (int j = 0; j < N; j++) begin
        err_dec  += int'(decoded[j] != cw[j]);
        err_hard += int'(hard[j] != cw[j]);
      end
    end
    check(err_dec <= err_hard, "decoded errors not above hard-decision errors");
    check(n_early > 0, "early stops");
    $display("(16,8) at 4 dB, 40 words: bit errors hard %0d, decoded %0d, early stops %0d",
             err_hard, err_dec, n_early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
