// Self-checking test of prbs_carrier_source with 64 taps. A model register
// of the same length starts from the seed, is advanced 64-31 times by the
// LFSR rule (x^31 + x^28 + 1) to fill it, and must equal the taps right after
// reset and on every later cycle; tap 0 must be the new LFSR bit and tap d
// tap 0 of d cycles earlier. The PRBS must be
// balanced (density of 1s within 0.47..0.53 over 20000 cycles).
module tb_prbs_carrier_source;
  localparam int LEN = 64;
  localparam logic [30:0] SEED = 31'h1357_9BDF;
  logic clk = 0, rst_n = 0;
  logic [LEN-1:0] taps;
  logic [LEN-1:0] m;
  int checks = 0, failures = 0;
  int ones = 0;

  prbs_carrier_source #(.LEN(LEN), .SEED(SEED)) dut (.clk, .rst_n, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    m = LEN'(SEED);
    for (int i = 0; i < LEN - 31; i++) m = {m[LEN-2:0], m[30] ^ m[27]};
    checks++;
    if (taps !== m) failures++;
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      logic fb;
      logic [LEN-1:0] prev;
      prev = m;
      @(posedge clk); #1;
      fb = m[30] ^ m[27];
      m = {m[LEN-2:0], fb};
      ones += int'(fb);
      checks += 3;
      if (taps[0] !== fb) failures++;
      if (taps[LEN-1:1] !== prev[LEN-2:0]) failures++;
      if (taps !== m) failures++;
    end
    checks++;
    if (ones < 9400 || ones > 10600) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
