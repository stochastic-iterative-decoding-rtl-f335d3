// Self-checking test of stoch_seq_gen with K = 8.
// Carriers are fresh random bits for every stage and cycle. Every output bit
// is compared with a cycle-exact model of the pipeline, and for several
// probabilities the density of 1s over 8192 cycles must be within 0.02 of
// prob/256 (the weight set by Pout = Pin/2 + mod/2 per stage).
module tb_stoch_seq_gen;
  localparam int K = 8;
  logic clk = 0, rst_n = 0;
  logic [K-1:0] prob, carriers;
  logic out_bit;
  logic [K:0] m;           // model of chain registers, m[0] = 0
  int checks = 0, failures = 0;
  int ones;
  int probs[5] = '{0, 64, 128, 200, 255};

  stoch_seq_gen #(.K(K)) dut (.clk, .rst_n, .prob, .carriers, .out_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prob = 0; carriers = 0; m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (probs[p]) begin
      ones = 0;
      for (int t = 0; t < 8192 + 16; t++) begin
        @(negedge clk);
        prob = K'(probs[p]);
        carriers = K'($urandom);
        for (int s = K - 1; s >= 0; s--)
          m[s+1] = prob[s] ? (m[s] | carriers[s]) : (m[s] & carriers[s]);
        @(posedge clk); #1;
        checks++;
        if (out_bit !== m[K]) failures++;
        if (t >= 16) ones += int'(out_bit);
      end
      checks++;
      if ((ones - probs[p] * 32) > 164 || (probs[p] * 32 - ones) > 164) failures++;
      $display("prob %0d/256: %0d ones in 8192", probs[p], ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
