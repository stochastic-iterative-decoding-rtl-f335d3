// Workload test: feed-forward accuracy of the stochastic parity and equality
// circuits with 2, 3 and 4 inputs. For each of 300 random input sets, every
// input gets a Bernoulli stream of its own probability for 2000 cycles; the
// density of each circuit's output is compared with the exact belief-
// propagation update (parity: probability of an odd number of 1s; equality:
// prod p / (prod p + prod (1-p))). The mean absolute error over the sets must
// stay below 0.015 for the parity circuits, which are exact apart from
// stream noise, and below 0.05 for the equality circuits, whose JK-flip-flop
// approximation loses accuracy as inputs are added. Equality inputs are drawn
// from [0.1, 0.9] to avoid sets whose exact output is undefined.
module tb_feedforward_accuracy;
  localparam int SETS = 300, BITS = 2000;
  logic clk = 0, rst_n = 0;
  logic [3:0] x;
  logic [2:0] par, eq;
  int checks = 0, failures = 0;

  for (genvar d = 2; d <= 4; d++) begin : g_deg
    stoch_parity_circuit #(.N_IN(d), .REGISTERED(1'b1)) u_p (
      .clk, .rst_n, .in_bits(x[d-1:0]), .out_bit(par[d-2]));
    stoch_equality_circuit #(.N_IN(d)) u_e (
      .clk, .rst_n, .load(1'b0), .load_val(1'b0), .in_j(x[d-1:0]), .in_k(x[d-1:0]), .q(eq[d-2]));
  end

  always #5 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    real perr[3], eerr[3];
    x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 3; d++) begin perr[d] = 0.0; eerr[d] = 0.0; end
    for (int s = 0; s < SETS; s++) begin
      real p[4];
      int pc[3], ec[3];
      for (int i = 0; i < 4; i++) p[i] = 0.1 + 0.8 * real'($urandom % 10000) / 10000.0;
      for (int d = 0; d < 3; d++) begin pc[d] = 0; ec[d] = 0; end
      for (int t = 0; t < BITS + 1; t++) begin
        @(negedge clk);
        if (t > 0)
          for (int d = 0; d < 3; d++) begin pc[d] += int'(par[d]); ec[d] += int'(eq[d]); end
        for (int i = 0; i < 4; i++) x[i] = real'($urandom % 1000000) < p[i] * 1000000.0;
      end
      for (int d = 0; d < 3; d++) begin
        real podd, a, b;
        podd = 0.0; a = 1.0; b = 1.0;
        for (int i = 0; i < d + 2; i++) begin
          podd = podd * (1.0 - p[i]) + (1.0 - podd) * p[i];
          a *= p[i];
          b *= (1.0 - p[i]);
        end
        perr[d] += absr(real'(pc[d]) / BITS - podd);
        eerr[d] += absr(real'(ec[d]) / BITS - a / (a + b));
      end
    end
    for (int d = 0; d < 3; d++) begin
      perr[d] /= SETS;
      eerr[d] /= SETS;
      $display("%0d inputs: mean |error| parity %f, equality %f", d + 2, perr[d], eerr[d]);
      checks += 2;
      if (perr[d] > 0.015) failures++;
      if (eerr[d] > 0.05) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
