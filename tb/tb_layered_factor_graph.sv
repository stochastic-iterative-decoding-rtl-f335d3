// Self-checking test of layered_factor_graph on the (7,4) Hamming code with
// three layers, once with lower- and once with higher-intricacy wiring.
// A cycle-exact reference model, written from the edge list of H, keeps the
// JK state of every equality-node output, computes parity outputs as the XOR
// of the other edges and the randomizing bit, and routes edge e of layer l
// to layer (l + (5e+2) mod 3) (J gates) and, with higher intricacy, the K
// gates to layer (l + off + 1 + (3e mod 2)) mod 3, their channel bit to
// layer (l + 1) mod 3. Channel and randomizing
// bits are random; broadcast cycles are inserted. All decision bits of both
// instances are compared every cycle, and after each broadcast every
// decision bit must equal its channel bit.
module tb_layered_factor_graph;
  import stoch_pkg::*;
  localparam int N = 7, M = 3, L = 3;
  localparam bit [0:M-1][0:N-1] H = HAMMING_H;

  logic clk = 0, rst_n = 0;
  logic bcast;
  logic [L-1:0][N-1:0] chan_bits;
  logic [L-1:0][M-1:0] rand_bits;
  logic [N-1:0][L-1:0] dec0, dec1;
  int checks = 0, failures = 0, bcasts = 0, toggles = 0;

  layered_factor_graph #(.N(N), .M(M), .H(H), .L(L), .HIGH_INTRICACY(1'b0)) dut0 (
    .clk, .rst_n, .bcast, .chan_bits, .rand_bits, .dec_bits(dec0));
  layered_factor_graph #(.N(N), .M(M), .H(H), .L(L), .HIGH_INTRICACY(1'b1)) dut1 (
    .clk, .rst_n, .bcast, .chan_bits, .rand_bits, .dec_bits(dec1));

  always #5 clk = ~clk;

  // edge list
  int ne;
  int er[16], ec[16];
  // model state per intricacy variant
  logic v2c [2][L][16];
  logic dec [2][L][N];
  logic c2v [2][L][16];

  function automatic int oj(int e);
    return (5 * e + L - 1) % L;
  endfunction
  function automatic int ok(int hi, int e);
    return hi ? (oj(e) + 1 + ((3 * e) % (L - 1))) % L : oj(e);
  endfunction

  task automatic model_step();
    for (int hi = 0; hi < 2; hi++) begin
      // parity outputs from current equality outputs
      for (int m = 0; m < L; m++)
        for (int e = 0; e < ne; e++) begin
          logic x;
          x = rand_bits[m][er[e]];
          for (int f = 0; f < ne; f++)
            if (f != e && er[f] == er[e]) x ^= v2c[hi][(m + L - oj(f)) % L][f];
          c2v[hi][m][e] = x;
        end
      // equality updates
      for (int l = 0; l < L; l++)
        for (int j = 0; j < N; j++) begin
          logic ch, chk, dj, dk;
          ch  = chan_bits[l][j];
          chk = hi ? chan_bits[(l + 1) % L][j] : ch;
          for (int e = 0; e < ne; e++) if (ec[e] == j) begin
            logic aj, ak;
            aj = ch; ak = ~chk;
            for (int f = 0; f < ne; f++) if (f != e && ec[f] == j) begin
              aj &= c2v[hi][(l + oj(f)) % L][f];
              ak &= ~c2v[hi][(l + ok(hi, f)) % L][f];
            end
            if (bcast) v2c[hi][l][e] = ch;
            else if (aj && !ak) v2c[hi][l][e] = 1'b1;
            else if (!aj && ak) v2c[hi][l][e] = 1'b0;
            else if (aj && ak) v2c[hi][l][e] = ~v2c[hi][l][e];
          end
          dj = ch; dk = ~chk;
          for (int f = 0; f < ne; f++) if (ec[f] == j) begin
            dj &= c2v[hi][(l + oj(f)) % L][f];
            dk &= ~c2v[hi][(l + ok(hi, f)) % L][f];
          end
          if (bcast) dec[hi][l][j] = ch;
          else if (dj && !dk) dec[hi][l][j] = 1'b1;
          else if (!dj && dk) dec[hi][l][j] = 1'b0;
          else if (dj && dk) dec[hi][l][j] = ~dec[hi][l][j];
        end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0][L-1:0] prev;
    ne = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        if (H[i][j]) begin er[ne] = i; ec[ne] = j; ne++; end
    for (int hi = 0; hi < 2; hi++)
      for (int l = 0; l < L; l++) begin
        for (int e = 0; e < 16; e++) v2c[hi][l][e] = 1'b0;
        for (int j = 0; j < N; j++) dec[hi][l][j] = 1'b0;
      end
    bcast = 0; chan_bits = '0; rand_bits = '0;
    prev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      bcast = (t % 250) == 0;
      for (int l = 0; l < L; l++)
        for (int j = 0; j < N; j++)
          chan_bits[l][j] = ($urandom % 100) < ((t / 1000) % 2 ? 80 : 50);
      for (int l = 0; l < L; l++)
        for (int i = 0; i < M; i++)
          rand_bits[l][i] = ($urandom % 100) < 5;
      if (bcast) bcasts++;
      model_step();
      @(posedge clk); #1;
      for (int j = 0; j < N; j++)
        for (int l = 0; l < L; l++) begin
          checks += 2;
          if (dec0[j][l] !== dec[0][l][j]) failures++;
          if (dec1[j][l] !== dec[1][l][j]) failures++;
          if (bcast) begin
            checks++;
            if (dec0[j][l] !== chan_bits[l][j]) failures++;
          end
        end
      if (dec0 != prev) toggles++;
      prev = dec0;
    end
    checks += 2;
    if (bcasts == 0) failures++;
    if (toggles < 100) failures++;
    $display("broadcasts=%0d cycles with decision activity=%0d", bcasts, toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
