// Self-checking test of supernode with two edges, K = 8, through its ports
// only. A cycle-exact model in this bench keeps the accumulators, the update
// counter, the generator values and the three generator pipelines (driven
// by the same random carriers), and every output bit is compared with it.
// The model's update follows the equality constraint in integer arithmetic:
//   p_i = min(255, 256 a_i / nc),
//   out_k = 256 p_ch p_o / (p_ch p_o + (256-p_ch)(256-p_o)), o = other edge,
//   dec   = same over both edges, 128 when the denominator is 0, capped 255;
// each model update is also compared with the same constraint in real
// arithmetic (within 3/256). Phases: after init with p_ch = 200 and no
// update, the stream densities over 8192 cycles must be within 0.03 of
// 200/256; then 60 updates with nc = 64 and edge bits of random density.
module tb_supernode;
  localparam int K = 8, DEG = 2;
  logic clk = 0, rst_n = 0;
  logic init;
  logic [K-1:0] p_ch;
  logic [15:0] nc;
  logic [DEG-1:0] in_edges, out_edges;
  logic [(DEG+1)*K-1:0] carriers;
  logic dec_bit;
  int checks = 0, failures = 0, updates = 0;

  // model state
  int m_acc[DEG], m_cyc, m_val[DEG+1];
  logic [K:0] m_ch[DEG+1];

  supernode #(.DEG(DEG), .K(K), .ACC_W(16)) dut (.clk, .rst_n, .init, .p_ch, .nc, .in_edges,
                                                 .carriers, .out_edges, .dec_bit);

  always #5 clk = ~clk;

  function automatic real eqc(real a, real b, real c);
    real n, d;
    n = a * b * c;
    d = n + (1.0 - a) * (1.0 - b) * (1.0 - c);
    return (d == 0.0) ? 0.5 : n / d;
  endfunction

  function automatic int eqi(int pc, int pa, int pb, bit use_b);
    longint n, nn, q;
    n  = longint'(pc) * pa;
    nn = longint'(256 - pc) * (256 - pa);
    if (use_b) begin
      n  = n * pb;
      nn = nn * (256 - pb);
    end
    if (n + nn == 0) return 128;
    q = (n * 256) / (n + nn);
    return (q > 255) ? 255 : int'(q);
  endfunction

  task automatic near(int got, real want, string what);
    real w = want * 256.0;
    checks++;
    if (real'(got) < w - 3.0 || real'(got) > w + 3.0) begin
      failures++;
      $display("FAIL %s: model %0d, real %f", what, got, w);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      for (int g = 0; g <= DEG; g++)
        for (int s = K - 1; s >= 0; s--)
          m_ch[g][s+1] = m_val[g][s] ? (m_ch[g][s] | carriers[g*K+s])
                                     : (m_ch[g][s] & carriers[g*K+s]);
      if (init) begin
        for (int i = 0; i < DEG; i++) m_acc[i] = 0;
        m_cyc = 0;
        for (int g = 0; g <= DEG; g++) m_val[g] = int'(p_ch);
      end else if (m_cyc == int'(nc) - 1) begin
        int p[DEG];
        for (int i = 0; i < DEG; i++) begin
          p[i] = ((m_acc[i] + int'(in_edges[i])) * 256) / int'(nc);
          if (p[i] > 255) p[i] = 255;
        end
        m_val[0] = eqi(int'(p_ch), p[1], 0, 1'b0);
        m_val[1] = eqi(int'(p_ch), p[0], 0, 1'b0);
        m_val[2] = eqi(int'(p_ch), p[0], p[1], 1'b1);
        near(m_val[0], eqc(real'(p_ch)/256.0, real'(p[1])/256.0, 0.5), "edge0");
        near(m_val[1], eqc(real'(p_ch)/256.0, real'(p[0])/256.0, 0.5), "edge1");
        near(m_val[2], eqc(real'(p_ch)/256.0, real'(p[0])/256.0, real'(p[1])/256.0), "dec");
        for (int i = 0; i < DEG; i++) m_acc[i] = 0;
        m_cyc = 0;
        updates++;
      end else begin
        m_cyc++;
        for (int i = 0; i < DEG; i++) m_acc[i] += int'(in_edges[i]);
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, e1, dd, pr0, pr1;
    for (int g = 0; g <= DEG; g++) begin m_ch[g] = '0; m_val[g] = 0; end
    for (int i = 0; i < DEG; i++) m_acc[i] = 0;
    m_cyc = 0;
    init = 0; p_ch = 8'd200; nc = 16'd60000; in_edges = 0; carriers = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1; init = 1;
    @(negedge clk); init = 0;
    e0 = 0; e1 = 0; dd = 0;
    for (int t = 0; t < 8192 + K + 2; t++) begin
      in_edges = 2'($urandom);
      carriers = 24'($urandom);
      @(negedge clk);
      checks++;
      if ({dec_bit, out_edges} !== {m_ch[2][K], m_ch[1][K], m_ch[0][K]}) failures++;
      if (t >= K + 2) begin
        e0 += int'(out_edges[0]); e1 += int'(out_edges[1]); dd += int'(dec_bit);
      end
    end
    checks += 3;
    if (e0 < 6154 || e0 > 6646) failures++;
    if (e1 < 6154 || e1 > 6646) failures++;
    if (dd < 6154 || dd > 6646) failures++;
    $display("init densities %0d %0d %0d of 8192 (expect 6400)", e0, e1, dd);

    nc = 16'd64;
    init = 1; p_ch = 8'($urandom % 256);
    @(negedge clk); init = 0;
    for (int u = 0; u < 60; u++) begin
      pr0 = $urandom % 101; pr1 = $urandom % 101;
      for (int t = 0; t < 64; t++) begin
        in_edges[0] = ($urandom % 100) < pr0;
        in_edges[1] = ($urandom % 100) < pr1;
        carriers = 24'($urandom);
        @(negedge clk);
        checks++;
        if ({dec_bit, out_edges} !== {m_ch[2][K], m_ch[1][K], m_ch[0][K]}) failures++;
      end
    end
    checks++;
    if (updates != 60) failures++;
    $display("updates %0d", updates);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
