// Self-checking test of llr_scaler (7 values, beta = 0.8). For random signed
// codewords the output must be sign(n) * floor(|n| * 0.8 * 128 / max|n|),
// computed here in real arithmetic, one cycle after start; the largest
// magnitude must map to floor(0.8*128) = 102. An all-zero codeword must give
// zeros.
module tb_llr_scaler;
  localparam int N = 7;
  logic clk = 0, rst_n = 0;
  logic start, valid;
  logic [N-1:0][7:0] noisy;
  logic [N-1:0][7:0] scaled;
  int checks = 0, failures = 0;

  llr_scaler #(.N(N), .IN_W(8), .BETA_Q(205), .BETA_FRAC(8), .OUT_FRAC(7)) dut (
    .clk, .rst_n, .start, .noisy, .scaled, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; noisy = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int mx, e, a;
      @(negedge clk);
      for (int i = 0; i < N; i++) noisy[i] = (t == 0) ? 8'd0 : 8'($urandom);
      start = 1;
      mx = 0;
      for (int i = 0; i < N; i++) begin
        a = $signed(noisy[i]); if (a < 0) a = -a;
        if (a > mx) mx = a;
      end
      @(posedge clk); #1;
      start = 0;
      checks++;
      if (!valid) failures++;
      for (int i = 0; i < N; i++) begin
        a = $signed(noisy[i]);
        if (mx == 0) e = 0;
        else begin
          e = $rtoi($floor(real'(a < 0 ? -a : a) * 205.0 * 128.0 / (256.0 * real'(mx))));
          if (a < 0) e = -e;
        end
        checks++;
        if ($signed(scaled[i]) != e) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
