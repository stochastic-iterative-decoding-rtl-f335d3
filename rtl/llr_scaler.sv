// Log-likelihood-ratio scaling of one received codeword.
//
// Every noisy demodulator value n_i is replaced by n_i * beta / max|n_i|, the
// maximum taken over the N values of the codeword. This compresses the
// channel probabilities towards 0.5 (beta < 1) and so raises the switching
// activity of the stochastic decoder. Inputs are signed IN_W-bit values of
// any fixed-point scale (the scale cancels). beta = BETA_Q / 2^BETA_FRAC;
// the default 205/256 is 0.8. Outputs are signed with OUT_FRAC fraction bits
// (magnitude rounded down, saturated below 1). The result is registered:
// valid rises one cycle after start. An all-zero codeword gives all zeros.
module llr_scaler #(
  parameter int N         = 7,
  parameter int IN_W      = 8,
  parameter int BETA_Q    = 205,
  parameter int BETA_FRAC = 8,
  parameter int OUT_FRAC  = 7
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [N-1:0][IN_W-1:0]       noisy,
  output logic [N-1:0][OUT_FRAC:0]     scaled,
  output logic                         valid
);

  localparam int MW  = IN_W + 1;                      // magnitude width
  localparam int NW  = MW + 16 + OUT_FRAC;            // numerator width
  localparam logic [NW-1:0] OMAX = NW'((1 << OUT_FRAC) - 1);

  logic [N-1:0][MW-1:0]    mag;
  logic [MW-1:0]           mx;
  logic [N-1:0][OUT_FRAC:0] res;

  always_comb begin
    mx = '0;
    for (int i = 0; i < N; i++) begin
      mag[i] = noisy[i][IN_W-1] ? MW'(-$signed({noisy[i][IN_W-1], noisy[i]}))
                                : MW'(noisy[i]);
      if (mag[i] > mx) mx = mag[i];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_div
    logic [NW-1:0] num, den, q;
    always_comb begin
      num = (NW'(mag[i]) * NW'(BETA_Q)) << OUT_FRAC;
      den = NW'(mx) << BETA_FRAC;
      q   = (mx == '0) ? '0 : num / den;
      if (q > OMAX) q = OMAX;
      res[i] = noisy[i][IN_W-1] ? -(OUT_FRAC+1)'(q) : (OUT_FRAC+1)'(q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scaled <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= start;
      if (start) scaled <= res;
    end
  end

endmodule
