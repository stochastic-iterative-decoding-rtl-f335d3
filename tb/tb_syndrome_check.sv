// Self-checking test of syndrome_check. Hamming (7,4): all 128 words are
// checked against the three check equations written out by hand
// (b0^b1^b4^b6, b1^b2^b3^b6, b2^b4^b5^b6); exactly 16 must be codewords.
// (16,8) ring code: random words checked against its eight equations.
module tb_syndrome_check;
  import stoch_pkg::*;
  logic [6:0] b;
  logic v;
  logic [15:0] w;
  logic v16;
  int checks = 0, failures = 0, ncw = 0;

  syndrome_check dut (.bits(b), .valid(v));
  syndrome_check #(.N(LDPC16_N), .M(LDPC16_M), .H(LDPC16_H)) dut16 (.bits(w), .valid(v16));

  initial begin
    for (int x = 0; x < 128; x++) begin
      logic e;
      b = 7'(x);
      #1;
      e = !((b[0]^b[1]^b[4]^b[6]) | (b[1]^b[2]^b[3]^b[6]) | (b[2]^b[4]^b[5]^b[6]));
      ncw += int'(e);
      checks++;
      if (v !== e) failures++;
    end
    checks++;
    if (ncw != 16) failures++;
    for (int t = 0; t < 2000; t++) begin
      logic e;
      w = 16'($urandom);
      if (t % 4 == 0) begin
        // build a codeword: free even bits, odd bits fixed by the ring checks
        w[1] = w[0] ^ w[15];
      end
      #1;
      e = !(w[0]^w[1]^w[15]);
      for (int r = 1; r < 8; r++) e &= !(w[2*r-1] ^ w[2*r] ^ w[2*r+1]);
      checks++;
      if (v16 !== e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
