// Self-checking test of prob_mapper: for all 256 input values and a set of
// gains the output must equal round(256 / (1 + exp(g*y))) (capped at 255),
// with g*y taken to 1/16 (floor) and clamped to [-8, 8). Also checks the
// direction of the mapping: a strongly positive value gives a probability
// near 0, a strongly negative one near 1.
module tb_prob_mapper;
  logic [7:0] y, gain, prob;
  int checks = 0, failures = 0;

  prob_mapper #(.Y_W(8), .G_W(8), .G_FRAC(4), .PROB_W(8)) dut (.y, .gain, .prob);

  initial begin
    int gains[5] = '{0, 16, 40, 100, 255};
    foreach (gains[g]) begin
      for (int v = 0; v < 256; v++) begin
        real x, p;
        int q, e;
        y = 8'(v);
        gain = 8'(gains[g]);
        #1;
        // g*y in units of 1/16: y/128 * gain/16 * 16 = y*gain/128
        q = $rtoi($floor(real'($signed(8'(v))) * real'(gains[g]) / 128.0));
        if (q > 127) q = 127;
        if (q < -128) q = -128;
        x = real'(q) / 16.0;
        p = 1.0 / (1.0 + $exp(x));
        e = $rtoi(p * 256.0 + 0.5);
        if (e > 255) e = 255;
        checks++;
        if (int'(prob) != e) failures++;
      end
    end
    y = 8'd127; gain = 8'd255; #1;
    checks++; if (prob > 8'd2) failures++;
    y = 8'h81; gain = 8'd255; #1;
    checks++; if (prob < 8'd253) failures++;
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
