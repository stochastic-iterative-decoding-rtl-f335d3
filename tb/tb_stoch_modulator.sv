// Self-checking test of stoch_modulator: all eight combinations of input,
// carrier and mod bit, each checked one cycle later against AND (mod=0) and
// OR (mod=1), repeated in random order.
module tb_stoch_modulator;
  logic clk = 0, rst_n = 0;
  logic in_bit, carrier, mod_bit, out_bit, e;
  int checks = 0, failures = 0;

  stoch_modulator dut (.clk, .rst_n, .in_bit, .carrier, .mod_bit, .out_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_bit = 0; carrier = 0; mod_bit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      {in_bit, carrier, mod_bit} = (t < 8) ? 3'(t) : 3'($urandom);
      e = mod_bit ? (in_bit | carrier) : (in_bit & carrier);
      @(posedge clk); #1;
      checks++;
      if (out_bit !== e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
