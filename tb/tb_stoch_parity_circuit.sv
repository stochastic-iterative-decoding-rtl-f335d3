// Self-checking test of stoch_parity_circuit: a three-input combinational
// instance and a three-input registered instance are driven with random
// bits; the combinational output must equal the XOR of the inputs in the same
// cycle, the registered one the XOR of the previous cycle's inputs.
module tb_stoch_parity_circuit;
  logic clk = 0, rst_n = 0;
  logic [2:0] in_bits, prev;
  logic out_c, out_r;
  int checks = 0, failures = 0;

  stoch_parity_circuit #(.N_IN(3), .REGISTERED(1'b0)) u_c (.clk, .rst_n, .in_bits, .out_bit(out_c));
  stoch_parity_circuit #(.N_IN(3), .REGISTERED(1'b1)) u_r (.clk, .rst_n, .in_bits, .out_bit(out_r));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++; if (out_r !== 1'b0) failures++;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      prev = in_bits;
      in_bits = 3'($urandom);
      #1;
      checks++;
      if (out_c !== (in_bits[0] ^ in_bits[1] ^ in_bits[2])) failures++;
      @(posedge clk); #1;
      checks++;
      if (out_r !== (in_bits[0] ^ in_bits[1] ^ in_bits[2])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
