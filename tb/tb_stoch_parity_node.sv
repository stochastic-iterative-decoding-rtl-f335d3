// Self-checking test of stoch_parity_node with four edges: every output must
// be the XOR of the other three inputs and of the randomizing bit, checked
// for random inputs with the randomizing bit both 0 and 1; a registered
// instance must show the same values one cycle later.
module tb_stoch_parity_node;
  logic clk = 0, rst_n = 0;
  logic [3:0] in_edges, out_c, out_r, exp_v;
  logic rand_bit;
  int checks = 0, failures = 0;

  stoch_parity_node #(.DEG(4), .REGISTERED(1'b0)) u_c (.clk, .rst_n, .in_edges, .rand_bit, .out_edges(out_c));
  stoch_parity_node #(.DEG(4), .REGISTERED(1'b1)) u_r (.clk, .rst_n, .in_edges, .rand_bit, .out_edges(out_r));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_edges = 0; rand_bit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_edges = 4'($urandom);
      rand_bit = 1'($urandom);
      for (int k = 0; k < 4; k++) begin
        exp_v[k] = rand_bit;
        for (int o = 0; o < 4; o++) if (o != k) exp_v[k] ^= in_edges[o];
      end
      #1;
      checks++;
      if (out_c !== exp_v) failures++;
      @(posedge clk); #1;
      checks++;
      if (out_r !== exp_v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
