// Self-checking test of stoch_equality_circuit.
// 1) Cycle-exact: random, independent J and K input sets and random loads;
//    the flip-flop is compared with a JK model (set / reset / toggle / hold).
// 2) Statistics: two input streams of probability 0.7 and 0.6 on both gates
//    for 20000 cycles; the output density must be within 0.03 of the
//    equality-node update 0.42 / (0.42 + 0.12) = 0.778.
module tb_stoch_equality_circuit;
  logic clk = 0, rst_n = 0;
  logic load, load_val, q;
  logic [2:0] in_j, in_k;
  logic [1:0] s_in;
  logic q2;
  logic model;
  int checks = 0, failures = 0;
  int ones;

  stoch_equality_circuit #(.N_IN(3)) dut (.clk, .rst_n, .load, .load_val, .in_j, .in_k, .q);
  stoch_equality_circuit #(.N_IN(2)) dut2 (.clk, .rst_n, .load(1'b0), .load_val(1'b0),
                                           .in_j(s_in), .in_k(s_in), .q(q2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; load_val = 0; in_j = 0; in_k = 0; s_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      load     = ($urandom % 10) == 0;
      load_val = 1'($urandom);
      // bias towards all-ones / all-zeros so every JK case occurs
      in_j = ($urandom % 3 == 0) ? 3'b111 : 3'($urandom);
      in_k = ($urandom % 3 == 0) ? 3'b000 : 3'($urandom);
      if (load) model = load_val;
      else begin
        case ({&in_j, &(~in_k)})
          2'b10: model = 1'b1;
          2'b01: model = 1'b0;
          2'b11: model = ~model;
          default: ;
        endcase
      end
      @(posedge clk); #1;
      checks++;
      if (q !== model) failures++;
    end
    ones = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      s_in[0] = ($urandom % 1000) < 700;
      s_in[1] = ($urandom % 1000) < 600;
      @(posedge clk); #1;
      ones += int'(q2);
    end
    checks++;
    if (ones < 14960 || ones > 16160) failures++;
    $display("equality density %0d / 20000 (expect about 15556)", ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
