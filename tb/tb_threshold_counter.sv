// Self-checking test of threshold_counter with 16 inputs: random decision
// bits, random enables and clears; the signed count must follow a model that
// adds (#ones - #zeros) when enabled, the decision must be 1 exactly when the
// count is >= 0, and reached must be |count| >= t_check.
module tb_threshold_counter;
  logic clk = 0, rst_n = 0;
  logic clr, en, decision, reached;
  logic [15:0] in_bits;
  logic [23:0] t_check, count;
  int model;
  int checks = 0, failures = 0;

  threshold_counter #(.N_IN(16), .CNT_W(24)) dut (.clk, .rst_n, .clr, .en, .in_bits, .t_check,
                                                  .count, .decision, .reached);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; en = 0; in_bits = 0; t_check = 24'd40;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      clr = ($urandom % 200) == 0;
      en  = ($urandom % 8) != 0;
      // drift: mostly ones for a while, then mostly zeros
      in_bits = ((t / 500) % 2) ? (16'($urandom) & 16'($urandom)) : (16'($urandom) | 16'($urandom));
      if (clr) model = 0;
      else if (en) model += 2 * $countones(in_bits) - 16;
      @(posedge clk); #1;
      checks += 3;
      if ($signed(count) != model) failures++;
      if (decision !== (model >= 0)) failures++;
      if (reached !== ((model < 0 ? -model : model) >= 40)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
