// Self-checking test of decoder_ctrl (FILL_CYC = 4). Three decodes:
// 1) fixed duration: t_init = 3, max_cycles = 20, no early stop. The strobes
//    must come in the order scale, load, 4 fill cycles, broadcast, run; the
//    counters must be cleared for the broadcast and the first 3 run cycles
//    and enabled for the other 17; done must come after exactly 20 run
//    cycles, 2+1+4+1+20 cycles after start.
// 2) early stop: t_check enabled, all_reached/cw_valid raised at run cycle
//    10: the decode must end in that cycle (cycles = 10) with early set.
// 3) early stop enabled but the codeword never valid: runs to max_cycles.
module tb_decoder_ctrl;
  import stoch_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, t_check_en, all_reached, cw_valid;
  cnt_t t_init, max_cycles, cycles;
  logic scale_go, load, bcast, cnt_clr, cnt_en, busy, done, early;
  int checks = 0, failures = 0;

  decoder_ctrl #(.FILL_CYC(4)) dut (.clk, .rst_n, .start, .t_init, .max_cycles, .t_check_en,
    .all_reached, .cw_valid, .scale_go, .load, .bcast, .cnt_clr, .cnt_en, .busy, .done,
    .early, .cycles);

  always #5 clk = ~clk;

  task automatic check(bit cond);
    checks++;
    if (!cond) failures++;
  endtask

  // Runs one decode; returns the number of cycles from start to done.
  task automatic run(int reach_at, output int total, output int n_en, output int n_clr);
    int t = 0, run_c = 0;
    bit in_run = 0;
    n_en = 0; n_clr = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    forever begin
      // sample the strobes of this cycle
      if (t == 0) check(scale_go);
      if (t == 1) check(load);
      if (t >= 2 && t < 6) check(!scale_go && !load && !bcast && !cnt_en && busy);
      if (t == 6) begin check(bcast && cnt_clr); in_run = 1; end
      if (t > 6 && !done) begin
        run_c++;
        if (cnt_en) n_en++;
        if (cnt_clr) n_clr++;
        all_reached = (reach_at > 0) && (run_c >= reach_at);
      end
      if (done) break;
      t++;
      if (t > 1000) break;
      @(negedge clk);
    end
    total = t + 1;   // counted from the start cycle
    all_reached = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, n_en, n_clr;
    start = 0; t_check_en = 0; all_reached = 0; cw_valid = 1;
    t_init = 3; max_cycles = 20;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!busy);
    run(0, total, n_en, n_clr);
    check(total == 1 + 1 + 1 + 4 + 1 + 20);
    check(n_en == 17);
    check(n_clr == 3);
    @(negedge clk);
    check(cycles == 20 && !early && !busy);
    $display("fixed: total=%0d en=%0d clr=%0d cycles=%0d", total, n_en, n_clr, cycles);

    t_check_en = 1; cw_valid = 1;
    run(10, total, n_en, n_clr);
    @(negedge clk);
    check(early);
    check(cycles == 10);
    $display("early: total=%0d cycles=%0d early=%0d", total, cycles, early);

    cw_valid = 0;
    run(5, total, n_en, n_clr);
    @(negedge clk);
    check(!early && cycles == 20);
    $display("invalid: total=%0d cycles=%0d early=%0d", total, cycles, early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
