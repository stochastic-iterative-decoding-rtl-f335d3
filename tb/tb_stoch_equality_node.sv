// Self-checking test of stoch_equality_node with three graph edges. A
// reference model keeps one JK state per edge output and one for the
// decision: the edge-k circuit sees the channel bit and the other two edges,
// the decision circuit the channel bit and all three edges. J and K inputs
// are random and independent half of the time, and so are the channel
// bits seen by J and K, so set, clear, hold and toggle all occur (toggles
// are counted). After a broadcast cycle every output must
// equal the broadcast channel bit.
module tb_stoch_equality_node;
  logic clk = 0, rst_n = 0;
  logic bcast, chan_bit, chan_k, dec_bit;
  logic [2:0] in_j, in_k, out_edges;
  logic [2:0] m_e;
  logic m_d;
  int checks = 0, failures = 0;
  int bcasts = 0, toggles = 0;

  stoch_equality_node #(.DEG(3)) dut (.clk, .rst_n, .bcast, .chan_bit, .chan_k, .in_j, .in_k, .out_edges, .dec_bit);

  always #5 clk = ~clk;

  function automatic logic jk(logic q, logic j, logic k);
    case ({j, k})
      2'b10: return 1'b1;
      2'b01: return 1'b0;
      2'b11: return ~q;
      default: return q;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bcast = 0; chan_bit = 0; chan_k = 0; in_j = 0; in_k = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_e = '0; m_d = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      bcast    = ($urandom % 20) == 0;
      chan_bit = ($urandom % 4) != 0;
      chan_k   = ($urandom % 2) ? chan_bit : 1'($urandom);
      in_j = ($urandom % 2) ? 3'b111 : 3'($urandom);
      in_k = ($urandom % 2) ? in_j : 3'($urandom);
      if (bcast) begin
        m_e = {3{chan_bit}};
        m_d = chan_bit;
        bcasts++;
      end else begin
        for (int k = 0; k < 3; k++) begin
          logic aj, ak;
          aj = chan_bit; ak = ~chan_k;
          for (int o = 0; o < 3; o++) if (o != k) begin
            aj &= in_j[o];
            ak &= ~in_k[o];
          end
          if (aj && ak) toggles++;
          m_e[k] = jk(m_e[k], aj, ak);
        end
        m_d = jk(m_d, chan_bit & (&in_j), ~chan_k & (&(~in_k)));
      end
      @(posedge clk); #1;
      checks += 2;
      if (out_edges !== m_e) failures++;
      if (dec_bit !== m_d) failures++;
    end
    checks++;
    if (bcasts == 0) failures++;
    checks++;
    if (toggles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
