// Supernode: an equality node that computes in fixed point.
//
// The node exchanges stochastic streams with its DEG parity-node neighbours
// like an ordinary equality node, but internally it works on numbers. It
// holds one input accumulator per edge and one stochastic sequence
// generator per output (DEG edge outputs plus the decision output to the
// up/down counter). Operation:
//   init (one cycle): every generator is loaded with the channel probability
//     p_ch (broadcast initialization) and the accumulators are cleared.
//   then, every cycle: each accumulator adds the bit arriving on its edge.
//   every nc cycles: each accumulator value a_i becomes the probability
//     p_i = a_i * 2^K / nc; for edge k the output probability is
//       p_ch * prod_{i!=k} p_i / (p_ch * prod_{i!=k} p_i + (1-p_ch) * prod_{i!=k} (1-p_i)),
//     and the decision output uses the product over all edges; the results
//     are loaded into the generators and the accumulators restart.
// Probabilities are K-bit fractions of 2^K (1.0 saturates to 2^K-1); the
// products are kept at full width before the one division. A
// product whose numerator and denominator are both 0 gives 1/2. The update
// is one combinational step; new values reach the streams K cycles later
// (generator pipeline). carriers holds K carrier bits per generator, edge
// generators first, decision generator last.
module supernode #(
  parameter int DEG   = 2,
  parameter int K     = 8,
  parameter int ACC_W = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   init,
  input  logic [K-1:0]           p_ch,
  input  logic [ACC_W-1:0]       nc,
  input  logic [DEG-1:0]         in_edges,
  input  logic [(DEG+1)*K-1:0]   carriers,
  output logic [DEG-1:0]         out_edges,
  output logic                   dec_bit
);

  localparam int     PW  = K * (DEG + 2);      // product width
  localparam int     ONE = 1 << K;

  logic [DEG-1:0][ACC_W-1:0] acc;
  logic [ACC_W-1:0]          cyc;
  logic [DEG:0][K-1:0]       val;              // generator values
  logic [DEG-1:0][K-1:0]     p_in;
  logic [DEG:0][K-1:0]       p_new;
  logic                      update;

  assign update = (cyc == nc - 1'b1);

  // accumulator with the current bit, as a probability
  always_comb begin
    for (int i = 0; i < DEG; i++) begin
      logic [ACC_W+K-1:0] a, q;
      a = (ACC_W+K)'(acc[i] + ACC_W'(in_edges[i])) << K;
      q = (nc == '0) ? '0 : a / (ACC_W+K)'(nc);
      p_in[i] = (q >= (ACC_W+K)'(ONE)) ? K'(ONE - 1) : K'(q);
    end
  end

  // equality constraint for every output (index DEG = decision, all edges)
  always_comb begin
    for (int k = 0; k <= DEG; k++) begin
      logic [PW-1:0] num, nnum, den, q;
      num  = PW'(p_ch);
      nnum = PW'(ONE - int'(p_ch));
      for (int i = 0; i < DEG; i++)
        if (i != k) begin
          num  = num  * PW'(p_in[i]);
          nnum = nnum * PW'(ONE - int'(p_in[i]));
        end
      den = num + nnum;
      q   = (den == '0) ? PW'(ONE / 2) : (num << K) / den;
      p_new[k] = (q >= PW'(ONE)) ? K'(ONE - 1) : K'(q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      cyc <= '0;
      val <= '0;
    end else if (init) begin
      acc <= '0;
      cyc <= '0;
      val <= {(DEG + 1){p_ch}};
    end else if (update) begin
      acc <= '0;
      cyc <= '0;
      val <= p_new;
    end else begin
      cyc <= cyc + 1'b1;
      for (int i = 0; i < DEG; i++) acc[i] <= acc[i] + ACC_W'(in_edges[i]);
    end
  end

  for (genvar g = 0; g <= DEG; g++) begin : g_gen
    logic o;
    stoch_seq_gen #(.K(K)) u_gen (
      .clk, .rst_n, .prob(val[g]), .carriers(carriers[g*K +: K]), .out_bit(o)
    );
    if (g < DEG) begin : g_e
      assign out_edges[g] = o;
    end else begin : g_d
      assign dec_bit = o;
    end
  end

endmodule
