// Threshold converter: up/down counter with an inverted sign bit.
//
// Each cycle with en high the signed count moves up by the number of 1s and
// down by the number of 0s among the N_IN decision bits (one per decoder
// layer, so a single counter serves all layers of one codeword bit). The
// hard decision is the inverted sign bit: 1 when at least half of the counted
// bits were 1 (count >= 0), 0 otherwise. reached reports |count| >= t_check,
// used by the optional early-termination check. clr clears the count
// synchronously at the start of every codeword.
module threshold_counter #(
  parameter int N_IN  = 16,
  parameter int CNT_W = stoch_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [N_IN-1:0]  in_bits,
  input  logic [CNT_W-1:0] t_check,
  output logic [CNT_W-1:0] count,
  output logic             decision,
  output logic             reached
);

  localparam int PW = $clog2(N_IN + 1);

  logic [PW-1:0]    ones;
  logic [CNT_W-1:0] delta;
  logic [CNT_W-1:0] mag;

  always_comb begin
    ones = '0;
    for (int i = 0; i < N_IN; i++) ones += PW'(in_bits[i]);
    // ones - zeros = 2*ones - N_IN
    delta = (CNT_W'(ones) << 1) - CNT_W'(N_IN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (en)  count <= count + delta;
  end

  assign decision = ~count[CNT_W-1];
  assign mag      = count[CNT_W-1] ? -count : count;
  assign reached  = (mag >= t_check);

endmodule
