// One modulator stage of a pipelined stochastic sequence generator.
//
// With mod_bit = 0 the stage passes in_bit AND carrier (probability halves,
// Pout = Pin/2); with mod_bit = 1 it passes in_bit OR carrier
// (Pout = Pin/2 + 1/2). The carrier is a probability-0.5 stream. The result is
// registered so that stages can be chained into a pipeline that runs at the
// full clock rate; the register clears to 0 on reset.
// The AND/OR stage and its output register are the published modulator;
// the reset value is this design's choice.
module stoch_modulator (
  input  logic clk,
  input  logic rst_n,
  input  logic in_bit,
  input  logic carrier,
  input  logic mod_bit,
  output logic out_bit
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_bit <= 1'b0;
    else        out_bit <= mod_bit ? (in_bit | carrier) : (in_bit & carrier);
  end

endmodule
