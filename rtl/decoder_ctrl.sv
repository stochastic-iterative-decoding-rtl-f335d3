// Sequencer of one codeword decode.
//
// start (in IDLE) triggers, in order: SCALE, one cycle in which the LLR
// scaler registers the codeword; LOAD, one cycle in which the channel
// probabilities are latched into the sequence generators; FILL, FILL_CYC
// cycles that let the generator pipelines produce streams of the new
// probabilities; BCAST, one cycle of broadcast initialization, which also
// clears the up/down counters; RUN, the stochastic decode proper. During the
// first t_init RUN cycles the counters are held cleared (training phase);
// afterwards they count every cycle. RUN ends after max_cycles cycles, or
// earlier when t_check_en is set, all counters have reached |count| >=
// T_CHECK and the decisions form a valid codeword. DONE then pulses done for
// one cycle; the decisions stay in the counters until the next start.
// cycles reports the RUN cycles of the last decode.
module decoder_ctrl
  import stoch_pkg::*;
#(
  parameter int FILL_CYC = 9
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  cnt_t       t_init,
  input  cnt_t       max_cycles,
  input  logic       t_check_en,
  input  logic       all_reached,
  input  logic       cw_valid,
  output logic       scale_go,
  output logic       load,
  output logic       bcast,
  output logic       cnt_clr,
  output logic       cnt_en,
  output logic       busy,
  output logic       done,
  output logic       early,
  output cnt_t       cycles
);

  dec_state_e state;
  cnt_t       cyc;
  logic       stop_early;

  assign stop_early = t_check_en && (cyc > t_init) && all_reached && cw_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cyc    <= '0;
      cycles <= '0;
      early  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:  if (start) state <= S_SCALE;
        S_SCALE: state <= S_LOAD;
        S_LOAD:  begin state <= S_FILL; cyc <= '0; end
        S_FILL:  begin
          if (cyc == cnt_t'(FILL_CYC - 1)) begin
            state <= S_BCAST;
            cyc   <= '0;
          end else cyc <= cyc + 1'b1;
        end
        S_BCAST: begin state <= S_RUN; cyc <= '0; end
        S_RUN: begin
          cyc <= cyc + 1'b1;
          if (stop_early || (cyc + 1'b1 >= max_cycles)) begin
            state  <= S_DONE;
            cycles <= cyc + 1'b1;
            early  <= stop_early;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    scale_go = (state == S_SCALE);
    load     = (state == S_LOAD);
    bcast    = (state == S_BCAST);
    cnt_clr  = (state == S_BCAST) || (state == S_RUN && cyc < t_init);
    cnt_en   = (state == S_RUN) && (cyc >= t_init);
    busy     = (state != S_IDLE);
    done     = (state == S_DONE);
  end

endmodule
