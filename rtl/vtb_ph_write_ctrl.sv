// Path-history write control: places ACS decisions in the PH RAMs.
//
// The eight ACS units deliver one 8-bit word of decisions per valid
// clock, the words of a trellis stage in order 0 .. 2^(K-4)-1 (word w
// holds the decisions of states 8w .. 8w+7, bit j for state 8w+j). Each
// word goes to address stage << (K-4) | w of the RAM of the current
// window, so a stage occupies one segment of 2^(K-4) words and a window
// of WL = 6K stages uses WL * 2^(K-4) words (K=9: 54 x 32 = 1728). After
// the last word of a window, win_done_o pulses for one clock with the
// window's number on done_win_o, and writing moves on to the next of the
// four RAMs (window number mod 4). clear_i restarts at window 0.
// Segmentation and the one-window-per-RAM use follow the published design; the
// word order, the handshake (a valid flag, no back-pressure) and the
// window numbering are this design's.
module vtb_ph_write_ctrl
  import vtb_pkg::*;
#(
  parameter int unsigned WCNT_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear_i,
  input  cfg_t               cfg_i,
  input  logic               dec_valid_i,
  input  logic [NUM_ACS-1:0] dec_word_i,
  output logic [NUM_WIN-1:0] we_o,
  output addr_t              waddr_o,
  output logic [NUM_ACS-1:0] wdata_o,
  output logic               win_done_o,
  output logic [WCNT_W-1:0]  done_win_o,
  output logic [WCNT_W-1:0]  win_cnt_o     // windows completed so far
);

  logic [5:0]        word_q;
  cnt_t              stage_q;
  logic [WCNT_W-1:0] win_q;
  logic              last_word, last_stage;

  assign last_word  = (word_q == cfg_i.words - 6'd1);
  assign last_stage = (stage_q == cfg_i.last_stage);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q     <= '0;
      stage_q    <= '0;
      win_q      <= '0;
      win_done_o <= 1'b0;
      done_win_o <= '0;
    end else if (clear_i) begin
      word_q     <= '0;
      stage_q    <= '0;
      win_q      <= '0;
      win_done_o <= 1'b0;
      done_win_o <= '0;
    end else begin
      win_done_o <= 1'b0;
      if (dec_valid_i) begin
        if (!last_word) begin
          word_q <= word_q + 6'd1;
        end else begin
          word_q <= '0;
          if (!last_stage) begin
            stage_q <= stage_q + 1'b1;
          end else begin
            stage_q    <= '0;
            win_q      <= win_q + 1'b1;
            win_done_o <= 1'b1;
            done_win_o <= win_q;
          end
        end
      end
    end
  end

  assign win_cnt_o = win_q;
  assign waddr_o   = addr_t'((ADDR_W'(stage_q) << cfg_i.seg_bits) | ADDR_W'(word_q));
  assign wdata_o   = dec_word_i;

  always_comb begin
    we_o = '0;
    we_o[win_q[WIN_W-1:0]] = dec_valid_i && !clear_i;
  end

endmodule
