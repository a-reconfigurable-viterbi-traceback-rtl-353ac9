// Reconfigurable Viterbi survivor memory and traceback (top level).
//
// A Viterbi decoder with eight ACS units processes the 2^(K-1) states of
// a trellis eight at a time and produces 8 decision bits per clock. This
// block stores those decisions and turns them into decoded bits, for any
// constraint length K from 5 to 9 (GSM K=5, IS-54 K=6, IS-95/802.11/
// 802.16/ADSL K=7, 3GPP/CDMA2000 K=9), chosen at run time.
//
//   - vtb_ph_write_ctrl puts the decisions into four 2K x 8 path-history
//     RAMs (vtb_ph_ram), one window of WL = 6K stages per RAM, a stage
//     being a segment of 2^(K-4) words.
//   - Two reverse processors (vtb_reverse_proc) trace back in parallel:
//     B2, a dummy pass over the newest window that only finds a reliable
//     start state, and B1, which decodes the window two back from the
//     state B2 found one pass earlier. They share one 6-bit down counter
//     (stage number) and one 10-bit arithmetic shifter that places the
//     stage above the word-index bits of each processor's read address;
//     vtb_config sets the shift and the B1-B8 address-bit selection from K.
//   - vtb_tb_ctrl schedules the passes and the two flush passes that
//     finish a terminated block.
//
// Interface:
//   clear_i   restarts at window 0 and takes k_i as the new constraint
//             length (k_i is read only then, and at reset it is K=9).
//   dec_valid_i / dec_word_i: one decision word per clock, stage by
//             stage, words 0..2^(K-4)-1 of a stage in order, bit j of word
//             w for state 8w+j. No back-pressure.
//   b2_start_i: start state of the dummy pass (best-metric state, or any).
//   flush_i   after the last window of a block whose encoder was
//             terminated in state 0; the block must fill whole windows.
//   out_valid_o / out_bit_o: decoded bit of stage out_stage_o of window
//             out_win_o; bit index in the block = out_win_o*6K +
//             out_stage_o. A window's bits come last stage first.
//   flush_done_o pulses when the last bit of a flushed block is out.
// Latency: a window's bits appear during the pass started two windows
// later (or during the flush), WL+1 clocks per pass.
module vtb_traceback_top
  import vtb_pkg::*;
#(
  parameter int unsigned WCNT_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear_i,
  input  k_t                 k_i,
  input  logic               dec_valid_i,
  input  logic [NUM_ACS-1:0] dec_word_i,
  input  state_t             b2_start_i,
  input  logic               flush_i,
  output logic               out_valid_o,
  output logic               out_bit_o,
  output logic [WCNT_W-1:0]  out_win_o,
  output cnt_t               out_stage_o,
  output logic               win_done_o,
  output logic               pass_done_o,
  output logic               flush_done_o,
  output logic               busy_o
);

  // ---- configuration -------------------------------------------------
  k_t   k_q;
  cfg_t cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       k_q <= k_t'(K_MAX);
    else if (clear_i) k_q <= k_i;
  end

  vtb_config u_cfg (.k_i(k_q), .cfg_o(cfg));

  // ---- path-history write side ----------------------------------------
  logic [NUM_WIN-1:0] we;
  addr_t              waddr;
  logic [NUM_ACS-1:0] wdata;
  logic [WCNT_W-1:0]  done_win, win_cnt;

  vtb_ph_write_ctrl #(.WCNT_W(WCNT_W)) u_wr (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear_i    (clear_i),
    .cfg_i      (cfg),
    .dec_valid_i(dec_valid_i),
    .dec_word_i (dec_word_i),
    .we_o       (we),
    .waddr_o    (waddr),
    .wdata_o    (wdata),
    .win_done_o (win_done_o),
    .done_win_o (done_win),
    .win_cnt_o  (win_cnt)
  );

  // ---- traceback control ----------------------------------------------
  logic              load, step, cnt_dec, ram_re, b1_en, b2_en, cnt_zero;
  logic [WIN_W-1:0]  b1_ram, b2_ram;
  state_t            b1_start, b2_start, b2_next;
  logic [WCNT_W-1:0] b1_win;

  vtb_tb_ctrl #(.WCNT_W(WCNT_W)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear_i     (clear_i),
    .win_done_i  (win_done_o),
    .done_win_i  (done_win),
    .win_cnt_i   (win_cnt),
    .flush_i     (flush_i),
    .b2_start_i  (b2_start_i),
    .b2_final_i  (b2_next),
    .cnt_zero_i  (cnt_zero),
    .load_o      (load),
    .step_o      (step),
    .cnt_dec_o   (cnt_dec),
    .ram_re_o    (ram_re),
    .b1_en_o     (b1_en),
    .b2_en_o     (b2_en),
    .b1_ram_o    (b1_ram),
    .b2_ram_o    (b2_ram),
    .b1_start_o  (b1_start),
    .b2_start_o  (b2_start),
    .b1_win_o    (b1_win),
    .pass_done_o (pass_done_o),
    .flush_done_o(flush_done_o),
    .busy_o      (busy_o)
  );

  // ---- shared down counter and arithmetic shifter -----------------------
  cnt_t               cnt, cnt_next;
  logic [SHIFT_W-1:0] shifted;

  vtb_down_counter u_cnt (
    .clk       (clk),
    .rst_n     (rst_n),
    .load_i    (load),
    .load_val_i(cfg.last_stage),
    .dec_i     (cnt_dec),
    .cnt_o     (cnt),
    .cnt_next_o(cnt_next),
    .zero_o    (cnt_zero)
  );

  vtb_arith_shifter u_shift (
    .cnt_i  (cnt_next),
    .shift_i(cfg.shift),
    .out_o  (shifted)
  );

  // ---- reverse processors B1 (decoding) and B2 (dummy) ------------------
  // B2's decoded bits are not used: its pass only finds a start state.
  addr_t              b1_raddr, b2_raddr;
  logic [NUM_ACS-1:0] b1_rdata, b2_rdata;
  logic               b1_bit;

  vtb_reverse_proc u_b1 (
    .clk         (clk),
    .rst_n       (rst_n),
    .k_i         (cfg.k),
    .buf_state_i (cfg.buf_state),
    .buf_shift_i (cfg.buf_shift),
    .shifter_i   (shifted),
    .load_i      (load),
    .start_i     (b1_start),
    .step_i      (step),
    .rdata_i     (b1_rdata),
    .raddr_o     (b1_raddr),
    .state_o     (),
    .state_next_o(),
    .dec_bit_o   (b1_bit)
  );

  vtb_reverse_proc u_b2 (
    .clk         (clk),
    .rst_n       (rst_n),
    .k_i         (cfg.k),
    .buf_state_i (cfg.buf_state),
    .buf_shift_i (cfg.buf_shift),
    .shifter_i   (shifted),
    .load_i      (load),
    .start_i     (b2_start),
    .step_i      (step),
    .rdata_i     (b2_rdata),
    .raddr_o     (b2_raddr),
    .state_o     (),
    .state_next_o(b2_next),
    .dec_bit_o   ()
  );

  // ---- the four path-history RAMs ---------------------------------------
  logic [NUM_ACS-1:0] rdata [NUM_WIN];

  for (genvar r = 0; r < NUM_WIN; r++) begin : g_ram
    logic  sel_b1, sel_b2;
    assign sel_b1 = b1_en && (b1_ram == WIN_W'(r));
    assign sel_b2 = b2_en && (b2_ram == WIN_W'(r));

    vtb_ph_ram u_ram (
      .clk    (clk),
      .we_i   (we[r]),
      .waddr_i(waddr),
      .wdata_i(wdata),
      .re_i   (ram_re && (sel_b1 || sel_b2)),
      .raddr_i(sel_b1 ? b1_raddr : b2_raddr),
      .rdata_o(rdata[r])
    );
  end

  assign b1_rdata = rdata[b1_ram];
  assign b2_rdata = rdata[b2_ram];

  // ---- decoded output ---------------------------------------------------
  assign out_valid_o = step && b1_en;
  assign out_bit_o   = b1_bit;
  assign out_win_o   = b1_win;
  assign out_stage_o = cnt;

  // B1 and B2 never read the same RAM, and neither reads the one being written.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ram_re && b1_en && b2_en |-> b1_ram != b2_ram)
    else $error("vtb_traceback_top: B1 and B2 address the same RAM");
  assert property (@(posedge clk) disable iff (!rst_n)
                   ram_re && dec_valid_i && b2_en |-> !we[b2_ram])
    else $error("vtb_traceback_top: B2 reads the RAM being written");

endmodule
