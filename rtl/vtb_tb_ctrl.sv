// Traceback control: schedules the passes of reverse processors B1, B2.
//
// A pass loads the shared down counter with WL-1 and both processors
// with their start states (one load clock), then steps WL clocks, one
// trellis stage per clock, while the counter runs down to 0.
//   Window pass, when window w has been written (win_done_i):
//     B2 (dummy) traces window w from b2_start_i (e.g. the best-metric
//     state, any state will do); its final state is the state at the last
//     stage of window w-1 and is kept for the next pass.
//     B1 (decoding) traces window w-2 from the state kept by the previous
//     pass (B2's trace of window w-1) and emits its WL decoded bits,
//     last stage first. B1 is idle for w < 2.
//   Flush, after the last window n-1 of a block (flush_i):
//     pass A: B1 traces window n-2 from the kept state;
//     pass B: B1 traces window n-1 from state 0, the block being
//     terminated with K-1 zero tail bits.
// Writing continues into the fourth RAM during a pass. A pass takes WL+1
// clocks and a window takes WL * 2^(K-4) >= 2 WL clocks to write, so at
// most one window pass is ever pending. Parallel B1/B2 with B2 seeding B1
// and the shared counter follow the published design; the schedule (which window
// each processor takes), the flush and the start states are this
// design's.
module vtb_tb_ctrl
  import vtb_pkg::*;
#(
  parameter int unsigned WCNT_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear_i,
  input  logic              win_done_i,
  input  logic [WCNT_W-1:0] done_win_i,
  input  logic [WCNT_W-1:0] win_cnt_i,
  input  logic              flush_i,
  input  state_t            b2_start_i,
  input  state_t            b2_final_i,   // B2's next state in the last step
  input  logic              cnt_zero_i,
  output logic              load_o,       // counter and processors load
  output logic              step_o,       // one traceback step
  output logic              cnt_dec_o,
  output logic              ram_re_o,
  output logic              b1_en_o,
  output logic              b2_en_o,
  output logic [WIN_W-1:0]  b1_ram_o,
  output logic [WIN_W-1:0]  b2_ram_o,
  output state_t            b1_start_o,
  output state_t            b2_start_o,
  output logic [WCNT_W-1:0] b1_win_o,     // window B1 is decoding
  output logic              pass_done_o,
  output logic              flush_done_o,
  output logic              busy_o
);

  typedef enum logic {S_IDLE, S_RUN} st_e;
  typedef enum logic [1:0] {P_WIN, P_FLUSH_A, P_FLUSH_B} pass_e;

  st_e               st_q;
  pass_e             pass_q;
  logic              pend_win_q, pend_fa_q, pend_fb_q;
  logic [WCNT_W-1:0] pend_num_q, flush_n_q;
  logic [WIN_W-1:0]  b2_ram_q;
  state_t            kept_q;
  logic              b1_en_q, b2_en_q;
  logic [WCNT_W-1:0] b1_win_q;
  state_t            b1_start_q;

  logic start;
  logic load_q;
  assign start = (st_q == S_IDLE) && (pend_win_q || pend_fa_q || pend_fb_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= S_IDLE;
      pass_q      <= P_WIN;
      pend_win_q  <= 1'b0;
      pend_fa_q   <= 1'b0;
      pend_fb_q   <= 1'b0;
      pend_num_q  <= '0;
      flush_n_q   <= '0;
      b2_ram_q    <= '0;
      kept_q      <= '0;
      b1_en_q     <= 1'b0;
      b2_en_q     <= 1'b0;
      b1_win_q    <= '0;
      b1_start_q  <= '0;
      pass_done_o <= 1'b0;
      flush_done_o<= 1'b0;
    end else if (clear_i) begin
      st_q        <= S_IDLE;
      pend_win_q  <= 1'b0;
      pend_fa_q   <= 1'b0;
      pend_fb_q   <= 1'b0;
      b1_en_q     <= 1'b0;
      b2_en_q     <= 1'b0;
      pass_done_o <= 1'b0;
      flush_done_o<= 1'b0;
    end else begin
      pass_done_o  <= 1'b0;
      flush_done_o <= 1'b0;
      if (win_done_i) begin
        pend_win_q <= 1'b1;
        pend_num_q <= done_win_i;
      end
      if (flush_i) begin
        flush_n_q  <= win_cnt_i;
        pend_fa_q  <= (win_cnt_i >= WCNT_W'(2));
        pend_fb_q  <= (win_cnt_i >= WCNT_W'(1));
        if (win_cnt_i == '0) flush_done_o <= 1'b1;
      end
      unique case (st_q)
        S_IDLE: begin
          if (pend_win_q) begin
            st_q       <= S_RUN;
            pass_q     <= P_WIN;
            pend_win_q <= win_done_i;  // a new window cannot arrive now; kept for safety
            b2_en_q    <= 1'b1;
            b2_ram_q   <= pend_num_q[WIN_W-1:0];
            b1_en_q    <= (pend_num_q >= WCNT_W'(2));
            b1_win_q   <= pend_num_q - WCNT_W'(2);
            b1_start_q <= kept_q;
          end else if (pend_fa_q) begin
            st_q       <= S_RUN;
            pass_q     <= P_FLUSH_A;
            pend_fa_q  <= 1'b0;
            b2_en_q    <= 1'b0;
            b1_en_q    <= 1'b1;
            b1_win_q   <= flush_n_q - WCNT_W'(2);
            b1_start_q <= kept_q;
          end else if (pend_fb_q) begin
            st_q       <= S_RUN;
            pass_q     <= P_FLUSH_B;
            pend_fb_q  <= 1'b0;
            b2_en_q    <= 1'b0;
            b1_en_q    <= 1'b1;
            b1_win_q   <= flush_n_q - WCNT_W'(1);
            b1_start_q <= '0;
          end
        end
        S_RUN: begin
          if (!load_q && cnt_zero_i) begin
            st_q        <= S_IDLE;
            pass_done_o <= 1'b1;
            if (b2_en_q) kept_q <= b2_final_i;
            if (pass_q == P_FLUSH_B) flush_done_o <= 1'b1;
            b1_en_q <= 1'b0;
            b2_en_q <= 1'b0;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // The load clock is the first clock of S_RUN: the pass parameters are
  // registered by then. Steps follow until the counter reaches 0.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       load_q <= 1'b0;
    else if (clear_i) load_q <= 1'b0;
    else              load_q <= start;
  end

  assign load_o     = load_q;
  assign step_o     = (st_q == S_RUN) && !load_q;
  assign cnt_dec_o  = step_o && !cnt_zero_i;
  assign ram_re_o   = load_q || cnt_dec_o;
  assign b1_en_o    = b1_en_q;
  assign b2_en_o    = b2_en_q;
  assign b1_ram_o   = b1_win_q[WIN_W-1:0];
  assign b2_ram_o   = b2_ram_q;
  assign b1_start_o = b1_start_q;
  assign b2_start_o = b2_start_i;
  assign b1_win_o   = b1_win_q;
  assign busy_o     = (st_q == S_RUN) || pend_win_q || pend_fa_q || pend_fb_q;

  // A second window may not complete while one is still waiting.
  assert property (@(posedge clk) disable iff (!rst_n || clear_i)
                   !(win_done_i && pend_win_q && !start))
    else $error("vtb_tb_ctrl: window pass overrun");

endmodule
