// End-to-end test of the reconfigurable traceback at its default sizes.
//
// For each constraint length (9, 7, 6, 5, 8) a block of whole windows of
// random bits, ended by K-1 zero tail bits, is convolutionally encoded
// (rate 1/2), optionally hit by random bit errors, and run through a
// behavioural hard-decision Viterbi ACS model that stands in for the
// eight ACS units: it produces the survivor decision of every state of
// every stage, which is fed to the design eight bits per clock. The
// decoded bits are compared with
//   - a software model of the same windowed traceback (dummy pass over
//     window w+1 from the same start state, decode of window w, the last
//     window from state 0), bit for bit, always;
//   - the transmitted bits, on error-free blocks.
// Timing checks: a window's WL bits come out on WL consecutive clocks,
// last stage first, and the pass ends one clock after its last bit.
// Mechanisms counted (each must occur): dummy-only passes, passes running
// B1 and B2 together, flush passes, RAM reuse (window >= 4), constraint
// length switches, non-zero dummy start states, input gaps.
module tb_vtb_traceback_top;
  import vtb_pkg::*;

  localparam int MAXWIN = 8;
  localparam int MAXST  = MAXWIN * WL_FACTOR * K_MAX;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               clear_i = 1'b0;
  k_t                 k_i = k_t'(9);
  logic               dec_valid_i = 1'b0;
  logic [NUM_ACS-1:0] dec_word_i = '0;
  state_t             b2_start_i = '0;
  logic               flush_i = 1'b0;
  logic               out_valid_o, out_bit_o, win_done_o, pass_done_o, flush_done_o, busy_o;
  logic [15:0]        out_win_o;
  cnt_t               out_stage_o;

  vtb_traceback_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_dummy_only = 0, n_both = 0, n_flush = 0, n_reuse = 0, n_kswitch = 0;
  int n_b2_nonzero = 0, n_gaps = 0;

  logic [255:0] decs [MAXST];
  bit           txb  [MAXST];
  bit           got  [MAXST];
  int           seen [MAXST];

  // ---- output monitor ---------------------------------------------------
  int   cur_k = 9, cur_wl = 54;
  int   run_len = 0, last_stage = -1, cyc = 0, first_cyc = 0;
  logic [15:0] run_win = '0;
  bit   in_run = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid_o) begin
      if (!in_run) begin
        in_run    = 1;
        run_len   = 0;
        run_win   = out_win_o;
        first_cyc = cyc;
        checks++;
        if (int'(out_stage_o) != cur_wl - 1) begin
          failures++;
          $display("FAIL: window %0d starts at stage %0d", out_win_o, out_stage_o);
        end
      end else begin
        checks++;
        if (int'(out_stage_o) != last_stage - 1 || out_win_o != run_win) begin
          failures++;
          $display("FAIL: stage %0d follows %0d", out_stage_o, last_stage);
        end
      end
      last_stage = int'(out_stage_o);
      run_len++;
      if (int'(out_win_o) * cur_wl + int'(out_stage_o) < MAXST) begin
        got [int'(out_win_o) * cur_wl + int'(out_stage_o)] = out_bit_o;
        seen[int'(out_win_o) * cur_wl + int'(out_stage_o)]++;
      end
    end
    if (rst_n && pass_done_o) begin
      if (in_run) begin
        checks++;
        if (run_len != cur_wl || cyc - first_cyc != cur_wl) begin
          failures++;
          $display("FAIL: pass of window %0d gave %0d bits in %0d clocks (WL=%0d)",
                   run_win, run_len, cyc - first_cyc, cur_wl);
        end
        if (run_win >= 16'(NUM_WIN)) n_reuse++;
      end
      in_run = 0;
    end
  end

  // ---- behavioural ACS and reference traceback -----------------------------
  function automatic bit parity(int v);
    return ^v[15:0];
  endfunction

  function automatic int poly(int k, int which);
    case (k)
      5: return (which != 0) ? 'o33  : 'o23;
      6: return (which != 0) ? 'o57  : 'o65;
      7: return (which != 0) ? 'o133 : 'o171;
      8: return (which != 0) ? 'o371 : 'o247;
      default: return (which != 0) ? 'o753 : 'o561;
    endcase
  endfunction

  // Trace nst stages back from stage 'top' (global index) starting in s.
  function automatic int trace(int k, int top, int nst, int s);
    int st = s;
    for (int l = top; l > top - nst; l--)
      st = ((st << 1) | int'(decs[l][st])) & ((1 << (k - 1)) - 1);
    return st;
  endfunction

  function automatic bit ref_bit(int k, int wl, int nwin, int l, int b2s);
    int w = l / wl;
    int s;
    if (w == nwin - 1) s = 0;
    else               s = trace(k, (w + 2) * wl - 1, wl, b2s);
    for (int j = (w + 1) * wl - 1; j > l; j--)
      s = ((s << 1) | int'(decs[j][s])) & ((1 << (k - 1)) - 1);
    return s[k - 2];
  endfunction

  task automatic run_block(int k, int nwin, int err_div, int gap_pct, state_t b2s);
    int wl = WL_FACTOR * k;
    int ns = 1 << (k - 1);
    int nst = nwin * wl;
    int pm [256];
    int npm[256];
    int s, g0, g1, errs;
    bit rx0 [MAXST];
    bit rx1 [MAXST];

    g0 = poly(k, 0);
    g1 = poly(k, 1);
    // source bits with a zero tail, encoder, channel
    s = 0;
    errs = 0;
    for (int l = 0; l < nst; l++) begin
      int r;
      txb[l] = (l >= nst - (k - 1)) ? 1'b0 : 1'($urandom);
      r = (int'(txb[l]) << (k - 1)) | s;
      rx0[l] = parity(r & g0);
      rx1[l] = parity(r & g1);
      if (err_div > 0 && ($urandom % err_div) == 0) begin rx0[l] = !rx0[l]; errs++; end
      if (err_div > 0 && ($urandom % err_div) == 0) begin rx1[l] = !rx1[l]; errs++; end
      s = r >> 1;
    end
    // add-compare-select, decisions of every state of every stage
    for (int i = 0; i < ns; i++) pm[i] = (i == 0) ? 0 : 1000;
    for (int l = 0; l < nst; l++) begin
      decs[l] = '0;
      for (int n = 0; n < ns; n++) begin
        int u = n >> (k - 2);
        int a = n & (ns / 2 - 1);
        int m[2];
        for (int d = 0; d < 2; d++) begin
          int p = (a << 1) | d;
          int r = (u << (k - 1)) | p;
          m[d] = pm[p] + int'(parity(r & g0) != rx0[l]) + int'(parity(r & g1) != rx1[l]);
        end
        decs[l][n] = (m[1] < m[0]);
        npm[n]     = (m[1] < m[0]) ? m[1] : m[0];
      end
      for (int n = 0; n < ns; n++) pm[n] = npm[n];
    end
    for (int l = 0; l < MAXST; l++) begin got[l] = 0; seen[l] = 0; end

    // switch the constraint length
    @(posedge clk);
    k_i     <= k_t'(k);
    clear_i <= 1'b1;
    b2_start_i <= b2s;
    @(posedge clk);
    clear_i <= 1'b0;
    if (k != cur_k) n_kswitch++;
    cur_k  = k;
    cur_wl = wl;
    if (b2s != 0) n_b2_nonzero++;

    // feed the decisions, 8 per clock
    for (int l = 0; l < nst; l++) begin
      for (int w = 0; w < ns / 8; w++) begin
        while (($urandom % 100) < gap_pct) begin
          dec_valid_i <= 1'b0;
          n_gaps++;
          @(posedge clk);
        end
        dec_valid_i <= 1'b1;
        dec_word_i  <= decs[l][8*w +: 8];
        @(posedge clk);
      end
    end
    dec_valid_i <= 1'b0;
    repeat (2) @(posedge clk);
    flush_i <= 1'b1;
    @(posedge clk);
    flush_i <= 1'b0;
    fork
      begin : wait_done
        @(posedge clk iff flush_done_o);
      end
      begin : to
        repeat (8 * wl + 100) @(posedge clk);
        failures++;
        $display("FAIL: K=%0d flush did not finish", k);
      end
    join_any
    disable fork;
    repeat (2) @(posedge clk);

    // compare
    begin
      int bad_ref = 0, bad_tx = 0, missing = 0;
      for (int l = 0; l < nst; l++) begin
        checks++;
        if (seen[l] != 1) missing++;
        else if (got[l] != ref_bit(k, wl, nwin, l, int'(b2s))) bad_ref++;
        if (err_div == 0 && got[l] != txb[l]) bad_tx++;
      end
      if ((missing + bad_ref + bad_tx) != 0) begin
        failures++;
        $display("FAIL: K=%0d windows=%0d missing=%0d ref-mismatch=%0d tx-mismatch=%0d",
                 k, nwin, missing, bad_ref, bad_tx);
      end else begin
        $display("K=%0d: %0d windows, %0d bits, %0d channel errors, decoded OK", k, nwin, nst, errs);
      end
    end
  endtask

  // ---- pass kind counter --------------------------------------------------
  always @(posedge clk) begin
    if (rst_n && dut.load) begin
      if (dut.u_ctrl.b2_en_q && !dut.u_ctrl.b1_en_q) n_dummy_only++;
      if (dut.u_ctrl.b2_en_q &&  dut.u_ctrl.b1_en_q) n_both++;
      if (!dut.u_ctrl.b2_en_q && dut.u_ctrl.b1_en_q) n_flush++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_block(9, 6, 0,  0, 8'h00);
    run_block(7, 6, 40, 0, 8'h2d);
    run_block(6, 5, 0, 10, 8'h1f);
    run_block(5, 6, 30, 0, 8'h0a);
    run_block(8, 4, 0,  5, 8'h55);
    run_block(9, 2, 25, 0, 8'hc3);
    run_block(5, 1, 0,  0, 8'h00);

    checks++; if (n_dummy_only == 0) begin failures++; $display("FAIL: no dummy-only pass"); end
    checks++; if (n_both == 0)       begin failures++; $display("FAIL: no B1+B2 pass"); end
    checks++; if (n_flush == 0)      begin failures++; $display("FAIL: no flush pass"); end
    checks++; if (n_reuse == 0)      begin failures++; $display("FAIL: no RAM reuse"); end
    checks++; if (n_kswitch == 0)    begin failures++; $display("FAIL: no K switch"); end
    checks++; if (n_b2_nonzero == 0) begin failures++; $display("FAIL: no non-zero B2 start"); end
    checks++; if (n_gaps == 0)       begin failures++; $display("FAIL: no input gap"); end
    $display("mechanisms: dummy-only=%0d B1+B2=%0d flush=%0d ram-reuse=%0d k-switch=%0d b2-start!=0=%0d gaps=%0d",
             n_dummy_only, n_both, n_flush, n_reuse, n_kswitch, n_b2_nonzero, n_gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
