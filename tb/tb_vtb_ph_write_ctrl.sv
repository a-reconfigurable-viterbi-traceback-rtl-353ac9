// Test of the path-history write control. For each K a stream of random
// decision words with random gaps is fed through one and a half blocks
// of windows; each written word must go to the RAM of its window (window
// mod 4, one-hot write enable) at address stage*2^(K-4) + word, and
// win_done must pulse once, one clock after the last word of a window,
// with the right window number and count. clear restarts at window 0.
module tb_vtb_ph_write_ctrl;
  import vtb_pkg::*;

  logic        clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic [7:0]  word = '0, wdata;
  k_t          k = 4'd9;
  cfg_t        cfg;
  logic [3:0]  we;
  addr_t       waddr;
  logic        done;
  logic [15:0] done_win, win_cnt;
  int checks = 0, failures = 0;
  int exp_done = -1, n_done = 0;

  vtb_config u_cfg (.k_i(k), .cfg_o(cfg));
  vtb_ph_write_ctrl dut (.clk(clk), .rst_n(rst_n), .clear_i(clear), .cfg_i(cfg),
                         .dec_valid_i(valid), .dec_word_i(word), .we_o(we), .waddr_o(waddr),
                         .wdata_o(wdata), .win_done_o(done), .done_win_o(done_win),
                         .win_cnt_o(win_cnt));

  always #5 clk = ~clk;

  // win_done checker: expected one clock after a window's last word
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (exp_done >= 0) begin
        checks++;
        if (!done || int'(done_win) != exp_done || int'(win_cnt) != exp_done + 1) begin
          failures++; $display("FAIL: win_done missing for window %0d", exp_done);
        end
        n_done++;
      end else if (done) begin
        checks++; failures++; $display("FAIL: unexpected win_done");
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int kk = 5; kk <= 9; kk++) begin
      automatic int wl = 6 * kk, words = 1 << (kk - 4);
      @(negedge clk);
      exp_done = -1;
      k = k_t'(kk); clear = 1;
      @(negedge clk);
      clear = 0;
      for (int w = 0; w < 5; w++)
        for (int l = 0; l < wl; l++)
          for (int i = 0; i < words; i++) begin
            while (($urandom % 4) == 0) begin
              valid = 0;
              exp_done = -1;
              @(negedge clk);
            end
            valid = 1; word = 8'($urandom);
            exp_done = (l == wl - 1 && i == words - 1) ? w : -1;
            #1;
            checks++;
            if (we != 4'(1 << (w % 4)) || int'(waddr) != l * words + i || wdata != word) begin
              failures++;
              $display("FAIL: K=%0d win %0d stage %0d word %0d: we %b addr %0d", kk, w, l, i, we, waddr);
            end
            @(negedge clk);
          end
      valid = 0;
      exp_done = -1;
      @(negedge clk);
    end
    checks++;
    if (n_done != 25) begin failures++; $display("FAIL: %0d windows done", n_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
