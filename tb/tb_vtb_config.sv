// Test of the configuration decoder: for every constraint length 0..15
// the derived controls are compared with values computed here from the
// clamped K: window length 6K, 2^(K-4) words per stage, shift K-5, and the
// B1-B8 enables (address bit i from the state when i < K-4, from the
// shifter otherwise; never both). Table-1 values are checked literally.
module tb_vtb_config;
  import vtb_pkg::*;

  k_t   k;
  cfg_t cfg;
  int   checks = 0, failures = 0;

  vtb_config dut (.k_i(k), .cfg_o(cfg));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: K=%0d %s", k, what); end
  endtask

  initial begin
    for (int kk = 0; kk < 16; kk++) begin
      automatic int kc = (kk < 5) ? 5 : (kk > 9) ? 9 : kk;
      k = k_t'(kk);
      #1;
      check(int'(cfg.k) == kc, "k");
      check(int'(cfg.last_stage) == 6 * kc - 1, "last_stage");
      check(int'(cfg.words) == (1 << (kc - 4)), "words");
      check(int'(cfg.seg_bits) == kc - 4, "seg_bits");
      check(int'(cfg.shift) == kc - 5, "shift");
      for (int i = 1; i <= 4; i++) begin
        check(cfg.buf_state[i-1] == (i < kc - 4), "buf_state");
        check(cfg.buf_shift[i-1] == !(i < kc - 4), "buf_shift");
      end
    end
    // Table 1: WL x segment size
    k = 4'd9; #1; check((int'(cfg.last_stage) + 1) * int'(cfg.words) == 1728, "K9 1728");
    k = 4'd5; #1; check((int'(cfg.last_stage) + 1) * int'(cfg.words) == 60,   "K5 60");
    k = 4'd7; #1; check((int'(cfg.last_stage) + 1) * int'(cfg.words) == 336,  "K7 336");
    k = 4'd6; #1; check((int'(cfg.last_stage) + 1) * int'(cfg.words) == 144,  "K6 144");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
