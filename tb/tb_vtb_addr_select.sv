// Test of the read-address selection together with the configuration
// decoder and the shifter: for every K and random stage and state the
// address must equal stage * 2^(K-4) + (state >> 3) mod 2^(K-4), the
// segment layout of the path-history RAM.
module tb_vtb_addr_select;
  import vtb_pkg::*;

  k_t         k;
  cfg_t       cfg;
  cnt_t       c;
  state_t     st;
  logic [9:0] sh;
  addr_t      a;
  int checks = 0, failures = 0;

  vtb_config        u_cfg (.k_i(k), .cfg_o(cfg));
  vtb_arith_shifter u_sh  (.cnt_i(c), .shift_i(cfg.shift), .out_o(sh));
  vtb_addr_select   dut   (.state_i(st), .shifter_i(sh), .buf_state_i(cfg.buf_state),
                           .buf_shift_i(cfg.buf_shift), .addr_o(a));

  initial begin
    for (int kk = 5; kk <= 9; kk++)
      for (int t = 0; t < 400; t++) begin
        int stage, words, state;
        k     = k_t'(kk);
        words = 1 << (kk - 4);
        stage = $urandom % (6 * kk);
        state = $urandom % (1 << (kk - 1));
        c  = cnt_t'(stage);
        st = state_t'(state);
        #1;
        checks++;
        if (int'(a) != stage * words + ((state >> 3) % words)) begin
          failures++;
          $display("FAIL: K=%0d stage %0d state %0h addr %0h", kk, stage, state, a);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
