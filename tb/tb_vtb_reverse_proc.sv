// Test of one reverse processor against a software traceback. A
// synchronous 2K x 8 memory of random decision words is attached to its
// read port; the shared counter and shifter are modelled here (stage
// number shifted left by K-5). For each K, passes from random start
// states run WL steps; at every step the decoded bit (MSB of the K-1 bit
// state) and the new state [S << 1, D], with D read from word
// stage*2^(K-4) + (S>>3 mod 2^(K-4)), bit S mod 8, are checked, one step
// per clock.
module tb_vtb_reverse_proc;
  import vtb_pkg::*;

  logic       clk = 0, rst_n = 0, load = 0, step = 0;
  k_t         k = 4'd9;
  cfg_t       cfg;
  state_t     start = '0, st, stn;
  logic [7:0] rdata, mem [2048];
  logic [9:0] shifter;
  addr_t      raddr;
  logic       db;
  int         cnt_next = 0;
  int checks = 0, failures = 0;

  vtb_config u_cfg (.k_i(k), .cfg_o(cfg));

  vtb_reverse_proc dut (.clk(clk), .rst_n(rst_n), .k_i(cfg.k), .buf_state_i(cfg.buf_state),
                        .buf_shift_i(cfg.buf_shift), .shifter_i(shifter), .load_i(load),
                        .start_i(start), .step_i(step), .rdata_i(rdata), .raddr_o(raddr),
                        .state_o(st), .state_next_o(stn), .dec_bit_o(db));

  assign shifter = 10'(cnt_next << (int'(k) - 5));

  always #5 clk = ~clk;
  always @(posedge clk) rdata <= mem[raddr];

  initial begin
    for (int i = 0; i < 2048; i++) mem[i] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int kk = 5; kk <= 9; kk++) begin
      for (int pass = 0; pass < 6; pass++) begin
        automatic int wl = 6 * kk, words = 1 << (kk - 4), mask = (1 << (kk - 1)) - 1;
        automatic int s = int'($urandom) & mask;
        @(negedge clk);
        k = k_t'(kk);
        load = 1; step = 0; start = state_t'(s); cnt_next = wl - 1;
        @(negedge clk);
        load = 0; step = 1;
        for (int l = wl - 1; l >= 0; l--) begin
          int d;
          cnt_next = (l > 0) ? l - 1 : 0;
          #1;
          d = int'(mem[l * words + ((s >> 3) % words)][s & 7]);
          checks++;
          if (int'(st) != s || db != s[kk - 2]) begin
            failures++; $display("FAIL: K=%0d stage %0d state %0h exp %0h", kk, l, st, s);
          end
          s = ((s << 1) | d) & mask;
          checks++;
          if (int'(stn) != s) begin failures++; $display("FAIL: K=%0d next %0h exp %0h", kk, stn, s); end
          @(negedge clk);
        end
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
