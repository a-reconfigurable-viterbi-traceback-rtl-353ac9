// Test of the state register: for every K, loads random states and shifts
// random survivor bits in, checking S_(L-1) = [S_L << 1, D] kept to K-1
// bits, the decoded bit (MSB of the K-1 bit state) and the next-value
// output, against a model kept here. The Figure 3 example (K=8 state
// 0_111111 with D=0 and D=1) is checked literally.
module tb_vtb_state_reg;
  import vtb_pkg::*;

  logic   clk = 0, rst_n = 0, load = 0, shift = 0, d = 0;
  k_t     k = 4'd9;
  state_t lv = '0, st, nx;
  logic   db;
  int checks = 0, failures = 0;
  int model = 0;

  vtb_state_reg dut (.clk(clk), .rst_n(rst_n), .k_i(k), .load_i(load), .load_val_i(lv),
                     .shift_i(shift), .d_i(d), .state_o(st), .next_o(nx), .dec_bit_o(db));

  always #5 clk = ~clk;

  task automatic step_check(int exp_next);
    #1;
    checks++;
    if (int'(nx) != exp_next) begin failures++; $display("FAIL: K=%0d next %0h exp %0h", k, nx, exp_next); end
    @(posedge clk);
    model = exp_next;
    #1;
    checks++;
    if (int'(st) != model || db != model[int'(k) - 2]) begin
      failures++; $display("FAIL: K=%0d state %0h exp %0h db %0b", k, st, model, db);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int kk = 5; kk <= 9; kk++) begin
      automatic int mask = (1 << (kk - 1)) - 1;
      @(negedge clk);
      k = k_t'(kk); load = 0; shift = 0;
      for (int t = 0; t < 300; t++) begin
        @(negedge clk);
        load  = (($urandom % 10) == 0);
        shift = !load && (($urandom % 5) != 0);
        d     = 1'($urandom);
        lv    = state_t'($urandom);
        step_check(load ? (int'(lv) & mask) : shift ? (((model << 1) | int'(d)) & mask) : model);
      end
    end
    // Figure 3: state 0_111111 at stage L; predecessors 111111_0 and 111111_1
    @(negedge clk);
    k = 4'd8;
    load = 1; shift = 0; lv = 8'h3f;
    step_check('h3f);
    checks++; if (db != 1'b0) begin failures++; $display("FAIL: fig3 decoded bit"); end
    @(negedge clk);
    load = 0; shift = 1; d = 0;
    step_check('h7e);
    @(negedge clk);
    load = 1; shift = 0; lv = 8'h3f;
    step_check('h3f);
    @(negedge clk);
    load = 0; shift = 1; d = 1;
    step_check('h7f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
