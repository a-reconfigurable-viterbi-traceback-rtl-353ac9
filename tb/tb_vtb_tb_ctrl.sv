// Test of the traceback pass scheduler with the real down counter. Six
// windows are announced one by one, then a flush; later a one-window
// block and an empty block are flushed. For every pass the test checks at
// its load clock which processors run, on which RAM (window mod 4), and
// B1's window and start state: B2 on the new window w from b2_start,
// B1 on window w-2 from the state B2 ended in on the previous pass; flush
// pass A on window n-2 from that state, pass B on window n-1 from 0. It
// also checks that a pass has exactly WL steps, counter WL-1 down to 0,
// and pass_done follows the last step by one clock.
module tb_vtb_tb_ctrl;
  import vtb_pkg::*;

  localparam int WL = 12;

  logic        clk = 0, rst_n = 0, clear = 0, win_done = 0, flush = 0;
  logic [15:0] done_win = '0, win_cnt = '0, b1_win;
  state_t      b2_start_in = 8'h5a, b2_final = '0, b1_start, b2_start;
  logic        zero, load, step, cnt_dec, ram_re, b1_en, b2_en, pass_done, flush_done, busy;
  logic [1:0]  b1_ram, b2_ram;
  cnt_t        cnt, cnt_next;
  int checks = 0, failures = 0;

  vtb_down_counter u_cnt (.clk(clk), .rst_n(rst_n), .load_i(load), .load_val_i(cnt_t'(WL - 1)),
                          .dec_i(cnt_dec), .cnt_o(cnt), .cnt_next_o(cnt_next), .zero_o(zero));

  vtb_tb_ctrl dut (.clk(clk), .rst_n(rst_n), .clear_i(clear), .win_done_i(win_done),
                   .done_win_i(done_win), .win_cnt_i(win_cnt), .flush_i(flush),
                   .b2_start_i(b2_start_in), .b2_final_i(b2_final), .cnt_zero_i(zero),
                   .load_o(load), .step_o(step), .cnt_dec_o(cnt_dec), .ram_re_o(ram_re),
                   .b1_en_o(b1_en), .b2_en_o(b2_en), .b1_ram_o(b1_ram), .b2_ram_o(b2_ram),
                   .b1_start_o(b1_start), .b2_start_o(b2_start), .b1_win_o(b1_win),
                   .pass_done_o(pass_done), .flush_done_o(flush_done), .busy_o(busy));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Waits for the load clock of the next pass, checks its set-up, runs
  // it, and returns B2's final state.
  task automatic run_pass(bit e1, bit e2, int w1, int w2, state_t s1, output state_t fin);
    int steps = 0;
    @(negedge clk iff load);
    check(b1_en == e1 && b2_en == e2, "processor enables");
    if (e1) check(int'(b1_win) == w1 && int'(b1_ram) == w1 % 4 && b1_start == s1, "B1 window/start");
    if (e2) check(int'(b2_ram) == w2 % 4 && b2_start == b2_start_in, "B2 window/start");
    check(ram_re, "read at load");
    @(negedge clk);
    while (step) begin
      check(int'(cnt) == WL - 1 - steps, "counter");
      b2_final = state_t'($urandom);
      fin = b2_final;
      steps++;
      @(negedge clk);
    end
    check(steps == WL, "WL steps");
    check(pass_done, "pass_done");
  endtask

  initial begin
    automatic state_t kept = '0, fin;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 6; w++) begin
      repeat (3) @(negedge clk);
      win_done = 1; done_win = 16'(w); win_cnt = 16'(w + 1);
      @(negedge clk);
      win_done = 0;
      run_pass(w >= 2, 1, w - 2, w, kept, fin);
      kept = fin;
    end
    // flush: window 4 from the kept state, then window 5 from state 0
    @(negedge clk);
    flush = 1;
    @(negedge clk);
    flush = 0;
    run_pass(1, 0, 4, 0, kept, fin);
    run_pass(1, 0, 5, 0, '0, fin);
    check(flush_done, "flush_done");
    @(negedge clk);
    check(!busy, "idle after flush");
    // a one-window block: only pass B
    clear = 1;
    @(negedge clk);
    clear = 0;
    win_done = 1; done_win = 0; win_cnt = 1;
    @(negedge clk);
    win_done = 0;
    run_pass(0, 1, 0, 0, '0, fin);
    flush = 1;
    @(negedge clk);
    flush = 0;
    run_pass(1, 0, 0, 0, '0, fin);
    check(flush_done, "flush_done one window");
    // an empty block: done at once
    @(negedge clk);
    win_cnt = 0; flush = 1;
    @(negedge clk);
    flush = 0;
    check(flush_done && !busy, "flush of empty block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
