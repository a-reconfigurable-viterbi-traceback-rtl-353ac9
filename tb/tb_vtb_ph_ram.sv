// Test of the 2K x 8 path-history RAM: random writes and reads on the
// separate ports against a model array; a read returns the data one
// clock later and holds it while re is low; a read of the address
// written in the same clock returns the old data.
module tb_vtb_ph_ram;
  logic        clk = 0, we = 0, re = 0;
  logic [10:0] wa = '0, ra = '0;
  logic [7:0]  wd = '0, rd;
  logic [7:0]  model [2048];
  logic [7:0]  exp_q;
  int checks = 0, failures = 0;

  vtb_ph_ram dut (.clk(clk), .we_i(we), .waddr_i(wa), .wdata_i(wd), .re_i(re),
                  .raddr_i(ra), .rdata_o(rd));

  always #5 clk = ~clk;

  initial begin
    // fill everything first so every read has a known value
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      we = 1; wa = 11'(i); wd = 8'($urandom); model[i] = wd;
    end
    @(negedge clk);
    we = 0;
    re = 1; ra = 0;
    @(posedge clk); #1; exp_q = model[0];
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      checks++;
      if (rd != exp_q) begin failures++; $display("FAIL: rd %h exp %h", rd, exp_q); end
      we = 1'($urandom);
      re = 1'($urandom);
      wa = 11'($urandom);
      ra = (($urandom % 8) == 0) ? wa : 11'($urandom);
      wd = 8'($urandom);
      @(posedge clk);
      if (re) exp_q = model[ra];       // old data on a same-address write
      if (we) model[wa] = wd;
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
