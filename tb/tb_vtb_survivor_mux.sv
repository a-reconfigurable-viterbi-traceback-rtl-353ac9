// Test of M1: random words, every select, against word >> sel & 1.
module tb_vtb_survivor_mux;
  logic [7:0] w;
  logic [2:0] sel;
  logic       b;
  int checks = 0, failures = 0;

  vtb_survivor_mux dut (.word_i(w), .sel_i(sel), .bit_o(b));

  initial begin
    for (int t = 0; t < 200; t++)
      for (int s = 0; s < 8; s++) begin
        w = 8'($urandom); sel = 3'(s);
        #1;
        checks++;
        if (b != (((w >> s) & 8'd1) != 0)) begin failures++; $display("FAIL: %h[%0d]", w, s); end
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
