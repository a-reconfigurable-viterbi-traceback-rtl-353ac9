// Test of the 10-bit shifter: every counter value with every shift 0..4
// against multiplication by 2^shift; the zero-shift output must be
// 0000 C5..C0.
module tb_vtb_arith_shifter;
  import vtb_pkg::*;

  cnt_t       c;
  logic [2:0] sh;
  logic [9:0] y;
  int checks = 0, failures = 0;

  vtb_arith_shifter dut (.cnt_i(c), .shift_i(sh), .out_o(y));

  initial begin
    for (int s = 0; s <= 4; s++)
      for (int v = 0; v < 64; v++) begin
        c = cnt_t'(v); sh = 3'(s);
        #1;
        checks++;
        if (int'(y) != v * (1 << s)) begin
          failures++; $display("FAIL: %0d << %0d = %0d", v, s, y);
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
