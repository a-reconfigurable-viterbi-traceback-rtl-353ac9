// Test of the shared down counter: loads of random values, runs down to
// zero one per clock with random holds, checks the registered and the
// next value and the zero flag against a count kept here, and that load
// wins over decrement.
module tb_vtb_down_counter;
  import vtb_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, dec = 0;
  cnt_t load_val = '0, cnt, cnt_next;
  logic zero;
  int   checks = 0, failures = 0;
  int   model = 0;

  vtb_down_counter dut (.clk(clk), .rst_n(rst_n), .load_i(load), .load_val_i(load_val),
                        .dec_i(dec), .cnt_o(cnt), .cnt_next_o(cnt_next), .zero_o(zero));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      load     = (($urandom % 40) == 0);
      dec      = (($urandom % 4) != 0);
      load_val = cnt_t'($urandom);
      #1;
      checks++;
      if (int'(cnt_next) != (load ? int'(load_val) : dec ? ((model + 63) % 64) : model)) begin
        failures++; $display("FAIL: next %0d", cnt_next);
      end
      @(posedge clk);
      model = load ? int'(load_val) : dec ? ((model + 63) % 64) : model;
      #1;
      checks++;
      if (int'(cnt) != model || zero != (model == 0)) begin
        failures++; $display("FAIL: cnt %0d model %0d zero %0b", cnt, model, zero);
      end
    end
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
