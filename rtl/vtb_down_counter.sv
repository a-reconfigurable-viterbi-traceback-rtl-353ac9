// Six-bit down counter with load flag, shared by both reverse processors.
//
// On load_i it takes load_val_i (the last stage of a window, WL-1); on
// dec_i it counts down by one, each step moving the read address back by
// one segment (one trellis stage). zero_o flags a count of 0, the first
// stage of the window. The next value is also given combinationally
// (cnt_next_o) because the read address of the synchronous path-history
// RAM is formed from it, so that one stage is traced per clock.
// Load has priority over decrement. Behaviour follows the published design; the
// zero flag, the next-value output and the reset to 0 are this design's.
module vtb_down_counter
  import vtb_pkg::*;
#(
  parameter int unsigned W = CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_i,
  input  logic [W-1:0] load_val_i,
  input  logic         dec_i,
  output logic [W-1:0] cnt_o,
  output logic [W-1:0] cnt_next_o,
  output logic         zero_o
);

  always_comb begin
    if (load_i)     cnt_next_o = load_val_i;
    else if (dec_i) cnt_next_o = cnt_o - 1'b1;
    else            cnt_next_o = cnt_o;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_o <= '0;
    else        cnt_o <= cnt_next_o;
  end

  assign zero_o = (cnt_o == '0);

endmodule
