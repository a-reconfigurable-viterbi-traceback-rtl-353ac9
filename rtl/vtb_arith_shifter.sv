// Ten-bit arithmetic shifter between the down counter and the read address.
//
// Its input is the 6-bit counter value with 4 zero bits above it; it
// shifts left by shift_i (K-5, 0..4) so that the stage number sits just
// above the K-4 word-index bits of the address. Bits 9..4 of the result
// drive the 6 address MSBs, bits 3..0 go to buffers B5-B8. With zero
// shift the output is 0000 C5..C0. Purely combinational; a left shift
// fills zeros, so "arithmetic" and "logical" agree here. Sizes follow the
// published design.
module vtb_arith_shifter
  import vtb_pkg::*;
(
  input  cnt_t               cnt_i,
  input  logic [2:0]         shift_i,
  output logic [SHIFT_W-1:0] out_o
);

  logic [SHIFT_W-1:0] ext;

  always_comb begin
    ext   = {{(SHIFT_W-CNT_W){1'b0}}, cnt_i};
    out_o = ext << shift_i;
  end

endmodule
