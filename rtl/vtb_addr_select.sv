// Read-address selection of one reverse processor (buffers B1-B8).
//
// The 11-bit path-history address is {stage, word}, where the word index
// is the state above its 3 LSBs (those 3 bits select the bit within the
// word through M1 instead). Bit 0 comes directly from state bit D4; bits
// 4..1 come either from state bits D8..D5 (buffers B1..B4) or from the
// shifter's bits 3..0 (buffers B5..B8); bits 10..5 are the shifter's bits
// 9..4. For K=9 this gives C5..C0 U4..U0, for K=6 000 C5..C0 U1 U0.
// The tri-state buffers of the original are written here as a multiplexer
// per bit, as on-chip tri-state nets are not used in synthesizable logic;
// the two enables of a bit are exclusive, so both forms behave alike.
// Combinational.
module vtb_addr_select
  import vtb_pkg::*;
(
  input  state_t             state_i,    // D8..D1 = state_i[7:0]
  input  logic [SHIFT_W-1:0] shifter_i,
  input  logic [3:0]         buf_state_i, // [3]=B1 (bit 4) .. [0]=B4 (bit 1)
  input  logic [3:0]         buf_shift_i, // [3]=B5 (bit 4) .. [0]=B8 (bit 1)
  output addr_t              addr_o
);

  always_comb begin
    addr_o[ADDR_W-1:SEG_LSB_W] = shifter_i[SHIFT_W-1:4];
    addr_o[0]                  = state_i[SEL_W];
    for (int i = 1; i <= 4; i++) begin
      unique case ({buf_state_i[i-1], buf_shift_i[i-1]})
        2'b10:   addr_o[i] = state_i[SEL_W + i];
        2'b01:   addr_o[i] = shifter_i[i-1];
        default: addr_o[i] = 1'b0;   // both off (floating) or both on: not used
      endcase
    end
  end

endmodule
