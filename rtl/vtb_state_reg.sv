// Traceback state register D1..D8.
//
// Holds the trellis state S_L (K-1 bits, D1 = LSB). On load_i it takes a
// start state; on shift_i it steps one stage back,
//     S_(L-1) = [S_L << 1, D],
// shifting left and putting the survivor bit D into the vacated LSB. Bits
// at and above K-1 are cleared, so the register works as a (K-1)-bit
// register for every K from 5 to 9. dec_bit_o is the decoded bit of
// stage L, the state's MSB S_L[K-2]. next_o is the value the register
// takes at the coming clock edge; the read address is formed from it so
// that the synchronous RAM returns the word of the new state one clock
// later. Shift rule and decoded bit follow the published design; the masking that
// shortens the chain for smaller K is this design's way of doing it.
module vtb_state_reg
  import vtb_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  k_t     k_i,
  input  logic   load_i,
  input  state_t load_val_i,
  input  logic   shift_i,
  input  logic   d_i,
  output state_t state_o,
  output state_t next_o,
  output logic   dec_bit_o
);

  state_t mask;

  always_comb begin
    mask = state_t'((1 << (k_i - 4'd1)) - 1);
    if (load_i)       next_o = load_val_i & mask;
    else if (shift_i) next_o = {state_o[STATE_W-2:0], d_i} & mask;
    else              next_o = state_o;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_o <= '0;
    else        state_o <= next_o;
  end

  assign dec_bit_o = state_o[3'(k_i - 4'd2)];

endmodule
