// Reverse (traceback) processor: state register, read-address selection
// and survivor multiplexer M1.
//
// Both processors of the design, B1 (decoding) and B2 (dummy), are
// instances of this module; they share the down counter and the shifter,
// whose output arrives on shifter_i, and each reads its own path-history
// RAM. Timing, one trellis stage per clock:
//   load cycle : load_i=1, the start state is taken; raddr_o already
//                addresses the word of the start state (ram_re_o=1).
//   step cycle : step_i=1, rdata_i holds the word of the current state
//                S_L; M1 picks the survivor bit D with S_L[2:0];
//                dec_bit_o is the decoded bit of stage L (S_L's MSB);
//                the state becomes [S_L << 1, D] at the clock edge, and
//                raddr_o addresses that new state's word in the stage below.
// The address is formed from the register's next value (not its output)
// so that the synchronous RAM keeps up with one step per clock; this is
// this design's choice, the rest follows the published block diagram.
module vtb_reverse_proc
  import vtb_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  k_t                 k_i,
  input  logic [3:0]         buf_state_i,
  input  logic [3:0]         buf_shift_i,
  input  logic [SHIFT_W-1:0] shifter_i,   // shifted next counter value
  input  logic               load_i,
  input  state_t             start_i,
  input  logic               step_i,
  input  logic [NUM_ACS-1:0] rdata_i,
  output addr_t              raddr_o,
  output state_t             state_o,
  output state_t             state_next_o,
  output logic               dec_bit_o
);

  logic d;

  vtb_survivor_mux u_m1 (
    .word_i (rdata_i),
    .sel_i  (state_o[SEL_W-1:0]),
    .bit_o  (d)
  );

  vtb_state_reg u_state (
    .clk       (clk),
    .rst_n     (rst_n),
    .k_i       (k_i),
    .load_i    (load_i),
    .load_val_i(start_i),
    .shift_i   (step_i),
    .d_i       (d),
    .state_o   (state_o),
    .next_o    (state_next_o),
    .dec_bit_o (dec_bit_o)
  );

  vtb_addr_select u_addr (
    .state_i    (state_next_o),
    .shifter_i  (shifter_i),
    .buf_state_i(buf_state_i),
    .buf_shift_i(buf_shift_i),
    .addr_o     (raddr_o)
  );

endmodule
