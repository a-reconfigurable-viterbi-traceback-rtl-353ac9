// Survivor-bit multiplexer M1.
//
// A path-history word holds the decisions of eight consecutive states
// (bit j belongs to the state whose three LSBs are j). M1 picks the bit
// of the current state, selected by the state's LSBs D3 D2 D1. The
// published design names M1 and its select; the bit-to-state order inside the
// word is this design's choice and must match how the ACS decisions are
// written. Combinational.
module vtb_survivor_mux
  import vtb_pkg::*;
(
  input  logic [NUM_ACS-1:0] word_i,
  input  logic [SEL_W-1:0]   sel_i,
  output logic               bit_o
);

  assign bit_o = word_i[sel_i];

endmodule
