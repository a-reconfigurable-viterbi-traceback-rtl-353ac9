// Path-history RAM: 2K x 8, synchronous, separate write and read port.
//
// One RAM holds one traceback window of decision bits. Write: on a clock
// edge with we_i, mem[waddr_i] <= wdata_i. Read: on a clock edge with
// re_i, rdata_o <= mem[raddr_i]; rdata_o holds otherwise. A read of the
// address written in the same edge returns the old contents. The size and
// the port arrangement follow the published design (a 2K x 8 macro with separate
// read and write ports); contents are not reset.
module vtb_ph_ram
  import vtb_pkg::*;
#(
  parameter int unsigned DEPTH  = RAM_DEPTH,
  parameter int unsigned DATA_W = NUM_ACS,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we_i,
  input  logic [AW-1:0]     waddr_i,
  input  logic [DATA_W-1:0] wdata_i,
  input  logic              re_i,
  input  logic [AW-1:0]     raddr_i,
  output logic [DATA_W-1:0] rdata_o
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    if (re_i) rdata_o <= mem[raddr_i];
  end

endmodule
