// Broadcast copy index table (BCIT) of the broadcast translation chip.
//
// ENTRIES nibbles, each stored with the parity bit it arrived with and
// checked by the reader. One write port; two asynchronous read ports, one
// for the copy-index lookup of an update-BTT packet on the input side and
// one for a read-BCIT packet on the output side (a port arrangement chosen
// here; size and stored parity follow the specification).
module btc_bcit
  import bpn_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned AW      = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  pnib_t         wdata,
  input  logic [AW-1:0] raddr_a,
  output pnib_t         rdata_a,
  input  logic [AW-1:0] raddr_b,
  output pnib_t         rdata_b
);
  pnib_t mem [ENTRIES];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
endmodule
