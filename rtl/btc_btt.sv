// Broadcast translation table (BTT) of the broadcast translation chip.
//
// ENTRIES entries of four nibbles; each nibble is stored together with the
// parity bit it arrived with, so a nibble that was corrupted before it was
// written is caught again when it is read. Writes are one nibble at a time
// (entry waddr, nibble wnib), which is how the table is filled from the
// packet stream. Two asynchronous read ports return whole entries: one
// serves header translation, the other block reads. The port arrangement
// is this design's choice; the size and the stored parity are the
// specification's.
module btc_btt
  import bpn_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned AW      = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [1:0]    wnib,
  input  pnib_t         wdata,
  input  logic [AW-1:0] raddr_a,
  output pnib_t         rdata_a [4],
  input  logic [AW-1:0] raddr_b,
  output pnib_t         rdata_b [4]
);
  pnib_t mem [ENTRIES][4];

  always_ff @(posedge clk)
    if (we) mem[waddr][wnib] <= wdata;

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
endmodule
