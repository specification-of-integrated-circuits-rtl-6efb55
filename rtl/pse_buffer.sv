// One-packet buffer of a switch element input circuit.
//
// Holds the 80 nibbles of one packet, each with its parity bit (the 5-bit
// path of the node structure). One write port and one asynchronous read
// port; a read and a write of the same address in the same clock return the
// old contents, so a stored packet can be sent out while the next packet is
// written into the same locations behind it. That same-index read/write
// arrangement is this design's choice; the specification only asks for a
// buffer "large enough to hold one complete packet".
module pse_buffer #(
  parameter int unsigned DEPTH = 80,
  parameter int unsigned WIDTH = 5,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;

  assign rdata = (raddr < AW'(DEPTH)) ? mem[raddr] : '0;
endmodule
