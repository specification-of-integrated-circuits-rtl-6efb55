// Delay of a one-bit strobe by N clocks (N = 0: wire). Used to derive the
// packet-time and grant-time strobes of each switch column from one
// reference strobe. The shift register resets to all zeros (no strobe in
// flight). With N = 0 clk and rst are unused; the ports stay so that every
// instance has the same connections. This helper is this design's own.
module bpn_delay #(
  parameter int unsigned N = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_sr
    logic [N-1:0] sr;
    always_ff @(posedge clk)
      if (rst) sr <= '0;
      else     sr <= N'({sr, d});
    assign q = sr[N-1];
  end
endmodule
