// Broadcast packet switch fabric: copy network, broadcast translation
// chips, distribution network and routing network.
//
// A packet entering on input line j is handled in four steps:
//  1. The copy network (switch elements in copy mode) replicates a
//     broadcast packet until there is one copy per requested destination;
//     the FAN field is split between the copies at every replication, so
//     a packet with FAN = F leaves on F distinct lines. Point-to-point
//     packets pass through on any free path.
//  2. On each of the lines a broadcast translation chip (btc) replaces the
//     copy's header by the entry of its broadcast translation table for the
//     packet's broadcast channel, giving it a destination address and an
//     outgoing logical channel number, and drops it if that address is the
//     packet's own source. It also executes table read/write packets.
//  3. The distribution network spreads the packets evenly over its lines.
//  4. The routing network delivers each packet to output line ADR.
// Test packets carry three routing nibbles, one per network (the copy
// network's with its bits reversed, since that network's sn leads count
// down), and are rotated back to their original order on the way.
//
// Timing: frame marks nibble 0 of the packet cycle on the input lines;
// in_ug, sampled before frame, says whether line j may send in it. A
// packet cycle is PKT_PERIOD clocks (the specification allows any period
// of 80 or more; the forward latency of 4 clocks per column and 16 in the
// BTC, against the backward grant chain of 2 clocks per column, needs
// about 90). Packets leave on out_dd at out_frame (frame + 64). out_dg are
// the grants of the receivers on the output lines, sampled once per cycle.
// The grant time of the last routing column is GT_OFFSET clocks after
// frame. The BTC has no grant leads, so the copy network takes its
// downstream grants from the distribution network directly. err ORs the
// error leads of all chips. The network order, timing generator and these
// offsets are this design's reading of the system around the two chips.
module bpn_fabric
  import bpn_pkg::*;
#(
  parameter int unsigned LOG_PORTS  = 4,
  parameter int unsigned PKT_PERIOD = 96,
  parameter int unsigned GT_OFFSET  = 65,
  localparam int unsigned PORTS     = 1 << LOG_PORTS
) (
  input  logic             clk,
  input  logic             rst,
  output logic             frame,
  input  nibble_t          in_ud [PORTS],
  input  logic [PORTS-1:0] in_up,
  output logic [PORTS-1:0] in_ug,
  output logic             out_frame,
  output nibble_t          out_dd [PORTS],
  output logic [PORTS-1:0] out_dp,
  input  logic [PORTS-1:0] out_dg,
  output logic             err
);
  localparam int unsigned BTC_DELAY = 16;
  localparam int unsigned CW = $clog2(PKT_PERIOD);

  // ---- packet-cycle and grant-time generator ---------------------------
  logic [CW-1:0] cyc_q;
  logic          gt_route;
  always_ff @(posedge clk)
    if (rst || cyc_q == CW'(PKT_PERIOD - 1)) cyc_q <= '0;
    else                                      cyc_q <= cyc_q + 1'b1;
  assign frame    = (cyc_q == '0) && !rst;
  assign gt_route = (cyc_q == CW'(GT_OFFSET)) && !rst;

  // ---- networks and BTCs -------------------------------------------------
  nibble_t          c_dd [PORTS];
  logic [PORTS-1:0] c_dp, d_ug, r_ug;
  nibble_t          b_dd [PORTS];
  logic [PORTS-1:0] b_dp, b_err;
  nibble_t          d_dd [PORTS];
  logic [PORTS-1:0] d_dp;
  logic c_pt_out, c_gt_out, d_pt_in, d_pt_out, d_gt_out, r_gt_out;
  logic c_err, d_err, r_err;

  bpn_network #(.LOG_PORTS(LOG_PORTS), .OM(OM_COPY), .SN_REVERSED(1'b1)) u_copy (
    .clk(clk), .rst(rst), .pt(frame), .gt(d_gt_out),
    .ud(in_ud), .up(in_up), .ug(in_ug),
    .dd(c_dd), .dp(c_dp), .dg(d_ug),
    .pt_out(c_pt_out), .gt_out(c_gt_out), .err(c_err)
  );

  for (genvar j = 0; j < PORTS; j++) begin : g_btc
    btc #(.DELAY(BTC_DELAY)) u_btc (
      .clk(clk), .rst(rst), .st(c_pt_out),
      .ud(c_dd[j]), .up(c_dp[j]),
      .dd(b_dd[j]), .dp(b_dp[j]), .err(b_err[j])
    );
  end

  bpn_delay #(.N(BTC_DELAY)) u_btc_pt (.clk(clk), .rst(rst), .d(c_pt_out), .q(d_pt_in));

  bpn_network #(.LOG_PORTS(LOG_PORTS), .OM(OM_DIST), .SN_REVERSED(1'b0)) u_dist (
    .clk(clk), .rst(rst), .pt(d_pt_in), .gt(r_gt_out),
    .ud(b_dd), .up(b_dp), .ug(d_ug),
    .dd(d_dd), .dp(d_dp), .dg(r_ug),
    .pt_out(d_pt_out), .gt_out(d_gt_out), .err(d_err)
  );

  bpn_network #(.LOG_PORTS(LOG_PORTS), .OM(OM_ROUTE), .SN_REVERSED(1'b0)) u_route (
    .clk(clk), .rst(rst), .pt(d_pt_out), .gt(gt_route),
    .ud(d_dd), .up(d_dp), .ug(r_ug),
    .dd(out_dd), .dp(out_dp), .dg(out_dg),
    .pt_out(out_frame), .gt_out(r_gt_out), .err(r_err)
  );

  assign err = c_err | (|b_err) | d_err | r_err;

  // The copy network's own grant output chain ends at the input lines.
  logic unused_gt;
  assign unused_gt = c_gt_out;
endmodule
