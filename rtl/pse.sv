// Packet switch element: the 2x2 building block of the copy, distribution
// and routing networks.
//
// Two input circuits (pse_ic) each buffer one packet; the node control
// circuit (pse_ncc) allocates the two output ports from their requests and
// the downstream grants, and raises the upstream grants. Each IC drives
// both output ports through its enables; the two ICs' contributions are
// ORed per port (an idle IC drives zeros), and fresh odd parity is
// generated on dp. In route mode (om = 1) a packet goes to the port given
// by ADR bit 3-sn; in distribute mode (om = 2) data packets may use either
// port and are spread evenly; in copy mode (om = 3) a broadcast packet with
// FAN > 2^sn is sent to both ports. Test packets are routed on ADR in every
// mode.
//
// Timing: pt marks nibble 0 on ud; nibble k leaves on dd at pt+4+k. gt
// marks valid dg; ug is valid from gt+1 until the next gt. gt must fall at
// least 3 clocks after pt and before the next pt. err is a one-clock pulse
// per parity or overflow error. The specification's two-phase clock is
// represented by the single clock clk; the lead set follows its pin list.
module pse
  import bpn_pkg::*;
#(
  parameter int unsigned PKT_NIBBLES = 80
) (
  input  logic       clk,
  input  logic       rst,
  input  nibble_t    ud [2],
  input  logic [1:0] up,
  output logic [1:0] ug,
  output nibble_t    dd [2],
  output logic [1:0] dp,
  input  logic [1:0] dg,
  input  logic [1:0] sn,
  input  logic [1:0] om,
  input  logic       rrf,
  input  logic       pt,
  input  logic       gt,
  output logic       err
);
  req_e       req_g [2];
  req_e       req_s [2];
  logic [1:0] en [2];
  nibble_t    ic_out [2][2];   // [ic][port]
  logic [1:0] ic_err;
  logic       pt_d1;

  for (genvar i = 0; i < 2; i++) begin : g_ic
    pse_ic #(.PKT_NIBBLES(PKT_NIBBLES)) u_ic (
      .clk   (clk),
      .rst   (rst),
      .pt    (pt),
      .ud    (ud[i]),
      .up    (up[i]),
      .sn    (sn),
      .om    (om),
      .rrf   (rrf),
      .req_g (req_g[i]),
      .req_s (req_s[i]),
      .en    (en[i]),
      .dout  (ic_out[i]),
      .err   (ic_err[i])
    );
  end

  pse_ncc u_ncc (
    .clk   (clk),
    .rst   (rst),
    .gt    (gt),
    .dg    (dg),
    .req_g (req_g),
    .start (pt_d1),
    .req_s (req_s),
    .ug    (ug),
    .en    (en)
  );

  always_ff @(posedge clk)
    if (rst) pt_d1 <= 1'b0;
    else     pt_d1 <= pt;

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      dd[p] = ic_out[0][p] | ic_out[1][p];
      dp[p] = odd_par(dd[p]);
    end
  end

  assign err = |ic_err;

  a_gt_not_at_start: assert property (@(posedge clk) disable iff (rst)
    !(gt && pt_d1));
endmodule
