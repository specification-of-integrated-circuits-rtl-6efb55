// One switching network of the fabric: 2^LOG_PORTS lines, LOG_PORTS
// columns of 2^(LOG_PORTS-1) switch elements, all in operating mode OM.
//
// The columns are joined as an omega network: a perfect shuffle (line x
// goes to line x rotated left by one bit) in front of every column, and
// element e of a column takes lines 2e and 2e+1 and drives lines 2e (port
// 0) and 2e+1 (port 1). A routing-mode network that selects ADR bit 3-sn
// in column sn therefore delivers a packet to output line ADR. Grants run
// the same wires backwards.
//
// Packet time: column c sees pt delayed 4c clocks (the element latency);
// pt_out is the packet time of the output lines (pt + 4*LOG_PORTS). Grant
// time: the last column sees gt, column c sees it 2 clocks later per column
// to its right; gt_out (gt + 2*LOG_PORTS) is the grant time for the
// upstream neighbour. The last column has rrf set, so a test packet's
// routing nibbles are rotated once per network. With SN_REVERSED = 1 the
// sn leads of column c carry LOG_PORTS-1-c (used for the copy network,
// where the first column must copy the packets with the largest fanout).
// The topology, the rrf and sn wiring and the strobe delays are this
// design's; the specification names the networks and their four stages.
module bpn_network
  import bpn_pkg::*;
#(
  parameter int unsigned LOG_PORTS   = 4,
  parameter logic [1:0]  OM          = OM_ROUTE,
  parameter bit          SN_REVERSED = 1'b0,
  parameter int unsigned PKT_NIBBLES = 80,
  localparam int unsigned PORTS      = 1 << LOG_PORTS
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             pt,
  input  logic             gt,
  input  nibble_t          ud [PORTS],
  input  logic [PORTS-1:0] up,
  output logic [PORTS-1:0] ug,
  output nibble_t          dd [PORTS],
  output logic [PORTS-1:0] dp,
  input  logic [PORTS-1:0] dg,
  output logic             pt_out,
  output logic             gt_out,
  output logic             err
);
  localparam int unsigned COLS = LOG_PORTS;
  localparam int unsigned ELEMS = PORTS / 2;

  function automatic int unsigned rotl(int unsigned x);
    return ((x << 1) | (x >> (LOG_PORTS - 1))) & (PORTS - 1);
  endfunction
  function automatic int unsigned rotr(int unsigned x);
    return ((x >> 1) | ((x & 1) << (LOG_PORTS - 1))) & (PORTS - 1);
  endfunction

  // column input lines (after the shuffle) and column output lines
  nibble_t          in_d  [COLS][PORTS];
  logic [PORTS-1:0] in_p  [COLS];
  logic [PORTS-1:0] in_g  [COLS];   // upstream grants of column inputs
  nibble_t          out_d [COLS][PORTS];
  logic [PORTS-1:0] out_p [COLS];
  logic [PORTS-1:0] out_g [COLS];   // downstream grants of column outputs
  logic [COLS-1:0]  col_pt, col_gt;
  logic [COLS-1:0][ELEMS-1:0] el_err;

  for (genvar c = 0; c < COLS; c++) begin : g_col
    bpn_delay #(.N(4 * c)) u_ptd (.clk(clk), .rst(rst), .d(pt), .q(col_pt[c]));
    bpn_delay #(.N(2 * (COLS - 1 - c))) u_gtd (.clk(clk), .rst(rst), .d(gt), .q(col_gt[c]));

    for (genvar x = 0; x < PORTS; x++) begin : g_line
      if (c == 0) begin : g_ext
        assign in_d[c][x] = ud[rotr(x)];
        assign in_p[c][x] = up[rotr(x)];
      end else begin : g_int
        assign in_d[c][x] = out_d[c-1][rotr(x)];
        assign in_p[c][x] = out_p[c-1][rotr(x)];
      end
      if (c == COLS - 1) begin : g_last
        assign out_g[c][x] = dg[x];
      end else begin : g_mid
        assign out_g[c][x] = in_g[c+1][rotl(x)];
      end
    end

    for (genvar e = 0; e < ELEMS; e++) begin : g_el
      nibble_t el_ud [2];
      nibble_t el_dd [2];
      assign el_ud[0] = in_d[c][2*e];
      assign el_ud[1] = in_d[c][2*e+1];
      assign out_d[c][2*e]   = el_dd[0];
      assign out_d[c][2*e+1] = el_dd[1];
      pse #(.PKT_NIBBLES(PKT_NIBBLES)) u_pse (
        .clk (clk),
        .rst (rst),
        .ud  (el_ud),
        .up  (in_p[c][2*e +: 2]),
        .ug  (in_g[c][2*e +: 2]),
        .dd  (el_dd),
        .dp  (out_p[c][2*e +: 2]),
        .dg  (out_g[c][2*e +: 2]),
        .sn  (SN_REVERSED ? 2'(COLS - 1 - c) : 2'(c)),
        .om  (OM),
        .rrf (c == COLS - 1),
        .pt  (col_pt[c]),
        .gt  (col_gt[c]),
        .err (el_err[c][e])
      );
    end
  end

  for (genvar j = 0; j < PORTS; j++) begin : g_io
    assign ug[j] = in_g[0][rotl(j)];
    assign dd[j] = out_d[COLS-1][j];
  end
  assign dp = out_p[COLS-1];

  bpn_delay #(.N(4 * COLS)) u_pto (.clk(clk), .rst(rst), .d(pt), .q(pt_out));
  bpn_delay #(.N(2 * COLS)) u_gto (.clk(clk), .rst(rst), .d(gt), .q(gt_out));

  assign err = |el_err;
endmodule
