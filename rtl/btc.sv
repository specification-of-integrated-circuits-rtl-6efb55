// Broadcast translation chip (BTC).
//
// Sits between the copy network and the distribution network on one line.
// Every packet is passed on with a delay of DELAY (16) clocks: nibble k that
// arrives at st+k leaves on dd at st+16+k. On the way the chip acts on
// broadcast data packets and on its own control packets, using two tables:
// the broadcast translation table (BTT, 64 entries of four nibbles) and the
// broadcast copy index table (BCIT, 32 nibbles).
//
//   CTL = 0, RC = 0011  header nibbles 0-3 are replaced by BTT[BCN]; if the
//                       new ADR equals SRC the packet is not passed on.
//   CTL = 6             BTT entries 16*I[0] .. +15 are copied into
//                       I[1..64] (four nibbles per entry).
//   CTL = 7             I[1..64] are written into those 16 entries; the
//                       packet is not passed on.
//   CTL = 8             j = BCIT[2*I[0] + BCN_L bit 0]; I[4j+1..4j+4] are
//                       written into BTT[BCN]; not passed on.
//   CTL = 9             BCIT[0..31] are copied into I[0..31].
//   CTL = A             I[0..31] are written into the BCIT; not passed on.
// A packet that is not passed on is replaced by an empty slot (all-zero
// nibbles). Writes happen on the input side as the nibbles arrive; reads
// and header replacement happen on the output side. Parity is checked on
// every arriving nibble and on every table read that is used; err is a
// one-clock pulse per error. dp carries fresh odd parity of dd.
//
// Choices of this design where the specification is silent: BCN indexes the
// BTT with its low bits, I[0] selects the block with its low bits, control
// packets act whenever RC is not 0000, and read-BCIT fills the I field (the
// specification's program) rather than packet nibbles 0-31.
module btc
  import bpn_pkg::*;
#(
  parameter int unsigned PKT_NIBBLES  = 80,
  parameter int unsigned DELAY        = 16,
  parameter int unsigned BTT_ENTRIES  = 64,
  parameter int unsigned BCIT_ENTRIES = 32
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    st,
  input  nibble_t ud,
  input  logic    up,
  output nibble_t dd,
  output logic    dp,
  output logic    err
);
  localparam int unsigned BAW  = $clog2(BTT_ENTRIES);
  localparam int unsigned CAW  = $clog2(BCIT_ENTRIES);
  localparam idx_t        LAST = idx_t'(PKT_NIBBLES);

  typedef enum logic [2:0] {
    ACT_PASS, ACT_XLATE, ACT_DROP, ACT_RD_BTT, ACT_RD_BCIT
  } act_e;

  typedef struct packed {
    act_e      act;
    nibble_t   i0;
    pnib_t [3:0] tr;     // translated header nibbles 0..3
  } pkt_act_t;

  typedef struct packed {
    pnib_t n;
    idx_t  idx;
  } dl_t;

  // ---- input side ------------------------------------------------------
  idx_t    cnt_q, in_idx;
  nibble_t rc_q, ctl_q, src_q, i0_q, j_q;
  logic [7:0] bcn_q;

  always_comb begin
    if (st)                in_idx = '0;
    else if (cnt_q < LAST) in_idx = cnt_q + 1'b1;
    else                   in_idx = IDX_IDLE;
  end

  logic in_ctrl;           // non-empty packet: its CTL is acted on
  assign in_ctrl = (rc_q != RC_EMPTY);

  // tables
  logic           btt_we;
  logic [BAW-1:0] btt_waddr, btt_raddr_a, btt_raddr_b;
  logic [1:0]     btt_wnib;
  pnib_t          btt_rd_a [4];
  pnib_t          btt_rd_b [4];
  logic           bcit_we;
  logic [CAW-1:0] bcit_waddr, bcit_raddr_a, bcit_raddr_b;
  pnib_t          bcit_rd_a, bcit_rd_b;

  btc_btt #(.ENTRIES(BTT_ENTRIES), .AW(BAW)) u_btt (
    .clk(clk), .we(btt_we), .waddr(btt_waddr), .wnib(btt_wnib),
    .wdata('{par: up, data: ud}),
    .raddr_a(btt_raddr_a), .rdata_a(btt_rd_a),
    .raddr_b(btt_raddr_b), .rdata_b(btt_rd_b)
  );

  btc_bcit #(.ENTRIES(BCIT_ENTRIES), .AW(CAW)) u_bcit (
    .clk(clk), .we(bcit_we), .waddr(bcit_waddr),
    .wdata('{par: up, data: ud}),
    .raddr_a(bcit_raddr_a), .rdata_a(bcit_rd_a),
    .raddr_b(bcit_raddr_b), .rdata_b(bcit_rd_b)
  );

  function automatic logic pnib_bad(pnib_t n);
    return n.par != odd_par(n.data);
  endfunction

  // Input-side table writes and lookups.
  assign btt_raddr_a  = BAW'(bcn_q);
  assign bcit_raddr_a = CAW'({i0_q, bcn_q[0]});
  nibble_t j_eff;
  idx_t    m_in, upd_lo;
  logic    in_err;
  always_comb begin
    btt_we       = 1'b0;
    btt_waddr    = '0;
    btt_wnib     = '0;
    bcit_we      = 1'b0;
    bcit_waddr   = '0;
    j_eff        = (in_idx == 7'd7) ? bcit_rd_a.data : j_q;
    m_in         = in_idx - 7'd7;          // position within I[1..64]
    upd_lo       = 7'd7 + {1'b0, j_eff, 2'b00};
    in_err       = (in_idx < LAST) && (up != odd_par(ud));
    if (in_ctrl && in_idx < LAST) begin
      unique case (ctl_q)
        CTL_WR_BTT: if (in_idx >= 7'd7 && in_idx <= 7'd70) begin
          btt_we    = 1'b1;
          btt_waddr = BAW'({i0_q, m_in[5:2]});
          btt_wnib  = m_in[1:0];
        end
        CTL_UPD_BTT: begin
          if (in_idx == 7'd7 && pnib_bad(bcit_rd_a)) in_err = 1'b1;
          if (in_idx >= 7'd7 && in_idx >= upd_lo && in_idx < upd_lo + 7'd4) begin
            btt_we    = 1'b1;
            btt_waddr = BAW'(bcn_q);
            btt_wnib  = 2'(in_idx - upd_lo);
          end
        end
        CTL_WR_BCIT: if (in_idx >= H_I0 && in_idx < H_I0 + 7'(BCIT_ENTRIES)) begin
          bcit_we    = 1'b1;
          bcit_waddr = CAW'(in_idx - H_I0);
        end
        default: ;
      endcase
    end
  end

  // Action of the packet, decided once its header (and I[0]) is in.
  pkt_act_t in_act_q, in_act_d;
  logic     xlate_err;
  always_comb begin
    in_act_d     = '{act: ACT_PASS, i0: i0_q, tr: '0};
    xlate_err    = 1'b0;
    if (in_ctrl) begin
      unique case (ctl_q)
        CTL_DATA: if (rc_q == RC_BCAST) begin
          for (int n = 0; n < 4; n++) begin
            in_act_d.tr[n] = btt_rd_a[n];
            if (pnib_bad(btt_rd_a[n])) xlate_err = 1'b1;
          end
          in_act_d.act = (btt_rd_a[1].data == src_q) ? ACT_DROP : ACT_XLATE;
        end
        CTL_RD_BTT:                          in_act_d.act = ACT_RD_BTT;
        CTL_WR_BTT, CTL_UPD_BTT, CTL_WR_BCIT: in_act_d.act = ACT_DROP;
        CTL_RD_BCIT:                         in_act_d.act = ACT_RD_BCIT;
        default: ;
      endcase
    end
  end

  // ---- delay line --------------------------------------------------------
  dl_t dl [DELAY];

  // ---- output side -------------------------------------------------------
  dl_t      o;
  pkt_act_t act;
  pkt_act_t out_act_q;
  idx_t     m_out;
  logic     out_err;
  assign o   = dl[DELAY-1];
  assign act = (o.idx == H_RC) ? in_act_q : out_act_q;

  assign m_out        = o.idx - 7'd7;
  assign btt_raddr_b  = BAW'({act.i0, m_out[5:2]});
  assign bcit_raddr_b = CAW'(o.idx - H_I0);

  always_comb begin
    out_err      = 1'b0;
    dd           = o.n.data;
    if (o.idx >= LAST) dd = '0;
    else begin
      unique case (act.act)
        ACT_DROP:  dd = '0;
        ACT_XLATE: if (o.idx < 7'd4) dd = act.tr[o.idx[1:0]].data;
        ACT_RD_BTT: if (o.idx >= 7'd7 && o.idx <= 7'd70) begin
          dd      = btt_rd_b[m_out[1:0]].data;
          out_err = pnib_bad(btt_rd_b[m_out[1:0]]);
        end
        ACT_RD_BCIT: if (o.idx >= H_I0 && o.idx < H_I0 + 7'(BCIT_ENTRIES)) begin
          dd      = bcit_rd_b.data;
          out_err = pnib_bad(bcit_rd_b);
        end
        default: ;
      endcase
    end
    dp = odd_par(dd);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q     <= IDX_IDLE;
      rc_q      <= RC_EMPTY;
      ctl_q     <= '0; src_q <= '0; i0_q <= '0; j_q <= '0; bcn_q <= '0;
      in_act_q  <= '{act: ACT_PASS, i0: '0, tr: '0};
      out_act_q <= '{act: ACT_PASS, i0: '0, tr: '0};
      for (int d = 0; d < int'(DELAY); d++) dl[d] <= '{n: '0, idx: IDX_IDLE};
      err       <= 1'b0;
    end else begin
      cnt_q <= in_idx;
      unique case (in_idx)
        H_RC:    rc_q        <= ud;
        H_BCH:   bcn_q[7:4]  <= ud;
        H_BCL:   bcn_q[3:0]  <= ud;
        H_CTL:   ctl_q       <= ud;
        H_SRC:   src_q       <= ud;
        H_I0:    i0_q        <= ud;
        7'd7:    j_q         <= j_eff;
        default: ;
      endcase
      if (in_idx == 7'd7) in_act_q <= in_act_d;
      dl[0] <= '{n: '{par: up, data: ud}, idx: in_idx};
      for (int d = 1; d < int'(DELAY); d++) dl[d] <= dl[d-1];
      if (o.idx == H_RC) out_act_q <= in_act_q;
      err <= in_err || out_err || (in_idx == 7'd7 && xlate_err);
    end
  end
endmodule
