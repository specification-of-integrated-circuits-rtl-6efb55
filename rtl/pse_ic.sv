// Input circuit (IC) of the packet switch element.
//
// One IC serves one upstream link. It checks odd parity on every arriving
// nibble, passes the nibbles through a shift register (SR), and then either
// cuts the packet straight through or keeps it in its one-packet buffer
// until a later packet cycle. A multiplexer picks the SR (cut-through) or
// the buffer, the header modification circuit edits the header, and two
// AND stages gate the result onto the element's output ports 0 and 1 with
// the enables from the node control circuit (NCC).
//
// Timing, relative to the clock where pt is high and nibble 0 is on ud:
//   clock 1    req_s: port request of the arriving packet (RC from the SR,
//              ADR/FAN still on ud); none if the buffer is occupied.
//   clock 2    nibble 0 at the multiplexer. The NCC enable (valid from
//              clock 2) decides: a buffered packet that got ports is read
//              out of the buffer while the new packet is written behind it;
//              otherwise a new packet with ports is cut through, and a new
//              packet without ports is stored.
//   clock 4+k  nibble k on dout (the specification's "exactly four clock
//              cycles after" pt).
// req_g is the request of the buffered packet, offered in the grant phase.
// err pulses for an input parity error, or for a non-empty packet that
// arrives while the buffer is still occupied (the upstream sent without a
// grant); that packet is dropped. The stage split (2 SR + 2 HMC clocks) and
// the overflow check are this design's own choices.
module pse_ic
  import bpn_pkg::*;
#(
  parameter int unsigned PKT_NIBBLES = 80
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       pt,
  input  nibble_t    ud,
  input  logic       up,
  input  logic [1:0] sn,
  input  logic [1:0] om,
  input  logic       rrf,
  output req_e       req_g,
  output req_e       req_s,
  input  logic [1:0] en,
  output nibble_t    dout [2],
  output logic       err
);
  localparam idx_t LAST = idx_t'(PKT_NIBBLES);

  // ---- arrival index and parity -------------------------------------
  idx_t cnt_q, in_idx;
  always_comb begin
    if (pt)                 in_idx = '0;
    else if (cnt_q < LAST)  in_idx = cnt_q + 1'b1;
    else                    in_idx = IDX_IDLE;
  end

  // ---- shift register ------------------------------------------------
  pnib_t s1, s2;
  idx_t  s1_idx, s2_idx;

  // ---- buffer state --------------------------------------------------
  logic  full_q;        // buffer holds a packet for a later cycle
  req_e  req_buf_q;     // its port request
  logic  sel_buf_q;     // multiplexer: 1 = buffer
  logic  store_q;       // write the arriving packet into the buffer
  logic [1:0] oen_q;    // enables of the packet on dout

  req_e  req_new;
  req_e  req_pend_q;    // request of the packet in s2
  assign req_new = classify(s1.data, ud, sn, om);
  assign req_s   = (s1_idx == H_RC && !full_q) ? req_new : REQ_NONE;
  assign req_g   = full_q ? req_buf_q : REQ_NONE;

  // Decision at the start of the multiplexer stream (s2 holds nibble 0).
  logic  mux_start, new_pkt, old_leaves, cut, store_now, ovf, sel_now;
  always_comb begin
    mux_start  = (s2_idx == H_RC);
    new_pkt    = (s2.data != RC_EMPTY);
    old_leaves = full_q && (en != 2'b00);
    cut        = !full_q && (en != 2'b00);
    sel_now    = full_q;
    store_now  = new_pkt && (full_q ? old_leaves : !cut);
    ovf        = mux_start && new_pkt && full_q && !old_leaves;
  end

  logic  sel_eff, store_eff;
  assign sel_eff   = mux_start ? sel_now   : sel_buf_q;
  assign store_eff = mux_start ? store_now : store_q;

  pnib_t buf_rd;
  pse_buffer #(.DEPTH(PKT_NIBBLES), .WIDTH(5), .AW(IDX_W)) u_buf (
    .clk   (clk),
    .we    (store_eff && s2_idx < LAST),
    .waddr (s2_idx),
    .wdata (s2),
    .raddr (s2_idx),
    .rdata (buf_rd)
  );

  nibble_t mux_data;
  idx_t    mux_idx;
  assign mux_data = sel_eff ? buf_rd.data : s2.data;
  assign mux_idx  = (s2_idx < LAST) ? s2_idx : IDX_IDLE;

  // The enables stay stable from clock 2 to the next packet's clock 1, so
  // they are valid while the HMC edits the header (clocks 5..7).
  nibble_t hmc_out [2];
  idx_t    hmc_idx;
  pse_hmc #(.PKT_NIBBLES(PKT_NIBBLES)) u_hmc (
    .clk      (clk),
    .rst      (rst),
    .din      (mux_data),
    .din_idx  (mux_idx),
    .rrf      (rrf),
    .copy     (en == 2'b11),
    .dout     (hmc_out),
    .dout_idx (hmc_idx)
  );

  logic [1:0] oen;
  assign oen = (hmc_idx == H_RC) ? en : oen_q;
  always_comb
    for (int p = 0; p < 2; p++)
      dout[p] = (oen[p] && hmc_idx < LAST) ? hmc_out[p] : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q     <= IDX_IDLE;
      s1        <= '0; s2 <= '0;
      s1_idx    <= IDX_IDLE; s2_idx <= IDX_IDLE;
      full_q    <= 1'b0;
      req_buf_q <= REQ_NONE;
      sel_buf_q <= 1'b0;
      store_q   <= 1'b0;
      oen_q     <= '0;
      err       <= 1'b0;
    end else begin
      cnt_q  <= in_idx;
      s1     <= '{par: up, data: ud};
      s1_idx <= in_idx;
      s2     <= s1;
      s2_idx <= s1_idx;
      // request of the arriving packet, kept with it if it is stored
      if (mux_start) begin
        sel_buf_q <= sel_now;
        store_q   <= store_now;
        if (!full_q || old_leaves) begin
          full_q <= store_now;
          if (store_now) req_buf_q <= req_pend_q;
        end
      end
      oen_q <= oen;
      err   <= (in_idx < LAST && up != odd_par(ud)) || ovf;
    end
  end

  // request of the packet now in s2, computed one clock earlier
  always_ff @(posedge clk)
    if (rst)                  req_pend_q <= REQ_NONE;
    else if (s1_idx == H_RC)  req_pend_q <= req_new;

endmodule
