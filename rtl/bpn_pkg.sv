// Shared types and helpers of the broadcast packet switch chips.
//
// A packet is a sequence of 80 four-bit nibbles. The first six form the
// header: RC (routing control), FAN/ADR, BCN/LCN high, BCN/LCN low, CTL
// (control field) and SRC (source port); the rest is the information field
// I. Every nibble travels with an odd-parity bit. The codes below (RC values,
// CTL values, operating modes and the 3-bit port-request codes used between
// a switch element's input circuits and its node control circuit) are the
// ones the chip specification defines. The nibble index type, the 5-bit
// nibble+parity struct and the request classification function are this
// design's own packaging of those rules.
package bpn_pkg;

  localparam int unsigned PKT_LEN     = 80;  // nibbles per packet
  localparam int unsigned HDR_NIBBLES = 6;   // header nibbles
  localparam int unsigned IDX_W       = 7;   // width of a nibble index
  localparam logic [IDX_W-1:0] IDX_IDLE = '1; // "no packet nibble here"

  typedef logic [3:0]       nibble_t;
  typedef logic [IDX_W-1:0] idx_t;

  // Nibble with its parity bit, as carried on the 5-bit internal paths.
  typedef struct packed {
    logic    par;
    nibble_t data;
  } pnib_t;

  // Header nibble positions.
  localparam idx_t H_RC  = 7'd0;
  localparam idx_t H_ADR = 7'd1;  // FAN or ADR
  localparam idx_t H_BCH = 7'd2;  // BCN_H or LCN_H
  localparam idx_t H_BCL = 7'd3;  // BCN_L or LCN_L
  localparam idx_t H_CTL = 7'd4;
  localparam idx_t H_SRC = 7'd5;
  localparam idx_t H_I0  = 7'd6;  // first nibble of the information field

  // Routing control values.
  localparam nibble_t RC_EMPTY = 4'b0000;
  localparam nibble_t RC_DATA  = 4'b0001;
  localparam nibble_t RC_BCAST = 4'b0011;
  localparam nibble_t RC_TEST  = 4'b0111;

  // Control field values.
  typedef enum logic [3:0] {
    CTL_DATA     = 4'h0,
    CTL_RD_LCXT  = 4'h1,
    CTL_WR_LCXT  = 4'h2,
    CTL_RD_LCXB  = 4'h3,
    CTL_WR_LCXB  = 4'h4,
    CTL_SW_TEST  = 4'h5,
    CTL_RD_BTT   = 4'h6,
    CTL_WR_BTT   = 4'h7,
    CTL_UPD_BTT  = 4'h8,
    CTL_RD_BCIT  = 4'h9,
    CTL_WR_BCIT  = 4'hA
  } ctl_e;

  // Switch element operating modes (om leads).
  localparam logic [1:0] OM_ROUTE = 2'd1;
  localparam logic [1:0] OM_DIST  = 2'd2;
  localparam logic [1:0] OM_COPY  = 2'd3;

  // Port request codes from an input circuit to the node control circuit.
  typedef enum logic [2:0] {
    REQ_NONE   = 3'b000,
    REQ_EITHER = 3'b100,
    REQ_P0     = 3'b101,
    REQ_P1     = 3'b110,
    REQ_BOTH   = 3'b111
  } req_e;

  // Odd parity bit for a nibble: data plus parity has an odd number of ones.
  function automatic logic odd_par(nibble_t d);
    return ~^d;
  endfunction

  function automatic pnib_t mk_pnib(nibble_t d);
    return '{par: ~^d, data: d};
  endfunction

  // Port request for a packet with routing control rc and second nibble a
  // (ADR or FAN) in a switch element with stage number sn and mode om.
  function automatic req_e classify(nibble_t rc, nibble_t a, logic [1:0] sn,
                                    logic [1:0] om);
    logic bit_sel;
    logic [4:0] fan_limit;
    bit_sel   = a[2'd3 - sn];       // sn = 00 selects the high-order bit
    fan_limit = 5'd1 << sn;         // 2^SN
    if (rc == RC_EMPTY) return REQ_NONE;
    if (om == OM_DIST || om == OM_COPY) begin
      if (rc == RC_TEST) return bit_sel ? REQ_P1 : REQ_P0;
      if (om == OM_COPY && rc == RC_BCAST && {1'b0, a} > fan_limit)
        return REQ_BOTH;
      return REQ_EITHER;
    end
    return bit_sel ? REQ_P1 : REQ_P0;   // route mode (and undefined om = 0)
  endfunction

endpackage
