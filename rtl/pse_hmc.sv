// Header modification circuit (HMC) of a switch element input circuit.
//
// Takes the nibble stream of one packet (nibble k together with its index
// k) and returns it two clocks later as two streams, one for each output
// port, with two header changes the specification defines:
//  * A broadcast packet (RC = 0011) that is replicated (copy = 1) has its
//    FAN field halved in both copies. If BCN is even, port 0 gets
//    floor((FAN+1)/2) and port 1 floor(FAN/2); if BCN is odd, the other way
//    round. A broadcast sent to one port only keeps its FAN.
//  * A test packet (RC = 0111) passing an element whose rrf lead is set has
//    nibbles 2-4 rotated: nibbles 3 and 4 move to positions 2 and 3, nibble
//    2 moves to position 4 (1-based; indices 1..3 here).
// The two-stage pipeline is this design's way to get the one-nibble look-
// ahead the rotation needs (output nibble 1 is input nibble 2) and to see
// BCN_L (nibble 3) while FAN (nibble 1) is being sent. The stream must be
// contiguous: nibble k+1 follows nibble k on the next clock.
module pse_hmc
  import bpn_pkg::*;
#(
  parameter int unsigned PKT_NIBBLES = 80
) (
  input  logic      clk,
  input  logic      rst,
  input  nibble_t   din,
  input  idx_t      din_idx,
  input  logic      rrf,
  input  logic      copy,
  output nibble_t   dout [2],
  output idx_t      dout_idx
);
  nibble_t h1, h2, n1_q;
  idx_t    h1_idx, h2_idx;
  nibble_t rc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      h1 <= '0; h2 <= '0; n1_q <= '0; rc_q <= RC_EMPTY;
      h1_idx <= IDX_IDLE; h2_idx <= IDX_IDLE;
    end else begin
      h1     <= din;
      h1_idx <= din_idx;
      h2     <= h1;
      h2_idx <= h1_idx;
      if (din_idx == H_RC)  rc_q <= din;
      if (h1_idx == H_ADR)  n1_q <= h1;
    end
  end

  // RC of the packet whose nibble is in h2: captured when it entered, it
  // stays valid while h2 holds nibbles 1..3 (the next packet is 80 away).
  logic    is_test, is_bcast, rot;
  nibble_t fan_big, fan_small;
  logic    bcn_odd;

  always_comb begin
    is_test   = (rc_q == RC_TEST);
    is_bcast  = (rc_q == RC_BCAST);
    rot       = is_test && rrf;
    fan_big   = nibble_t'(({1'b0, h2} + 5'd1) >> 1);
    fan_small = h2 >> 1;
    bcn_odd   = din[0];       // din holds BCN_L while h2 holds FAN
    dout[0]   = h2;
    dout[1]   = h2;
    unique case (h2_idx)
      H_ADR: begin
        if (rot) begin
          dout[0] = h1; dout[1] = h1;
        end else if (is_bcast && copy) begin
          dout[0] = bcn_odd ? fan_small : fan_big;
          dout[1] = bcn_odd ? fan_big   : fan_small;
        end
      end
      H_BCH: if (rot) begin dout[0] = h1;   dout[1] = h1;   end
      H_BCL: if (rot) begin dout[0] = n1_q; dout[1] = n1_q; end
      default: ;
    endcase
  end

  assign dout_idx = (h2_idx < idx_t'(PKT_NIBBLES)) ? h2_idx : IDX_IDLE;
endmodule
