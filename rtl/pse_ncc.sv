// Node control circuit (NCC) of the packet switch element.
//
// Allocates the element's two output ports to its two input circuits (ICs).
// Each IC presents a 3-bit request: 100 either port, 101 port 0, 110 port 1,
// 111 both ports (a broadcast copy), 0xx nothing. The result per IC is a
// 2-bit enable, bit 0 for port 0 and bit 1 for port 1.
//
// Allocation runs in two phases, as the specification defines:
//  * grant phase, on gt: the ports granted by the downstream neighbours (dg)
//    are offered to the requests of packets already waiting in the buffers.
//    The upstream grant of an IC is raised when its buffer will be free in
//    the next packet cycle (no waiting packet, or the waiting packet got its
//    ports). ug is registered and valid from gt+1 until the next gt.
//  * start phase, on start (one clock after pt): the ports still free are
//    offered to the requests of the packets now arriving. The enables of
//    both phases together are presented on en from start+1 until the next
//    start, and the last-favoured input/output state is updated.
//
// Priority follows the specification: a broadcast (111) beats a routed
// packet (101/110), which beats an "either" packet (100). Between equal
// requests the input that most recently sent while the other was idle
// ("in") waits. A lone "either" request with both ports free goes to the
// port opposite "out", the port that was last busy while the other was
// idle; two "either" requests with both ports free split them, the favoured
// input taking port 0. The allocation is written as a greedy pass (first
// the higher-priority input, then the other on what is left); this equals
// the specification's port-enable equations where those are consistent and
// applies its priority sentences where they are not. As in those equations,
// a request blocks the ports it claims from a weaker request even when it
// cannot be served itself.
module pse_ncc
  import bpn_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            gt,
  input  logic [1:0]      dg,
  input  req_e            req_g [2],
  input  logic            start,
  input  req_e            req_s [2],
  output logic [1:0]      ug,
  output logic [1:0]      en [2]
);
  logic [1:0] en_q [2];     // grant-phase allocation for the next cycle
  logic [1:0] avail_q;      // ports left after the grant phase
  logic       in_q, out_q;  // last favoured input and output

  function automatic logic [1:0] prio(req_e r);
    unique case (r)
      REQ_BOTH:        return 2'd3;
      REQ_P0, REQ_P1:  return 2'd2;
      REQ_EITHER:      return 2'd1;
      default:         return 2'd0;
    endcase
  endfunction

  // Ports for one request from the available set a.
  function automatic logic [1:0] serve(req_e r, logic [1:0] a, logic out_f);
    unique case (r)
      REQ_BOTH:   return (a == 2'b11) ? 2'b11 : 2'b00;
      REQ_P0:     return {1'b0, a[0]};
      REQ_P1:     return {a[1], 1'b0};
      REQ_EITHER: begin
        if (a == 2'b11) return out_f ? 2'b01 : 2'b10;
        return a;
      end
      default:    return 2'b00;
    endcase
  endfunction

  // Ports a request claims against a lower-priority one, whether or not it
  // can be served (the specification's equations block the weaker request
  // even then).
  function automatic logic [1:0] claim(req_e r);
    unique case (r)
      REQ_BOTH: return 2'b11;
      REQ_P0:   return 2'b01;
      REQ_P1:   return 2'b10;
      default:  return 2'b00;
    endcase
  endfunction

  typedef struct packed {
    logic [1:0] e0;
    logic [1:0] e1;
  } alloc_t;

  function automatic alloc_t allocate(req_e r0, req_e r1, logic [1:0] a,
                                      logic in_f, logic out_f);
    alloc_t res;
    logic   first1;     // serve IC1 first
    logic [1:0] p0, p1;
    p0 = prio(r0);
    p1 = prio(r1);
    if (p0 != p1) first1 = (p1 > p0);
    else          first1 = ~in_f;   // in = 1: IC1 waits, IC0 first
    if (r0 == REQ_EITHER && r1 == REQ_EITHER && a == 2'b11) begin
      res.e0 = first1 ? 2'b10 : 2'b01;
      res.e1 = first1 ? 2'b01 : 2'b10;
    end else if (first1) begin
      res.e1 = serve(r1, a, out_f);
      res.e0 = serve(r0, a & ~(res.e1 | claim(r1)), out_f);
    end else begin
      res.e0 = serve(r0, a, out_f);
      res.e1 = serve(r1, a & ~(res.e0 | claim(r0)), out_f);
    end
    return res;
  endfunction

  alloc_t g_alloc, s_alloc;
  logic [1:0] tot0, tot1;
  logic b0, b1, q0, q1;

  always_comb begin
    g_alloc = allocate(req_g[0], req_g[1], dg, in_q, out_q);
    s_alloc = allocate(req_s[0], req_s[1], avail_q, in_q, out_q);
    tot0 = en_q[0] | s_alloc.e0;
    tot1 = en_q[1] | s_alloc.e1;
    b0   = |tot0;                 // input 0 sends
    b1   = |tot1;                 // input 1 sends
    q0   = tot0[0] | tot1[0];     // output 0 busy
    q1   = tot0[1] | tot1[1];     // output 1 busy
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      en_q    <= '{default: '0};
      avail_q <= '0;
      in_q    <= 1'b0;
      out_q   <= 1'b0;
      ug      <= '0;
      en      <= '{default: '0};
    end else begin
      if (gt) begin
        en_q[0] <= g_alloc.e0;
        en_q[1] <= g_alloc.e1;
        avail_q <= dg & ~(g_alloc.e0 | g_alloc.e1);
        ug[0]   <= ~req_g[0][2] | (|g_alloc.e0);
        ug[1]   <= ~req_g[1][2] | (|g_alloc.e1);
      end else if (start) begin
        en[0]   <= tot0;
        en[1]   <= tot1;
        en_q    <= '{default: '0};
        avail_q <= '0;
        in_q    <= (~b0 & b1) | (in_q & ~b0 & ~b1) | (b0 & b1 & tot1[0]);
        out_q   <= (~q0 & q1) | (out_q & (q0 == q1));
      end
    end
  end

  // An input circuit is never given a port it did not ask for, and the two
  // enables never share a port.
  a_no_share: assert property (@(posedge clk) disable iff (rst)
    (en[0] & en[1]) == 2'b00);
endmodule
