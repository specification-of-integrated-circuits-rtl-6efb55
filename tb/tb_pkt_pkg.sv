// Packet helpers shared by the testbenches: building an 80-nibble packet
// from its header fields and a payload derived from a seed, and the
// expected header changes of a switch element.
package tb_pkt_pkg;
  import bpn_pkg::*;

  typedef nibble_t pkt_t [80];

  function automatic nibble_t payload(int unsigned seed, int k);
    int unsigned h;
    h = seed * 32'h9E3779B1 + k * 32'h85EBCA6B;
    h = h ^ (h >> 13);
    return nibble_t'(h ^ (h >> 7));
  endfunction

  function automatic pkt_t mk_pkt(nibble_t rc, nibble_t n1, nibble_t n2, nibble_t n3,
                                  nibble_t ctl, nibble_t src, int unsigned seed);
    pkt_t p;
    p[0] = rc; p[1] = n1; p[2] = n2; p[3] = n3; p[4] = ctl; p[5] = src;
    for (int k = 6; k < 80; k++) p[k] = payload(seed, k);
    return p;
  endfunction
endpackage
