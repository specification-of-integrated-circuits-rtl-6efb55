// Testbench of the broadcast translation chip. It fills the copy index
// table and the four translation table blocks through control packets,
// reads them back, sends broadcast packets (translated, and one dropped
// because its new address equals its source), point-to-point and empty
// packets, an update-BTT packet, and packets with parity errors, one of
// them stored in a table and caught again when read. A reference model of
// both tables gives every expected output nibble, checked 16 clocks after
// the nibble went in.
module tb_btc;
  import bpn_pkg::*;
  import tb_pkt_pkg::*;
  localparam int PERIOD = 100;
  logic clk = 0, rst = 1, st = 0, up = 1;
  nibble_t ud = 0, dd;
  logic dp, err;
  int checks = 0, failures = 0, n_err = 0;
  int n_xlate = 0, n_drop = 0;

  btc dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (err) n_err++;

  nibble_t btt_m [64][4];
  nibble_t bcit_m [32];
  pkt_t empty_pkt;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", what); end
  endtask

  // Send p (parity flipped on nibble bad_at), expect e at st+16+k.
  task automatic cycle(pkt_t p, pkt_t e, int bad_at, string name);
    for (int c = 0; c < PERIOD; c++) begin
      @(negedge clk);
      if (c >= 16 && c < 96) begin
        chk($sformatf("%s nibble %0d: got %h exp %h", name, c - 16, dd, e[c-16]), dd == e[c-16]);
        chk("dp", dp == odd_par(dd));
      end
      st <= (c == 0);
      ud <= (c < 80) ? p[c] : 4'h0;
      up <= odd_par((c < 80) ? p[c] : 4'h0) ^ (c == bad_at);
    end
  endtask

  function automatic pkt_t ctl_pkt(nibble_t ctl, nibble_t bcn_h, nibble_t bcn_l, int seed);
    return mk_pkt(RC_DATA, 4'h0, bcn_h, bcn_l, ctl, 4'h0, seed);
  endfunction

  initial begin
    pkt_t p, e;
    int errs0;
    for (int k = 0; k < 80; k++) empty_pkt[k] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);

    // write BCIT: I[j] = BCIT[j]
    p = ctl_pkt(CTL_WR_BCIT, 0, 0, 1);
    for (int j = 0; j < 32; j++) begin
      p[6+j] = nibble_t'($urandom_range(0, 15));
      bcit_m[j] = p[6+j];
    end
    cycle(p, empty_pkt, -1, "write BCIT");
    // read BCIT
    p = ctl_pkt(CTL_RD_BCIT, 0, 0, 2);
    e = p;
    for (int j = 0; j < 32; j++) e[6+j] = bcit_m[j];
    cycle(p, e, -1, "read BCIT");
    // write the four BTT blocks, then read them back
    for (int b = 0; b < 4; b++) begin
      p = ctl_pkt(CTL_WR_BTT, 0, 0, 10 + b);
      p[6] = nibble_t'(b);
      for (int j = 0; j < 16; j++)
        for (int n = 0; n < 4; n++) begin
          p[6 + 4*j + 1 + n] = nibble_t'($urandom);
          btt_m[16*b + j][n] = p[6 + 4*j + 1 + n];
        end
      cycle(p, empty_pkt, -1, "write BTT block");
    end
    for (int b = 0; b < 4; b++) begin
      p = ctl_pkt(CTL_RD_BTT, 0, 0, 20 + b);
      p[6] = nibble_t'(b);
      e = p;
      for (int j = 0; j < 16; j++)
        for (int n = 0; n < 4; n++) e[6 + 4*j + 1 + n] = btt_m[16*b + j][n];
      cycle(p, e, -1, "read BTT block");
    end
    // broadcast data packets: translated through BTT[BCN]
    for (int t = 0; t < 12; t++) begin
      int c;
      nibble_t src;
      c = $urandom_range(0, 63);
      src = btt_m[c][1] + 4'd1;
      p = mk_pkt(RC_BCAST, 4'h3, nibble_t'(c >> 4), nibble_t'(c), 0, src, 30 + t);
      e = p;
      for (int n = 0; n < 4; n++) e[n] = btt_m[c][n];
      cycle(p, e, -1, "translate");
      n_xlate++;
    end
    // a broadcast copy whose new address is its own source is dropped
    begin
      int c;
      c = 37;
      p = mk_pkt(RC_BCAST, 4'h3, nibble_t'(c >> 4), nibble_t'(c), 0, btt_m[c][1], 50);
      cycle(p, empty_pkt, -1, "drop to source");
      n_drop++;
    end
    // point-to-point data and an empty slot pass unchanged
    p = mk_pkt(RC_DATA, 4'h9, 4'h1, 4'h2, 0, 4'h3, 51);
    cycle(p, p, -1, "point-to-point");
    cycle(empty_pkt, empty_pkt, -1, "empty");
    // update BTT: i = 2*I[0] + BCN_L bit 0, j = BCIT[i], BTT[BCN] = I[4j+1..4j+4]
    for (int t = 0; t < 4; t++) begin
      int c, i, j;
      c = $urandom_range(0, 63);
      p = mk_pkt(RC_BCAST, 4'h2, nibble_t'(c >> 4), nibble_t'(c), CTL_UPD_BTT, 4'h0, 60 + t);
      p[6] = nibble_t'($urandom_range(0, 15));
      i = 2 * p[6] + (c & 1);
      j = bcit_m[i];
      for (int n = 0; n < 4; n++) btt_m[c][n] = p[6 + 4*j + 1 + n];
      cycle(p, empty_pkt, -1, "update BTT");
      p = mk_pkt(RC_BCAST, 4'h3, nibble_t'(c >> 4), nibble_t'(c), 0, btt_m[c][1] ^ 4'h8, 70 + t);
      e = p;
      for (int n = 0; n < 4; n++) e[n] = btt_m[c][n];
      cycle(p, e, -1, "translate after update");
    end
    chk("no error so far", n_err == 0);
    // parity error on a passing packet
    p = mk_pkt(RC_DATA, 4'h9, 4'h1, 4'h2, 0, 4'h3, 80);
    cycle(p, p, 40, "parity error in transit");
    chk("input parity error reported", n_err == 1);
    // a bad nibble stored in the BCIT is reported again when read
    p = ctl_pkt(CTL_WR_BCIT, 0, 0, 81);
    for (int j = 0; j < 32; j++) begin p[6+j] = bcit_m[j]; end
    p[6+5] = 4'h6; bcit_m[5] = 4'h6;
    cycle(p, empty_pkt, 6 + 5, "write BCIT with bad nibble");
    chk("bad nibble reported on input", n_err == 2);
    p = ctl_pkt(CTL_RD_BCIT, 0, 0, 82);
    e = p;
    for (int j = 0; j < 32; j++) e[6+j] = bcit_m[j];
    cycle(p, e, -1, "read BCIT with bad nibble");
    chk("stored parity error reported on read", n_err == 3);
    chk("mechanisms seen", n_xlate > 0 && n_drop > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("ERROR watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
