// Testbench of the packet switch element. Random traffic in route,
// distribute and copy mode, with random downstream grants. The testbench
// sends on an input only when the element granted it, and checks that
//  * every packet leaves exactly once (a replicated broadcast on both
//    ports in the same cycle, FAN split by the BCN rule), on a port the
//    mode allows and the downstream neighbour granted;
//  * an output packet always starts exactly 4 clocks after pt;
//  * dp is odd parity of dd;
//  * in distribute mode both ports carry traffic.
// It counts cut-through (sent in the cycle it arrived), buffered
// (sent later), replicated and test-routed packets, and fails if any of
// them never happened. A final packet with a parity error must raise err.
module tb_pse;
  import bpn_pkg::*;
  import tb_pkt_pkg::*;
  localparam int PERIOD = 96, GT_AT = 50;
  logic clk = 0, rst = 1, rrf = 0, pt = 0, gt = 0;
  nibble_t ud [2];
  logic [1:0] up, ug, dp, dg = 0, sn = 0, om = OM_ROUTE;
  nibble_t dd [2];
  logic err;
  int checks = 0, failures = 0;
  int n_cut = 0, n_buf = 0, n_copy = 0, n_test = 0, n_port [2], n_err = 0;

  pse dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (err) n_err++;

  typedef struct {
    pkt_t p;
    int   cyc;        // cycle in which it was sent
    int   got;        // bit 0/1: delivered on port 0/1
    int   got_cyc;
  } sent_t;
  sent_t sent [$];

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", what); end
  endtask

  // expected nibble 1 on port q of a delivered packet
  function automatic logic hdr_ok(pkt_t s, pkt_t r, int q, logic both, logic [1:0] mode,
                                  logic [1:0] stage);
    nibble_t f0, f1;
    req_e rq;
    rq = classify(s[0], s[1], stage, mode);
    if (rq == REQ_P0 && q != 0) return 0;
    if (rq == REQ_P1 && q != 1) return 0;
    if (rq == REQ_BOTH) begin
      if (!both) return 0;
      f0 = s[3][0] ? s[1] >> 1 : nibble_t'(({1'b0, s[1]} + 1) >> 1);
      f1 = s[3][0] ? nibble_t'(({1'b0, s[1]} + 1) >> 1) : s[1] >> 1;
      return r[1] == (q == 0 ? f0 : f1);
    end
    if (both) return 0;
    return r[1] == s[1];
  endfunction

  pkt_t rx [2];
  logic [1:0] dg_cyc = 0, dg_next = 0;
  int   cyc = 0;

  task automatic run_phase(logic [1:0] mode, logic [1:0] stage, int ncyc, int load_pct);
    pkt_t nxt [2], cur [2];
    logic [1:0] send, send_n;
    int seed;
    om <= mode; sn <= stage;
    rst <= 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    send_n = 0;
    sent.delete();
    for (int n = 0; n < ncyc + 6; n++) begin
      send = send_n;
      cur = nxt;
      for (int i = 0; i < 2; i++) begin
        if (send[i]) begin
          sent.push_back('{p: cur[i], cyc: cyc, got: 0, got_cyc: -1});
        end
      end
      for (int c = 0; c < PERIOD; c++) begin
        @(negedge clk);
        // receive: nibble k at c = 4 + k
        if (c >= 4 && c < 84)
          for (int q = 0; q < 2; q++) rx[q][c-4] = dd[q];
        if (c == 0) dg_cyc = dg_next;
        for (int q = 0; q < 2; q++)
          chk("dp parity", dp[q] == odd_par(dd[q]));
        if (c == 84) begin
          // match the packets of this cycle
          logic [1:0] have;
          have = {rx[1][0] != 0, rx[0][0] != 0};
          for (int q = 0; q < 2; q++) if (have[q]) begin
            int hit;
            hit = -1;
            chk($sformatf("output on port %0d without grant", q), dg_cyc[q]);
            foreach (sent[s]) begin
              logic same;
              same = 1;
              for (int k = 4; k < 80; k++) if (sent[s].p[k] != rx[q][k]) same = 0;
              if (same) hit = s;
            end
            chk($sformatf("unknown packet on port %0d", q), hit >= 0);
            if (hit < 0 && failures < 3) begin
              $display("  rx %h %h %h %h %h %h %h %h", rx[q][0], rx[q][1], rx[q][2], rx[q][3], rx[q][4], rx[q][5], rx[q][6], rx[q][7]);
              foreach (sent[s2]) $display("  sent %h %h %h %h %h %h %h %h", sent[s2].p[0], sent[s2].p[1], sent[s2].p[2], sent[s2].p[3], sent[s2].p[4], sent[s2].p[5], sent[s2].p[6], sent[s2].p[7]);
            end
            if (hit >= 0) begin
              logic both;
              both = have == 2'b11;
              for (int k = 4; k < 80; k++) if (rx[0][k] != rx[1][k]) both = 0;
              chk($sformatf("header/port of packet on port %0d", q),
                  hdr_ok(sent[hit].p, rx[q], q, both, mode, stage));
              chk("delivered twice", !sent[hit].got[q]);
              sent[hit].got[q] = 1;
              n_port[q]++;
              if (q == 0 || !both) begin
                if (sent[hit].cyc == cyc) n_cut++; else n_buf++;
              end
              if (both && q == 1) n_copy++;
              if (sent[hit].p[0] == RC_TEST) n_test++;
            end
          end
        end
        // grant phase
        if (c == GT_AT) begin
          dg <= (n >= ncyc) ? 2'b11 : 2'($urandom);
        end
        gt <= (c == GT_AT);
        if (c == GT_AT + 1) dg_next = dg;
        pt <= (c == 0);
        // decide the next cycle's packets after the upstream grants
        if (c == GT_AT + 3) begin
          for (int i = 0; i < 2; i++) begin
            send_n[i] = ug[i] && n < ncyc && $urandom_range(0, 99) < load_pct;
            seed = $urandom;
            if (send_n[i]) begin
              nibble_t rc;
              case ($urandom_range(0, 3))
                0: rc = RC_TEST;
                1: rc = RC_BCAST;
                default: rc = RC_DATA;
              endcase
              nxt[i] = mk_pkt(rc, nibble_t'($urandom), nibble_t'($urandom), nibble_t'($urandom),
                              0, nibble_t'(i), seed);
            end
          end
        end
        // drive nibble c of the current packets (pt with nibble 0)
        for (int i = 0; i < 2; i++) begin
          ud[i] <= (send[i] && c < 80) ? cur[i][c] : 4'h0;
          up[i] <= odd_par((send[i] && c < 80) ? cur[i][c] : 4'h0);
        end
      end
      cyc++;
    end
    foreach (sent[s]) begin
      req_e rq;
      rq = classify(sent[s].p[0], sent[s].p[1], stage, mode);
      chk($sformatf("packet %0d delivered (got %b)", s, sent[s].got),
          rq == REQ_BOTH ? sent[s].got == 3 : (sent[s].got == 1 || sent[s].got == 2));
    end
  endtask


  initial begin
    ud = '{4'h0, 4'h0}; up = 2'b11;
    n_port = '{0, 0};
    repeat (2) @(posedge clk);
    run_phase(OM_ROUTE, 2'd1, 40, 70);
    run_phase(OM_DIST, 2'd2, 40, 70);
    run_phase(OM_COPY, 2'd1, 40, 60);
    chk("no error during traffic", n_err == 0);
    chk("cut-through seen", n_cut > 0);
    chk("buffered packet seen", n_buf > 0);
    chk("replication seen", n_copy > 0);
    chk("test packet seen", n_test > 0);
    chk("both ports used", n_port[0] > 0 && n_port[1] > 0);
    $display("cut=%0d buffered=%0d copied=%0d test=%0d port0=%0d port1=%0d",
             n_cut, n_buf, n_copy, n_test, n_port[0], n_port[1]);
    // parity error
    @(negedge clk);
    pt <= 1; ud[0] <= 4'h0; up[0] <= 1'b0;
    @(negedge clk);
    pt <= 0; up[0] <= 1'b1;
    repeat (3) @(negedge clk);
    chk("parity error raises err", n_err == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
