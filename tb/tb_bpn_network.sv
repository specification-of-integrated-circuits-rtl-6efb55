// Testbench of one 16-line switching network in routing mode, at the
// default parameters (4 columns of 8 switch elements).
//
// The testbench drives the packet time pt every 96 clocks and the grant
// time gt 17 clocks after it (the relation the fabric uses for its routing
// network), offers a packet on every input line whose upstream grant is
// set, and grants the output lines at random. Every packet carries an id in
// its last four nibbles. Checked: each data packet comes out exactly once
// on the line named by its address nibble with unchanged contents; each
// test packet comes out on the line named by its first routing nibble with
// nibbles 1..3 rotated once (the last column has rrf set); output parity;
// pt_out exactly 16 clocks and gt_out exactly 8 clocks after pt and gt; a
// packet that never waits leaves in the period it entered; err stays low
// until a parity error is injected at the end. Buffered packets, withheld
// upstream grants and the error lead are counted and must all occur.
module tb_bpn_network;
  import bpn_pkg::*;
  import tb_pkt_pkg::*;

  localparam int N = 16;
  localparam int PERIOD = 96;
  localparam int GT_AFTER_PT = 17;
  logic clk = 0, rst = 1;
  logic pt = 0, gt = 0, pt_out, gt_out, err;
  nibble_t ud [N];
  nibble_t dd [N];
  logic [N-1:0] up, ug, dp, dg;
  int checks = 0, failures = 0;

  bpn_network dut (.*);   // default: routing mode, 16 lines
  always #5 clk = ~clk;

  typedef struct {
    pkt_t p;
    logic test;
    int   got;
    int   period_in;
  } sent_t;
  sent_t db [int];
  int    q_id [N][$];
  int    next_id = 1;
  int    n_data = 0, n_test = 0, n_wait = 0, n_direct = 0, n_denied = 0, n_err = 0;
  int    period = 0;
  int    bad_line = -1;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 100) $display("ERROR %s", what); end
  endtask

  // ---- strobes -------------------------------------------------------------
  int cyc = 0;
  always @(posedge clk) begin
    if (rst) cyc <= 0; else cyc <= (cyc == PERIOD - 1) ? 0 : cyc + 1;
  end
  // strobes change on the rising edge, like the fabric's; nibble 0 of a
  // packet is presented in the clock in which pt is high
  always @(posedge clk) begin
    pt <= !rst && cyc == PERIOD - 1;
    gt <= !rst && cyc == GT_AFTER_PT - 1;
  end

  // pt_out / gt_out latency
  int t_pt = -1, t_gt = -1;
  always @(posedge clk) if (!rst) begin
    if (pt) t_pt = 0; else if (t_pt >= 0) t_pt++;
    if (gt) t_gt = 0; else if (t_gt >= 0) t_gt++;
    if (t_pt >= 0) chk("pt_out 16 clocks after pt", pt_out == (t_pt == 16));
    if (t_gt >= 0) chk("gt_out 8 clocks after gt", gt_out == (t_gt == 8));
  end

  // ---- line drivers ----------------------------------------------------------
  pkt_t cur [N];
  logic [N-1:0] active = '0;
  int k_in = 100;
  always @(negedge clk) begin
    if (rst) begin
      for (int j = 0; j < N; j++) begin ud[j] <= 0; up[j] <= 1; end
    end else begin
      if (pt) begin
        period++;
        k_in = 0;
        for (int j = 0; j < N; j++) begin
          active[j] = 0;
          if (q_id[j].size() > 0) begin
            if (ug[j]) begin
              int id;
              id = q_id[j].pop_front();
              cur[j] = db[id].p;
              db[id].period_in = period;
              active[j] = 1;
            end else n_denied++;
          end
        end
      end else if (k_in < 100) k_in++;
      for (int j = 0; j < N; j++) begin
        nibble_t v;
        v = (active[j] && k_in < 80) ? cur[j][k_in] : 4'h0;
        ud[j] <= v;
        up[j] <= odd_par(v) ^ (j == bad_line && k_in == 9);
      end
    end
  end

  // ---- receivers -------------------------------------------------------------
  pkt_t rx [N];
  int k_out = 100;
  always @(negedge clk) if (!rst) begin
    if (pt_out) k_out = 0; else if (k_out < 100) k_out++;
    if (k_out < 80) for (int q = 0; q < N; q++) rx[q][k_out] = dd[q];
    for (int q = 0; q < N; q++) chk("output parity", dp[q] == odd_par(dd[q]));
    if (k_out == 79) for (int q = 0; q < N; q++) if (rx[q][0] != 0) check_rx(q, rx[q]);
    dg <= N'($urandom) | N'($urandom);
  end

  task automatic check_rx(int q, pkt_t r);
    int id;
    logic ok;
    id = {r[76], r[77], r[78], r[79]};
    if (!db.exists(id)) begin chk($sformatf("unknown packet id %0d on output %0d", id, q), 0); return; end
    db[id].got++;
    ok = (q == db[id].p[1]);
    if (db[id].test) begin
      ok &= r[1] == db[id].p[2] && r[2] == db[id].p[3] && r[3] == db[id].p[1];
      for (int k = 0; k < 80; k++) if (k < 1 || k > 3) ok &= r[k] == db[id].p[k];
      n_test++;
    end else begin
      for (int k = 0; k < 80; k++) ok &= r[k] == db[id].p[k];
      n_data++;
    end
    chk($sformatf("packet %0d on output %0d", id, q), ok);
    chk($sformatf("packet %0d delivered twice", id), db[id].got == 1);
    // pt_out for the period a packet entered comes 16 clocks after pt, so
    // the last nibble is seen in the same period for a packet that never waits
    chk($sformatf("packet %0d early", id), period >= db[id].period_in);
    if (period > db[id].period_in) n_wait++; else n_direct++;
  endtask

  always @(posedge clk) if (!rst && err) n_err++;

  function automatic int outstanding();
    int n;
    n = 0;
    foreach (db[id]) n += 1 - db[id].got;
    return n;
  endfunction

  initial begin
    pkt_t p;
    int limit;
    repeat (4) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 400; t++) begin
      int s, id;
      logic test;
      s = $urandom_range(0, N - 1);
      test = ($urandom_range(0, 4) == 0);
      p = mk_pkt(test ? RC_TEST : RC_DATA, nibble_t'($urandom), nibble_t'($urandom),
                 nibble_t'($urandom), test ? CTL_SW_TEST : 4'h0, nibble_t'(s), 100 + t);
      id = next_id++;
      p[76] = nibble_t'(id >> 12); p[77] = nibble_t'(id >> 8);
      p[78] = nibble_t'(id >> 4);  p[79] = nibble_t'(id);
      db[id] = '{p: p, test: test, got: 0, period_in: -1};
      q_id[s].push_back(id);
    end
    limit = 600 * PERIOD;
    while (outstanding() > 0 && limit > 0) begin @(posedge clk); limit--; end
    repeat (3 * PERIOD) @(posedge clk);
    chk("no error during traffic", n_err == 0);
    foreach (db[id]) chk($sformatf("packet %0d delivered %0d times", id, db[id].got), db[id].got == 1);

    @(negedge clk);
    while (!pt) @(negedge clk);
    bad_line = 6;
    repeat (PERIOD + 10) @(posedge clk);
    bad_line = -1;
    repeat (8) @(posedge clk);

    $display("data=%0d test=%0d waited=%0d direct=%0d denied=%0d errors=%0d",
             n_data, n_test, n_wait, n_direct, n_denied, n_err);
    chk("test packets routed", n_test > 0);
    chk("buffering happened", n_wait > 0);
    chk("straight-through delivery happened", n_direct > 0);
    chk("upstream grant withheld", n_denied > 0);
    chk("error lead raised", n_err > 0);
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
