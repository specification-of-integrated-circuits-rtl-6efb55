// End-to-end testbench of the 16-port broadcast switch fabric at its
// default parameters.
//
// The testbench plays the 16 input line interfaces and the 16 output
// receivers. First it programs every translation chip through test
// packets (routed by their three address nibbles): the copy index table
// and all four translation table blocks. Then it sends mixed traffic:
// point-to-point packets, broadcast packets on many channels with random
// fanout, one broadcast whose translations all point back to its source,
// switch test packets, table read-back packets and table update packets.
// Receivers grant at random. A model of every chip's tables predicts each
// delivery; every packet is identified by an id in its last four nibbles.
// Checked: each packet reaches the right output exactly the expected number
// of times (a broadcast exactly FAN times, from distinct chips, with the
// translated header), contents, output parity, the fixed latency (out_frame
// exactly 64 clocks after frame; a packet never leaves before the output
// frame that belongs to its input frame), and that err stays low until a
// deliberate parity error at the end. Each mechanism is counted and must
// have happened: replication, translation, drop-to-source, test routing
// with rotation, table reads, update, buffering (a packet leaving in a
// later cycle than it entered), straight-through delivery, withheld input
// grants and the error lead.
module tb_bpn_fabric;
  import bpn_pkg::*;
  import tb_pkt_pkg::*;

  localparam int N = 16;
  localparam int DROP_CH = 47;
  logic clk = 0, rst = 1;
  logic frame, out_frame, err;
  nibble_t in_ud [N];
  logic [N-1:0] in_up, in_ug, out_dp, out_dg;
  nibble_t out_dd [N];
  int checks = 0, failures = 0;

  bpn_fabric dut (.*);
  always #5 clk = ~clk;

  typedef enum int { K_DATA, K_BCAST, K_TEST, K_RD_BCIT, K_RD_BTT, K_SILENT } kind_e;
  typedef struct {
    pkt_t  p;
    kind_e kind;
    int    n_exp;     // deliveries expected
    int    got;
    int    frame_in;
    int    btc;        // chip addressed by a control/test packet
    logic [N-1:0] from_btc;
    pkt_t  reply;      // expected contents of a read reply
  } sent_t;
  sent_t db [int];
  int next_id = 1;

  nibble_t btt_m [N][64][4];
  nibble_t bcit_m [N][32];

  int      q_id  [N][$];   // ids waiting per input line; packets live in db

  int n_copy = 0, n_xlate = 0, n_drop = 0, n_test = 0, n_rd = 0, n_upd = 0,
      n_wait = 0, n_direct = 0, n_denied = 0, n_err = 0, n_data = 0;
  int fcount = 0;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 400) $display("ERROR %s", what); end
  endtask

  function automatic nibble_t bitrev(nibble_t x);
    return {x[0], x[1], x[2], x[3]};
  endfunction
  function automatic int src_of(int c); return c % N; endfunction
  function automatic nibble_t dest_of(int c, int k);
    if (c == DROP_CH) return nibble_t'(src_of(c));
    return nibble_t'((src_of(c) + 1 + (c * 7 + k) % 15) % N);
  endfunction

  function automatic void set_id(ref pkt_t p, input int id);
    p[76] = nibble_t'(id >> 12); p[77] = nibble_t'(id >> 8);
    p[78] = nibble_t'(id >> 4);  p[79] = nibble_t'(id);
  endfunction

  task automatic enqueue(int line, pkt_t p, kind_e kind, int n_exp, int btc, pkt_t reply);
    int id;
    id = next_id++;
    set_id(p, id);
    set_id(reply, id);
    db[id] = '{p: p, kind: kind, n_exp: n_exp, got: 0, frame_in: -1, btc: btc,
               from_btc: '0, reply: reply};
    q_id[line].push_back(id);
  endtask

  // test packet to chip k, then to output o; copy-network address is
  // bit-reversed because that network's stage numbers count down
  function automatic pkt_t test_pkt(int k, int o, nibble_t ctl, int seed);
    return mk_pkt(RC_TEST, bitrev(nibble_t'(k)), nibble_t'($urandom), nibble_t'(o), ctl, 4'h0, seed);
  endfunction

  // ---- line drivers ------------------------------------------------------
  pkt_t cur [N];
  logic [N-1:0] active = '0;
  int   k_in = 100;
  int   bad_line = -1;
  always @(negedge clk) begin
    if (rst) begin
      for (int j = 0; j < N; j++) begin in_ud[j] <= 0; in_up[j] <= 1; end
    end else begin
      if (frame) begin
        fcount++;
        k_in = 0;
        for (int j = 0; j < N; j++) begin
          active[j] = 0;
          if (q_id[j].size() > 0) begin
            if (in_ug[j]) begin
              int id;
              id = q_id[j].pop_front();
              cur[j] = db[id].p;
              db[id].frame_in = fcount;
              active[j] = 1;
            end else n_denied++;
          end
        end
      end else if (k_in < 100) k_in++;
      for (int j = 0; j < N; j++) begin
        nibble_t v;
        v = (active[j] && k_in < 80) ? cur[j][k_in] : 4'h0;
        in_ud[j] <= v;
        in_up[j] <= odd_par(v) ^ (j == bad_line && k_in == 5);
      end
    end
  end

  // ---- receivers -----------------------------------------------------------
  pkt_t rx [N];
  int   k_out = 100;
  always @(negedge clk) if (!rst) begin
    if (out_frame) k_out = 0; else if (k_out < 100) k_out++;
    if (k_out < 80) for (int q = 0; q < N; q++) rx[q][k_out] = out_dd[q];
    for (int q = 0; q < N; q++) chk("output parity", out_dp[q] == odd_par(out_dd[q]));
    if (k_out == 79) for (int q = 0; q < N; q++) if (rx[q][0] != 0) check_rx(q, rx[q]);
    out_dg <= N'({$urandom, $urandom}) | N'({$urandom, $urandom}) | N'({$urandom, $urandom});
  end

  task automatic check_rx(int q, pkt_t r);
    int id;
    logic ok;
    id = {r[76], r[77], r[78], r[79]};
    if (!db.exists(id)) begin chk($sformatf("unknown packet id %0d on output %0d", id, q), 0); return; end
    db[id].got++;
    // out_frame for a packet's input frame comes 64 clocks after it, so by
    // the last nibble the next input frame has begun: fcount is frame_in + 1
    // for a packet that was never held in a buffer
    chk($sformatf("packet %0d left before it could", id), fcount >= db[id].frame_in + 1);
    if (fcount > db[id].frame_in + 1) n_wait++; else n_direct++;
    ok = 1;
    case (db[id].kind)
      K_DATA: begin
        ok = (q == db[id].p[1]);
        for (int k = 0; k < 80; k++) if (r[k] != db[id].p[k]) ok = 0;
        n_data++;
      end
      K_BCAST: begin
        int c, kb;
        c = {db[id].p[2], db[id].p[3]};
        kb = r[2];          // chip number, placed in LCN_H by the table
        for (int n = 0; n < 4; n++) if (r[n] != btt_m[kb][c][n]) ok = 0;
        if (q != btt_m[kb][c][1]) ok = 0;
        for (int k = 4; k < 80; k++) if (r[k] != db[id].p[k]) ok = 0;
        if (db[id].from_btc[kb]) ok = 0;
        db[id].from_btc[kb] = 1;
        n_xlate++;
      end
      K_TEST: begin
        ok = (q == db[id].p[3]);
        for (int k = 0; k < 80; k++) if (r[k] != db[id].p[k]) ok = 0;
        n_test++;
      end
      K_RD_BCIT, K_RD_BTT: begin
        ok = (q == db[id].p[3]);
        for (int k = 0; k < 80; k++) if (r[k] != db[id].reply[k]) ok = 0;
        n_rd++;
      end
      default: ok = 0;
    endcase
    chk($sformatf("packet %0d (kind %s) on output %0d", id, db[id].kind.name(), q), ok);
    chk($sformatf("packet %0d delivered too often", id), db[id].got <= db[id].n_exp);
  endtask

  // copies entering the chips on the drop channel (seen on the copy network
  // outputs); none of them may come out
  int k_c = 100;
  pkt_t crx [N];
  always @(negedge clk) if (!rst) begin
    if (dut.c_pt_out) k_c = 0; else if (k_c < 100) k_c++;
    if (k_c < 4) for (int j = 0; j < N; j++) crx[j][k_c] = dut.c_dd[j];
    if (k_c == 4)
      for (int j = 0; j < N; j++)
        if (crx[j][0] == RC_BCAST && {crx[j][2], crx[j][3]} == 8'(DROP_CH)) n_drop++;
    if (k_c == 4)
      for (int j = 0; j < N; j++) if (crx[j][0] == RC_BCAST) n_copy++;
  end

  always @(posedge clk) if (!rst && err) n_err++;

  // fixed latency of the frame marker through the fabric
  int t_frame = -1;
  always @(posedge clk) if (!rst) begin
    if (frame) t_frame = 0; else if (t_frame >= 0) t_frame++;
    if (t_frame >= 0) chk("out_frame 64 clocks after frame", out_frame == (t_frame == 64));
  end

  function automatic int pending();
    int n;
    n = 0;
    for (int j = 0; j < N; j++) n += q_id[j].size();
    return n;
  endfunction

  function automatic int outstanding();
    int n;
    n = 0;
    foreach (db[id]) n += db[id].n_exp - db[id].got;
    return n;
  endfunction

  // wait until the input queues are empty and every expected delivery has
  // arrived (packets may sit in switch buffers for many cycles under random
  // output grants), then a few more cycles for anything unexpected
  task automatic wait_drain(int extra);
    int limit;
    while (pending() > 0) @(posedge clk);
    limit = 200 * 96;
    while (outstanding() > 0 && limit > 0) begin @(posedge clk); limit--; end
    repeat (extra * 96) @(posedge clk);
  endtask

  pkt_t none;
  initial begin
    pkt_t p, r;
    int drop_fan, bcast_ids [$];
    for (int k = 0; k < 80; k++) none[k] = 0;
    repeat (4) @(posedge clk);
    rst <= 0;

    // ---- program the chips ----
    for (int k = 0; k < N; k++) begin
      p = test_pkt(k, 0, CTL_WR_BCIT, 1000 + k);
      for (int i = 0; i < 32; i++) begin
        bcit_m[k][i] = nibble_t'((i * 5 + k) % N);
        p[6 + i] = bcit_m[k][i];
      end
      enqueue((k + 3) % N, p, K_SILENT, 0, k, none);
      for (int b = 0; b < 4; b++) begin
        p = test_pkt(k, 0, CTL_WR_BTT, 2000 + 4 * k + b);
        p[6] = nibble_t'(b);
        for (int e = 0; e < 16; e++) begin
          int c;
          c = 16 * b + e;
          btt_m[k][c][0] = RC_DATA;
          btt_m[k][c][1] = dest_of(c, k);
          btt_m[k][c][2] = nibble_t'(k);
          btt_m[k][c][3] = nibble_t'(c);
          for (int n = 0; n < 4; n++) p[7 + 4 * e + n] = btt_m[k][c][n];
        end
        enqueue((k + 5 * b + 1) % N, p, K_SILENT, 0, k, none);
      end
    end
    wait_drain(3);
    chk("no error while programming", n_err == 0);

    // ---- traffic ----
    for (int t = 0; t < 60; t++) begin
      int s, c, f;
      // point-to-point
      s = $urandom_range(0, N - 1);
      p = mk_pkt(RC_DATA, nibble_t'($urandom), nibble_t'($urandom), nibble_t'($urandom),
                 0, nibble_t'(s), 3000 + t);
      enqueue(s, p, K_DATA, 1, -1, none);
      // broadcast on channel c from its source line
      c = $urandom_range(0, 46);
      f = $urandom_range(1, 15);
      p = mk_pkt(RC_BCAST, nibble_t'(f), nibble_t'(c >> 4), nibble_t'(c), 0,
                 nibble_t'(src_of(c)), 4000 + t);
      enqueue(src_of(c), p, K_BCAST, f, -1, none);
      // switch test packet
      if (t % 4 == 0) begin
        s = $urandom_range(0, N - 1);
        p = test_pkt($urandom_range(0, N - 1), $urandom_range(0, N - 1), CTL_SW_TEST, 5000 + t);
        enqueue(s, p, K_TEST, 1, -1, none);
      end
    end
    // broadcast whose every translation points back to its source
    drop_fan = 9;
    p = mk_pkt(RC_BCAST, nibble_t'(drop_fan), nibble_t'(DROP_CH >> 4), nibble_t'(DROP_CH), 0,
               nibble_t'(src_of(DROP_CH)), 6000);
    enqueue(src_of(DROP_CH), p, K_BCAST, 0, -1, none);
    // read back the copy index table of chip 3 to output 9
    p = test_pkt(3, 9, CTL_RD_BCIT, 6001);
    r = p;
    for (int i = 0; i < 32; i++) r[6 + i] = bcit_m[3][i];
    enqueue(2, p, K_RD_BCIT, 1, 3, r);
    wait_drain(4);

    // ---- update entries of block 3 and read the block back ----
    for (int u = 0; u < 4; u++) begin
      int k, i, j, idx, o;
      nibble_t acopy;
      k = $urandom_range(0, N - 1);
      o = 4 * $urandom_range(0, 3) + 3;    // route address: block 3
      p = test_pkt(k, o, CTL_UPD_BTT, 7000 + u);
      p[6] = nibble_t'($urandom);
      acopy = bitrev(nibble_t'(k));        // BCN_L as the chip sees it
      i = 2 * p[6] + acopy[0];
      j = bcit_m[k][i];
      idx = {o[1:0], acopy};
      for (int n = 0; n < 4; n++) btt_m[k][idx][n] = p[6 + 4 * j + 1 + n];
      enqueue(k, p, K_SILENT, 0, k, none);
      n_upd++;
      wait_drain(1);
      p = test_pkt(k, (k + 6) % N, CTL_RD_BTT, 7100 + u);
      p[6] = 4'h3;
      r = p;
      for (int e = 0; e < 16; e++)
        for (int n = 0; n < 4; n++) r[7 + 4 * e + n] = btt_m[k][48 + e][n];
      enqueue(k, p, K_RD_BTT, 1, k, r);
      wait_drain(1);
    end
    wait_drain(4);
    chk("no error during traffic", n_err == 0);

    // ---- every packet delivered as often as expected ----
    foreach (db[id])
      chk($sformatf("packet %0d (kind %s) delivered %0d of %0d", id, db[id].kind.name(),
                    db[id].got, db[id].n_exp), db[id].got == db[id].n_exp);

    // ---- parity error on an input line ----
    @(negedge clk);
    while (!frame) @(negedge clk);
    bad_line = 4;
    repeat (96 + 10) @(posedge clk);
    bad_line = -1;
    repeat (8) @(posedge clk);

    $display("copies=%0d translated=%0d dropped=%0d test=%0d reads=%0d updates=%0d waited=%0d direct=%0d denied=%0d data=%0d errors=%0d",
             n_copy, n_xlate, n_drop, n_test, n_rd, n_upd, n_wait, n_direct, n_denied, n_data, n_err);
    chk("replication happened", n_copy > 60);
    chk("translation happened", n_xlate > 0);
    chk("drop to source happened", n_drop == drop_fan);
    chk("test routing happened", n_test > 0);
    chk("table reads happened", n_rd == 5);
    chk("table update happened", n_upd > 0);
    chk("buffering happened", n_wait > 0);
    chk("straight-through delivery happened", n_direct > 0);
    chk("input grant withheld", n_denied > 0);
    chk("error lead raised", n_err > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("ERROR watchdog (pending %0d)", pending());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
