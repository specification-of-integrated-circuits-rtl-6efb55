// Testbench of the node control circuit. Random grant-phase and
// start-phase requests and downstream grants are applied; the expected
// enables, upstream grants and last-favoured state come from a model
// written in the form of the specification's port-enable equations (with
// the "either" rules of its text) rather than the circuit's greedy pass.
module tb_pse_ncc;
  import bpn_pkg::*;
  logic clk = 0, rst = 1, gt = 0, start = 0;
  logic [1:0] dg = 0;
  req_e req_g [2], req_s [2];
  logic [1:0] ug;
  logic [1:0] en [2];
  int checks = 0, failures = 0;

  pse_ncc dut (.*);
  always #5 clk = ~clk;

  // model state
  logic m_in = 0, m_out = 0;
  logic [1:0] m_en0, m_en1, m_a;

  function automatic logic is(req_e r, logic [2:0] v); return r == v; endfunction

  task automatic model_alloc(input req_e r0, input req_e r1, input logic [1:0] a,
                             output logic [1:0] e0, output logic [1:0] e1);
    logic in_f;
    in_f = m_in;
    e0[0] = (is(r0,3'b111) && a[1] && a[0] && (!is(r1,3'b111) || in_f)) ||
            (is(r0,3'b101) && a[0] && !is(r1,3'b111) && (!is(r1,3'b101) || in_f)) ||
            (is(r0,3'b100) && a[0] && !is(r1,3'b101) && !is(r1,3'b111) && (!is(r1,3'b100) || in_f));
    e0[1] = (is(r0,3'b111) && a[1] && a[0] && (!is(r1,3'b111) || in_f)) ||
            (is(r0,3'b110) && a[1] && !is(r1,3'b111) && (!is(r1,3'b110) || in_f)) ||
            (is(r0,3'b100) && a[1] && !is(r1,3'b110) && !is(r1,3'b111) && (!is(r1,3'b100) || !in_f));
    e1[0] = (is(r1,3'b111) && a[1] && a[0] && (!is(r0,3'b111) || !in_f)) ||
            (is(r1,3'b101) && a[0] && !is(r0,3'b111) && (!is(r0,3'b101) || !in_f)) ||
            (is(r1,3'b100) && a[0] && !is(r0,3'b101) && !is(r0,3'b111) && (!is(r0,3'b100) || !in_f));
    e1[1] = (is(r1,3'b111) && a[1] && a[0] && (!is(r0,3'b111) || !in_f)) ||
            (is(r1,3'b110) && a[1] && !is(r0,3'b111) && (!is(r0,3'b110) || !in_f)) ||
            (is(r1,3'b100) && a[1] && !is(r0,3'b110) && !is(r0,3'b111) && (!is(r0,3'b100) || in_f));
    // a lone "either" request with both ports free: the port opposite "out"
    if (is(r0,3'b100) && e0 == 2'b11) e0 = m_out ? 2'b01 : 2'b10;
    if (is(r1,3'b100) && e1 == 2'b11) e1 = m_out ? 2'b01 : 2'b10;
    // two "either" requests, only port 1 free: the favoured input gets it
    if (is(r0,3'b100) && is(r1,3'b100) && a == 2'b10) begin
      e0 = in_f ? 2'b10 : 2'b00;
      e1 = in_f ? 2'b00 : 2'b10;
    end
  endtask

  function automatic req_e rnd_req();
    case ($urandom_range(0, 5))
      0: return REQ_NONE;
      1: return REQ_EITHER;
      2: return REQ_P0;
      3: return REQ_P1;
      4: return REQ_BOTH;
      default: return req_e'(3'b010);  // 0xx: no request
    endcase
  endfunction

  int n_conflict = 0;
  initial begin
    logic [1:0] g0, g1, s0, s1, t0, t1, exp_ug;
    logic b0, b1, q0, q1;
    req_g = '{REQ_NONE, REQ_NONE};
    req_s = '{REQ_NONE, REQ_NONE};
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int it = 0; it < 3000; it++) begin
      // grant phase
      req_g[0] <= rnd_req(); req_g[1] <= rnd_req(); dg <= 2'($urandom);
      gt <= 1;
      @(negedge clk);
      model_alloc(req_g[0], req_g[1], dg, g0, g1);
      exp_ug = {!req_g[1][2] || g1 != 0, !req_g[0][2] || g0 != 0};
      m_a = dg & ~(g0 | g1);
      if (req_g[0] == REQ_EITHER && req_g[1] == REQ_EITHER && dg == 2'b11) n_conflict++;
      @(posedge clk); gt <= 0;
      @(negedge clk);
      checks++;
      if (ug !== exp_ug) begin
        failures++;
        $display("ERROR ug it=%0d r=%b,%b dg=%b got %b exp %b", it, req_g[0], req_g[1], dg, ug, exp_ug);
      end
      repeat ($urandom_range(0, 2)) @(posedge clk);
      // start phase: only inputs without a grant-phase request ask
      @(posedge clk);
      req_s[0] <= req_g[0][2] ? REQ_NONE : rnd_req();
      req_s[1] <= req_g[1][2] ? REQ_NONE : rnd_req();
      start <= 1;
      @(negedge clk);
      model_alloc(req_s[0], req_s[1], m_a, s0, s1);
      t0 = g0 | s0; t1 = g1 | s1;
      @(posedge clk); start <= 0;
      @(negedge clk);
      checks++;
      if (en[0] !== t0 || en[1] !== t1) begin
        failures++;
        $display("ERROR en it=%0d g=%b,%b s=%b,%b a=%b in=%b out=%b got %b,%b exp %b,%b", it,
                 req_g[0], req_g[1], req_s[0], req_s[1], m_a, m_in, m_out, en[0], en[1], t0, t1);
      end
      checks++;
      if ((t0 & t1) != 0) begin failures++; $display("ERROR model shares a port"); end
      b0 = |t0; b1 = |t1; q0 = t0[0] | t1[0]; q1 = t0[1] | t1[1];
      m_in  = (!b0 && b1) || (m_in && !b0 && !b1) || (b0 && b1 && t1[0]);
      m_out = (!q0 && q1) || (m_out && (q0 == q1));
      checks++;
      if (dut.in_q !== m_in || dut.out_q !== m_out) begin
        failures++; $display("ERROR state in/out got %b%b exp %b%b", dut.in_q, dut.out_q, m_in, m_out);
      end
      repeat ($urandom_range(0, 2)) @(posedge clk);
      @(posedge clk);
    end
    checks++;
    if (n_conflict == 0) begin failures++; $display("ERROR no double-either case seen"); end
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
