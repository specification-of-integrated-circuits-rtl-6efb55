// Testbench of the switch element input circuit. The testbench plays the
// node control circuit: it reads the requests and supplies the enables.
// A sequence of packet cycles exercises cut-through, storing a packet that
// got no port, sending the stored packet while the next one is written
// behind it, an overflow (a packet arriving without a grant) and an input
// parity error. Every output nibble is checked at pt+4+k.
module tb_pse_ic;
  import bpn_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst = 1, pt = 0, up = 1, rrf = 0;
  nibble_t ud = 0;
  logic [1:0] sn = 0, om = OM_ROUTE;
  req_e req_g, req_s;
  logic [1:0] en = 0;
  nibble_t dout [2];
  logic err;
  int checks = 0, failures = 0, n_err = 0;

  pse_ic dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (err) n_err++;

  pkt_t empty_pkt;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", what); end
  endtask

  // One packet cycle of 90 clocks: send p (bad parity on nibble bad_at if
  // >= 0), give enable en_g from clock 2, expect packet e on the ports in
  // exp_ports, and expect request exp_req at clock 1.
  task automatic cycle(pkt_t p, int bad_at, logic [1:0] en_g, pkt_t e,
                       logic [1:0] exp_ports, req_e exp_req, string name);
    for (int c = 0; c < 90; c++) begin
      @(negedge clk);
      if (c >= 4 && c < 84)
        for (int q = 0; q < 2; q++)
          chk($sformatf("%s port %0d nibble %0d: got %h exp %h", name, q, c - 4, dout[q],
                        exp_ports[q] ? e[c-4] : 4'h0),
              dout[q] == (exp_ports[q] ? e[c-4] : 4'h0));
      pt <= (c == 0);
      ud <= (c < 80) ? p[c] : 4'h0;
      up <= odd_par((c < 80) ? p[c] : 4'h0) ^ (c == bad_at);
      if (c == 2) en <= en_g;
      if (c == 1) begin
        #1;
        chk($sformatf("%s req_s %b exp %b", name, req_s, exp_req), req_s == exp_req);
      end
    end
  endtask

  initial begin
    pkt_t p1, p2, p3, p4, p5, p6;
    int e0;
    for (int k = 0; k < 80; k++) empty_pkt[k] = 0;
    p1 = mk_pkt(RC_DATA, 4'h2, 1, 2, 0, 7, 11);
    p2 = mk_pkt(RC_DATA, 4'hA, 3, 4, 0, 7, 12);
    p3 = mk_pkt(RC_DATA, 4'h3, 5, 6, 0, 7, 13);
    p4 = mk_pkt(RC_DATA, 4'hC, 7, 8, 0, 7, 14);
    p5 = mk_pkt(RC_DATA, 4'h1, 9, 9, 0, 7, 15);
    p6 = mk_pkt(RC_DATA, 4'h4, 2, 2, 0, 7, 16);
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    cycle(p1, -1, 2'b01, p1, 2'b01, REQ_P0, "cut-through");
    chk("req_g after cut-through", req_g == REQ_NONE);
    cycle(p2, -1, 2'b00, p2, 2'b00, REQ_P1, "stored");
    chk("req_g after store", req_g == REQ_P1);
    cycle(p3, -1, 2'b10, p2, 2'b10, REQ_NONE, "buffer out, next in");
    chk("req_g after swap", req_g == REQ_P0);
    cycle(empty_pkt, -1, 2'b01, p3, 2'b01, REQ_NONE, "buffer out");
    chk("req_g after drain", req_g == REQ_NONE);
    e0 = n_err;
    chk("no error so far", e0 == 0);
    cycle(p4, -1, 2'b00, p4, 2'b00, REQ_P1, "stored 2");
    cycle(p5, -1, 2'b00, p5, 2'b00, REQ_NONE, "overflow");
    chk("overflow reported", n_err == 1);
    chk("req_g keeps stored packet", req_g == REQ_P1);
    cycle(empty_pkt, -1, 2'b10, p4, 2'b10, REQ_NONE, "stored 2 out");
    cycle(p6, 10, 2'b01, p6, 2'b01, REQ_P0, "parity");
    chk("parity error reported", n_err == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("ERROR watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
