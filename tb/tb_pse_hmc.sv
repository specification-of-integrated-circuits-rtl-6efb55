// Testbench of the header modification circuit: broadcast packets with
// every FAN value and both BCN parities, replicated or not; test packets
// with and without rrf; ordinary data packets. Every output nibble of both
// port streams is compared with the expected packet, and the two-clock
// latency is checked through the index output.
module tb_pse_hmc;
  import bpn_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst = 1;
  nibble_t din = 0;
  idx_t din_idx = IDX_IDLE;
  logic rrf = 0, copy = 0;
  nibble_t dout [2];
  idx_t dout_idx;
  int checks = 0, failures = 0;
  int n_split = 0, n_rot = 0;

  pse_hmc dut (.*);
  always #5 clk = ~clk;

  pkt_t exp0, exp1;
  int   out_k;

  task automatic send(pkt_t p, logic r, logic c);
    @(negedge clk);
    exp0 = p; exp1 = p;
    if (p[0] == RC_BCAST && c) begin
      nibble_t fan_hi, fan_lo;
      fan_hi = nibble_t'(({1'b0, p[1]} + 5'd1) >> 1);
      fan_lo = p[1] >> 1;
      exp0[1] = p[3][0] ? fan_lo : fan_hi;
      exp1[1] = p[3][0] ? fan_hi : fan_lo;
      n_split++;
    end
    if (p[0] == RC_TEST && r) begin
      exp0[1] = p[2]; exp0[2] = p[3]; exp0[3] = p[1];
      exp1[1] = p[2]; exp1[2] = p[3]; exp1[3] = p[1];
      n_rot++;
    end
    rrf <= r; copy <= c;
    for (int k = 0; k < 80; k++) begin
      din <= p[k]; din_idx <= idx_t'(k);
      @(posedge clk);
    end
    din <= 0; din_idx <= IDX_IDLE;
    repeat ($urandom_range(0, 3)) @(posedge clk);
  endtask

  // output checker: nibble k must appear exactly two clocks after it went in
  idx_t idx_d1, idx_d2;
  nibble_t e0_d1, e0_d2, e1_d1, e1_d2;
  always_ff @(posedge clk) begin
    idx_d1 <= din_idx; idx_d2 <= idx_d1;
    e0_d1 <= (din_idx < 80) ? exp0[din_idx] : '0; e0_d2 <= e0_d1;
    e1_d1 <= (din_idx < 80) ? exp1[din_idx] : '0; e1_d2 <= e1_d1;
  end
  always @(negedge clk) if (!rst) begin
    if (dout_idx != IDX_IDLE || idx_d2 < 80) begin
      checks++;
      if (dout_idx != idx_d2 || dout[0] != e0_d2 || dout[1] != e1_d2) begin
        failures++;
        $display("ERROR idx %0d (exp idx %0d): got %h/%h exp %h/%h", dout_idx, idx_d2,
                 dout[0], dout[1], e0_d2, e1_d2);
      end
    end
  end

  initial begin
    idx_d1 = IDX_IDLE; idx_d2 = IDX_IDLE;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int f = 0; f < 16; f++)
      for (int b = 0; b < 2; b++)
        for (int c = 0; c < 2; c++)
          send(mk_pkt(RC_BCAST, nibble_t'(f), 4'h5, nibble_t'(b + 2 * $urandom_range(0, 7)), 0, 3, f * 4 + b * 2 + c), 1'($urandom), 1'(c));
    for (int r = 0; r < 2; r++)
      for (int t = 0; t < 4; t++)
        send(mk_pkt(RC_TEST, nibble_t'($urandom), nibble_t'($urandom), nibble_t'($urandom), 5, 1, 100 + t), 1'(r), 1'($urandom));
    for (int t = 0; t < 4; t++)
      send(mk_pkt(RC_DATA, nibble_t'($urandom), 4'h1, 4'h2, 0, 2, 200 + t), 1'b1, 1'b1);
    repeat (4) @(posedge clk);
    checks++;
    if (n_split == 0 || n_rot == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("ERROR watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
