// Testbench of the broadcast translation table: random nibble writes and
// two-port whole-entry reads against a reference array.
module tb_btc_btt;
  import bpn_pkg::*;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr_a = 0, raddr_b = 0;
  logic [1:0] wnib = 0;
  pnib_t wdata = '0;
  pnib_t rdata_a [4], rdata_b [4];
  pnib_t ref_mem [64][4];
  int checks = 0, failures = 0;

  btc_btt dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < 64; a++)
      for (int n = 0; n < 4; n++) begin
        @(negedge clk);
        we <= 1; waddr <= 6'(a); wnib <= 2'(n); wdata <= 5'($urandom);
        @(posedge clk); #1;
        ref_mem[a][n] = wdata;
      end
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      we <= 1'($urandom); waddr <= 6'($urandom); wnib <= 2'($urandom); wdata <= 5'($urandom);
      raddr_a <= 6'($urandom); raddr_b <= 6'($urandom);
      #1;
      for (int n = 0; n < 4; n++) begin
        checks += 2;
        if (rdata_a[n] !== ref_mem[raddr_a][n]) begin failures++; $display("ERROR a %0d.%0d", raddr_a, n); end
        if (rdata_b[n] !== ref_mem[raddr_b][n]) begin failures++; $display("ERROR b %0d.%0d", raddr_b, n); end
      end
      @(posedge clk); #1;
      if (we) ref_mem[waddr][wnib] = wdata;
    end
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
