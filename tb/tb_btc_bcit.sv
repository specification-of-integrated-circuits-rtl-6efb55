// Testbench of the broadcast copy index table: random writes and two-port
// reads against a reference array.
module tb_btc_bcit;
  import bpn_pkg::*;
  logic clk = 0, we = 0;
  logic [4:0] waddr = 0, raddr_a = 0, raddr_b = 0;
  pnib_t wdata = '0, rdata_a, rdata_b;
  pnib_t ref_mem [32];
  int checks = 0, failures = 0;

  btc_bcit dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      we <= 1; waddr <= 5'(a); wdata <= 5'($urandom);
      @(posedge clk); #1;
      ref_mem[a] = wdata;
    end
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      we <= 1'($urandom); waddr <= 5'($urandom); wdata <= 5'($urandom);
      raddr_a <= 5'($urandom); raddr_b <= 5'($urandom);
      #1;
      checks += 2;
      if (rdata_a !== ref_mem[raddr_a]) begin failures++; $display("ERROR a %0d", raddr_a); end
      if (rdata_b !== ref_mem[raddr_b]) begin failures++; $display("ERROR b %0d", raddr_b); end
      @(posedge clk); #1;
      if (we) ref_mem[waddr] = wdata;
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
