// Testbench of the one-packet buffer: random writes and reads against a
// reference array, including a read and a write of the same address in
// the same clock, which must return the old contents.
module tb_pse_buffer;
  logic clk = 0;
  logic we = 0;
  logic [6:0] waddr = 0, raddr = 0;
  logic [4:0] wdata = 0, rdata;
  logic [4:0] ref_mem [80];
  int checks = 0, failures = 0, n_same = 0;

  pse_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    // fill
    for (int a = 0; a < 80; a++) begin
      we <= 1; waddr <= 7'(a); wdata <= 5'($urandom); ref_mem[a] = 'x;
      @(posedge clk);
      ref_mem[a] = wdata;
    end
    we <= 0;
    for (int it = 0; it < 2000; it++) begin
      logic [6:0] ra, wa;
      logic [4:0] wd;
      logic w;
      ra = 7'($urandom_range(0, 79));
      wa = ($urandom_range(0, 3) == 0) ? ra : 7'($urandom_range(0, 79));
      wd = 5'($urandom);
      w  = 1'($urandom);
      raddr <= ra; waddr <= wa; wdata <= wd; we <= w;
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[ra]) begin
        failures++; $display("ERROR addr %0d got %h exp %h", ra, rdata, ref_mem[ra]);
      end
      if (w && wa == ra) n_same++;
      @(posedge clk);
      if (w) ref_mem[wa] = wd;
    end
    checks++;
    if (n_same == 0) failures++;
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
