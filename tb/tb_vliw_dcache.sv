// tb_vliw_dcache: self-checking test of the data memory: host writes,
// synchronous reads (data one cycle after the address), held output while the
// read enable is low. Uses the full 2^16-word size.
module tb_vliw_dcache;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic re, we;
  logic [15:0] raddr, waddr;
  logic [127:0] rdata, wdata;
  logic [127:0] ref_mem [int];
  vliw_dcache dut (.clk, .re, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    logic [15:0] addrs[$];
    logic [127:0] held;
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = 1;
      waddr = (i < 2) ? (i == 0 ? 16'h0000 : 16'hFFFF) : 16'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      ref_mem[waddr] = wdata;
    end
    @(negedge clk);
    we = 0;
    foreach (ref_mem[a]) addrs.push_back(16'(a));
    foreach (addrs[i]) begin
      re = 1; raddr = addrs[i];
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[addrs[i]]) failures++;
    end
    held = rdata;
    re = 0; raddr = addrs[0];
    @(negedge clk);
    checks++;
    if (rdata !== held) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
