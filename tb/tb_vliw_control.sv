// tb_vliw_control: self-checking test of the control unit: start, one fetch
// per cycle, stage valid bits, a taken branch with its delay slot, the halt
// word, the drain of the pipeline and the exact cycle at which `done` rises.
module tb_vliw_control;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic  start, taken, halt, imem_re, s2_valid, s3_valid, busy, done;
  addr_t start_addr, target, imem_addr, ipc, s2_pc;
  vliw_control dut (.clk, .rst_n, .start, .start_addr, .taken, .target, .halt, .imem_re,
                    .imem_addr, .ipc, .s2_valid, .s2_pc, .s3_valid, .busy, .done);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Program (addresses): 10 11 12 [13: branch to 20] 14(delay) 20 21 [22: halt] 23(delay)
  // Branch outcome is driven from the word address in the execute stage.
  always_comb begin
    taken  = s2_valid && (s2_pc == 16'd13 || s2_pc == 16'd22);
    target = (s2_pc == 16'd13) ? 16'd20 : 16'd22;
    halt   = s2_valid && s2_pc == 16'd22;
  end

  addr_t fetched [$];
  addr_t executed [$];
  int cycles = 0;

  always @(posedge clk) if (rst_n) begin
    if (imem_re) fetched.push_back(imem_addr);
    if (s2_valid) executed.push_back(s2_pc);
  end

  initial begin
    addr_t exp_exec[$] = '{16'd10, 16'd11, 16'd12, 16'd13, 16'd14, 16'd20, 16'd21, 16'd22, 16'd23};
    start = 0; start_addr = 16'd10;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !done && !imem_re, "idle after reset");
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done && cycles < 100) begin
      chk(!(s2_valid === 1'bx), "valid known");
      @(negedge clk);
      cycles++;
    end
    chk(done && !busy, "done");
    chk(executed.size() == exp_exec.size(), $sformatf("executed %0d words: %p", executed.size(), executed));
    foreach (exp_exec[i]) chk(i < executed.size() && executed[i] == exp_exec[i], $sformatf("exec order %0d", i));
    // 9 words executed; fetch starts the cycle after start, the pipeline fills
    // in 3 cycles and drains in 3 after the delay slot
    chk(cycles == 12, $sformatf("cycles=%0d", cycles));
    // restart from DONE
    executed.delete();
    start = 1; start_addr = 16'd20;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done && cycles < 100) begin @(negedge clk); cycles++; end
    chk(executed.size() == 4 && executed[0] == 16'd20 && executed[3] == 16'd23, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
