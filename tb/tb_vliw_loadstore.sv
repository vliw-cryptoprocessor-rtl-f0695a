// tb_vliw_loadstore: self-checking test of the load/store unit: absolute and
// DPC-relative LOAD and STORE, DPC update, and inactivity for other opcodes.
module tb_vliw_loadstore;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uinst_t inst;
  data_t  regs [NREG];
  logic   mem_re, mem_we, dst_we, dpc_we;
  addr_t  mem_addr, dpc_new;
  data_t  mem_wdata;
  reg_e   dst;
  vliw_loadstore dut (.inst, .regs, .mem_re, .mem_we, .mem_addr, .mem_wdata, .dst_we, .dst,
                      .dpc_we, .dpc_new);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      reg_e r;
      addr_t a, dpc;
      logic ind, is_load;
      for (int i = 0; i < NREG; i++) regs[i] = {$urandom, $urandom, $urandom, $urandom};
      dpc = 16'($urandom);
      regs[R_DPC] = data_t'(dpc);
      r = reg_e'($urandom_range(0, NREG - 1));
      a = 16'($urandom);
      ind = 1'($urandom);
      is_load = 1'($urandom);
      inst = '{valid: 1'b1, slot: 2'd2, op: is_load ? OP_LOAD : OP_STORE, field: f_mem(r, ind, a)};
      #1;
      chk(mem_addr == (ind ? dpc : a), "address");
      chk(dpc_we && dpc_new == (ind ? dpc : a) + 16'd1, "DPC update");
      if (is_load) chk(mem_re && !mem_we && dst_we && dst == r, "load");
      else         chk(mem_we && !mem_re && !dst_we && mem_wdata == regs[r], "store");
    end
    inst = '{valid: 1'b1, slot: 2'd0, op: OP_MOV, field: '0};
    #1;
    chk(!mem_re && !mem_we && !dst_we && !dpc_we, "other opcode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
