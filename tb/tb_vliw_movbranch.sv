// tb_vliw_movbranch: self-checking test of the move/branch unit: MOV between
// random registers, JMP, JZ/JL/JG on equal, smaller and larger operands, the
// halt convention (JMP to its own address) and JPC target reporting.
module tb_vliw_movbranch;
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
  addr_t  pc, target;
  data_t  regs [NREG], data;
  logic   dst_we, taken, halt;
  reg_e   dst;
  vliw_movbranch dut (.inst, .pc, .regs, .dst_we, .dst, .data, .taken, .target, .halt);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < NREG; i++) regs[i] = {$urandom, $urandom, $urandom, $urandom};
    pc = 16'd100;
    for (int t = 0; t < 200; t++) begin
      automatic reg_e d = reg_e'($urandom_range(0, NREG - 1));
      automatic reg_e s = reg_e'($urandom_range(0, NREG - 1));
      inst = '{valid: 1'b1, slot: 2'd3, op: OP_MOV, field: f_regs(d, s)};
      #1;
      chk(dst_we && dst == d && data == regs[s] && !taken, "mov");
    end
    for (int t = 0; t < 200; t++) begin
      automatic addr_t tg = 16'($urandom);
      automatic int kind = $urandom_range(0, 2);
      regs[R_A1] = {$urandom, $urandom, $urandom, $urandom};
      regs[R_B1] = (kind == 0) ? regs[R_A1] : {$urandom, $urandom, $urandom, $urandom};
      if (t % 7 == 0) regs[R_A1] = '0;
      inst = '{valid: 1'b1, slot: 2'd0, op: OP_JZ, field: f_br(R_A1, R_B1, tg)};
      #1;
      chk(taken == (regs[R_A1] == '0) && target == tg && !dst_we, "jz");
      inst.op = OP_JL;
      #1;
      chk(taken == (regs[R_A1] < regs[R_B1]), "jl");
      inst.op = OP_JG;
      #1;
      chk(taken == (regs[R_A1] > regs[R_B1]), "jg");
      inst.op = OP_JMP;
      #1;
      chk(taken && target == tg && halt == (tg == pc), "jmp");
    end
    inst = '{valid: 1'b1, slot: 2'd0, op: OP_JMP, field: f_br(R_X, R_X, 16'd100)};
    #1;
    chk(taken && halt, "halt");
    inst.valid = 1'b0;
    #1;
    chk(!taken && !halt && !dst_we, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
