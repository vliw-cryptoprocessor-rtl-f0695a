// tb_vliw_core: test of the core with memories modelled in the testbench.
// Runs a program that streams eight 128-bit words from the data memory
// through DPC-relative LOAD, adds them in ALU2 and XORs them in ALU1 inside a
// loop closed by JL, checks that an ADD and a MOV in one word both read the
// registers as they were before the word, narrows a 128-bit value into a
// 16-bit counter, streams the results back with DPC-relative STORE, and halts.
// Expected values are computed by the testbench; the cycle count is checked
// against one word per cycle. The program is run 20 times with fresh data.
module tb_vliw_core;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic              start, busy, done, word_error;
  addr_t             start_addr;
  logic              imem_re, dmem_re, dmem_we;
  addr_t             imem_addr, dmem_raddr, dmem_waddr;
  logic [WORD_W-1:0] imem_rdata;
  data_t             dmem_rdata, dmem_wdata;

  vliw_core dut (.clk, .rst_n, .start, .start_addr, .busy, .done, .word_error,
                 .imem_re, .imem_addr, .imem_rdata, .dmem_re, .dmem_raddr, .dmem_rdata,
                 .dmem_we, .dmem_waddr, .dmem_wdata);

  // behavioural synchronous memories
  logic [WORD_W-1:0] imem [256];
  data_t             dmem [256];
  always @(posedge clk) begin
    if (imem_re) imem_rdata <= imem[imem_addr[7:0]];
    if (dmem_re) dmem_rdata <= dmem[dmem_raddr[7:0]];
    if (dmem_we && rst_n) dmem[dmem_waddr[7:0]] <= dmem_wdata;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [WORD_W-1:0] w1(logic [SLOT_W-1:0] s0);
    return word4(s0, enc_nop(), enc_nop(), enc_nop());
  endfunction

  initial begin
    data_t src [8];
    data_t sum, x;
    int cycles, pc;
    for (int i = 0; i < 256; i++) begin imem[i] = '0; dmem[i] = '0; end
    dmem[8] = data_t'(25);                                    // loop bound for DPC
    pc = 0;
    // 0: A2 <- 0, A1 <- 0, X <- 25
    imem[pc++] = word4(enc(UF_ALU2, OP_CLR), enc(UF_ALU1, OP_CLR),
                       enc(UF_LS, OP_LOAD, f_mem(R_X, 1'b0, 16'd8)), enc_nop());
    imem[pc++] = w1(enc(UF_LS, OP_LOAD, f_mem(R_B2, 1'b0, 16'd16)));       // 1: B2 <- src[0], DPC=17
    imem[pc++] = w1(enc(UF_MB, OP_MOV, f_regs(R_B1, R_B2)));               // 2: B1 <- B2
    // 3 (loop): A2 += B2, A1 ^= B1, B2 <- [DPC++]
    imem[pc++] = word4(enc(UF_ALU2, OP_ADD), enc(UF_ALU1, OP_XOR),
                       enc(UF_LS, OP_LOAD, f_mem(R_B2, 1'b1, 16'd0)), enc_nop());
    imem[pc++] = w1(enc(UF_MB, OP_MOV, f_regs(R_B1, R_B2)));               // 4: B1 <- new B2
    imem[pc++] = w1(enc(UF_MB, OP_MOV, f_regs(R_A5, R_DPC)));              // 5: A5 <- DPC
    imem[pc++] = w1(enc(UF_MB, OP_JL, f_br(R_A5, R_X, 16'd3)));            // 6: loop while DPC < 25
    imem[pc++] = w1(enc_nop());                                             // 7: delay slot
    // 8: ADD and MOV in one word both read A2 and B2 as they were before it
    imem[pc++] = word4(enc(UF_ALU2, OP_ADD), enc(UF_MB, OP_MOV, f_regs(R_B2, R_A2)),
                       enc_nop(), enc_nop());
    imem[pc++] = w1(enc(UF_LS, OP_STORE, f_mem(R_A2, 1'b0, 16'd40)));     // 9: [40], DPC=41
    imem[pc++] = w1(enc(UF_LS, OP_STORE, f_mem(R_B2, 1'b1, 16'd0)));      // 10: [41]
    imem[pc++] = w1(enc(UF_MB, OP_MOV, f_regs(R_SPC, R_A1)));             // 11: narrowing MOV
    imem[pc++] = w1(enc(UF_MB, OP_MOV, f_regs(R_B5, R_SPC)));             // 12
    imem[pc++] = w1(enc(UF_LS, OP_STORE, f_mem(R_B5, 1'b1, 16'd0)));      // 13: [42]
    imem[pc] = w1(enc(UF_MB, OP_JMP, f_br(R_X, R_X, 16'(pc))));           // 14: halt
    pc++;
    imem[pc++] = w1(enc_nop());                                             // 15: delay slot

    start = 0; start_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the same program, restarted with fresh data each time
    for (int run = 0; run < 20; run++) begin
      for (int i = 0; i < 8; i++) begin
        src[i] = {$urandom, $urandom, $urandom, $urandom};
        dmem[16 + i] = src[i];
      end
      dmem[24] = {$urandom, $urandom, $urandom, $urandom};   // read by the last pass only
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done && cycles < 500) begin @(negedge clk); cycles++; end
      chk(done && !word_error, "finished cleanly");

      // reference: eight passes of the loop accumulate src[0..7]
      sum = '0; x = '0;
      for (int i = 0; i < 8; i++) begin sum += src[i]; x ^= src[i]; end
      chk(dmem[40] == sum + dmem[24], "ADD in word 8 used the old B2");
      chk(dmem[41] == sum, "MOV in word 8 used the old A2");
      chk(dmem[42] == data_t'(x[15:0]), "narrowing MOV through SPC");
      chk(dut.u_regs.q[R_A1] == x, "XOR accumulation");
      chk(dut.u_regs.q[R_DPC] == data_t'(16'd43), "DPC streaming");
      // 3 + 8 passes of 5 words + 8 tail words; + start cycle + fill/drain
      chk(cycles == 3 + 8 * 5 + 8 + 4, $sformatf("cycles=%0d", cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
