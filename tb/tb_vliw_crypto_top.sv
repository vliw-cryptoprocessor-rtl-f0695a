// tb_vliw_crypto_top: end-to-end test of the cryptoprocessor at its default
// sizes (2^16-word I-CACHE and D-CACHE).
//
// The host port loads a program and its data, starts the core and reads the
// results back. The program computes one DES round function f(R, K):
//   expansion E of the 32-bit R to 48 bits (PERINIC + 3 PERBIT words),
//   XOR with the 48-bit subkey K (ALU1),
//   eight 6->4 bit S-box lookups from tables in the D-CACHE (SBOXINIC +
//   8 SBOX words; the table contents are random, set by this testbench),
//   the 32-bit permutation P (PERINIC + 2 PERBIT words),
// and stores f. It then runs a counted loop (DEC / ROL / SHL with JG and a
// delay slot), a word where two slots write the same register, a STORE
// followed at once by a LOAD of the same address, and a word that breaks the
// exclusive D-CACHE rule, and halts. Expected values come from a software
// model of the same steps. Each mechanism is counted from the core's signals
// and must occur at least once; the cycle count is checked against the
// stall-free pipeline (one word per cycle plus fill and drain).
module tb_vliw_crypto_top;
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
  logic              host_i_we, host_d_we, host_d_re;
  addr_t             host_i_addr, host_d_addr;
  logic [WORD_W-1:0] host_i_wdata;
  data_t             host_d_wdata, host_d_rdata;

  vliw_crypto_top dut (
    .clk, .rst_n, .start, .start_addr, .busy, .done, .word_error,
    .host_i_we, .host_i_addr, .host_i_wdata,
    .host_d_we, .host_d_re, .host_d_addr, .host_d_wdata, .host_d_rdata
  );

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---- DES tables (0-based, output bit i takes input bit tab[i]) ----
  int e_tab[48] = '{31,0,1,2,3,4,3,4,5,6,7,8,7,8,9,10,11,12,11,12,13,14,15,16,
                    15,16,17,18,19,20,19,20,21,22,23,24,23,24,25,26,27,28,27,28,29,30,31,0};
  int p_tab[32] = '{15,6,19,20,28,11,27,16,0,14,22,25,4,17,30,9,
                    1,7,23,13,31,26,2,8,18,12,29,5,21,10,3,24};

  localparam addr_t A_R = 16'd0, A_K = 16'd1, A_F = 16'd2, A_N = 16'd3, A_ROT = 16'd4,
                    A_PRI = 16'd5, A_FWD = 16'd6, A_EXC = 16'd7, A_SB = 16'h0100;

  logic [3:0] sb [8][64];
  logic [WORD_W-1:0] prog [$];

  // ---- host helpers ----
  task automatic dwrite(addr_t a, data_t v);
    @(negedge clk);
    host_d_we = 1; host_d_addr = a; host_d_wdata = v;
    @(negedge clk);
    host_d_we = 0;
  endtask

  task automatic dread(addr_t a, output data_t v);
    @(negedge clk);
    host_d_re = 1; host_d_addr = a;
    @(negedge clk);
    host_d_re = 0;
    v = host_d_rdata;
  endtask

  function automatic logic [WORD_W-1:0] w1(logic [SLOT_W-1:0] s0);
    return word4(s0, enc_nop(), enc_nop(), enc_nop());
  endfunction

  function automatic logic [WORD_W-1:0] perbit_of(int tab[], int first);
    logic [PERM_N-1:0][7:0] idx;
    for (int i = 0; i < PERM_N; i++) idx[i] = 8'(tab[first + i]);
    return enc_perbit(idx);
  endfunction

  // ---- mechanism counters ----
  int n_reg_bypass, n_mem_bypass, n_taken, n_not_taken, n_slot_override, n_excl,
      n_fwd, n_full_word, n_perbit, n_sboxinic, n_sbox, n_halt, n_words;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.s2_valid) begin
      n_words++;
      for (int i = 0; i < NWR; i++)
        if (dut.u_core.wr3[i].we) begin
          if (dut.u_core.wr3[i].src == WS_VAL) n_reg_bypass++;
          else n_mem_bypass++;
          break;
        end
      if (dut.u_core.ui[UF_MB].valid && dut.u_core.ui[UF_MB].op inside {OP_JZ, OP_JL, OP_JG, OP_JMP})
        if (dut.u_core.taken) n_taken++; else n_not_taken++;
      if (dut.u_core.excl_drop) n_excl++;
      if (dut.u_core.halt) n_halt++;
      begin
        automatic int nv = 0;
        for (int u = 0; u < NUF; u++) nv += int'(dut.u_core.ui[u].valid);
        if (nv == 4) n_full_word++;
      end
      if (dut.u_core.ui[UF_PERM].valid && dut.u_core.ui[UF_PERM].op == OP_PERBIT) n_perbit++;
      if (dut.u_core.ui[UF_SBOX].valid && dut.u_core.ui[UF_SBOX].op == OP_SBOXINIC) n_sboxinic++;
      if (dut.u_core.ui[UF_SBOX].valid && dut.u_core.ui[UF_SBOX].op == OP_SBOX) n_sbox++;
      for (int i = 0; i < NWR; i++)
        for (int j = i + 1; j < NWR; j++)
          if (dut.u_core.wr2[i].we && dut.u_core.wr2[j].we && dut.u_core.wr2[i].dst == dut.u_core.wr2[j].dst
              && (i / WR_PER_SLOT) != (j / WR_PER_SLOT)) n_slot_override++;
    end
    if (dut.u_core.fwd3) n_fwd++;
  end

  initial begin
    logic [31:0] r;
    logic [47:0] k, e, x;
    logic [31:0] s_out, f;
    data_t v, rot0;
    int cycles, loop_n;

    start = 0; start_addr = 0;
    host_i_we = 0; host_i_addr = 0; host_i_wdata = 0;
    host_d_we = 0; host_d_re = 0; host_d_addr = 0; host_d_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- data ----
    r = $urandom;
    k = {16'($urandom), $urandom};
    rot0 = {$urandom, $urandom, $urandom, $urandom};
    loop_n = 3;
    for (int n = 0; n < 8; n++)
      for (int i = 0; i < 64; i++) sb[n][i] = 4'($urandom);
    dwrite(A_R, data_t'(r));
    dwrite(A_K, data_t'(k));
    dwrite(A_N, data_t'(loop_n));
    dwrite(A_ROT, rot0);
    for (int n = 0; n < 8; n++)
      for (int i = 0; i < 64; i++) dwrite(A_SB + addr_t'(64 * n + i), data_t'(sb[n][i]));

    // ---- program ----
    prog.push_back(word4(enc(UF_LS, OP_LOAD, f_mem(R_B5, 1'b0, A_R)),
                         enc(UF_PERM, OP_PERINIC, 32'd0),
                         enc(UF_MB, OP_MOV, f_regs(R_A6, R_X)), enc_nop()));              // 0
    prog.push_back(perbit_of(e_tab, 0));                                                  // 1
    prog.push_back(perbit_of(e_tab, 16));                                                 // 2
    prog.push_back(perbit_of(e_tab, 32));                                                 // 3
    prog.push_back(word4(enc(UF_LS, OP_LOAD, f_mem(R_B1, 1'b0, A_K)),
                         enc(UF_MB, OP_MOV, f_regs(R_A1, R_A5)), enc_nop(), enc_nop()));  // 4
    prog.push_back(w1(enc(UF_ALU1, OP_XOR)));                                             // 5
    prog.push_back(word4(enc(UF_MB, OP_MOV, f_regs(R_B6, R_A1)),
                         enc(UF_LS, OP_LOAD, f_mem(R_A2, 1'b0, A_N)), enc_nop(), enc_nop())); // 6
    prog.push_back(enc_sboxinic('{sboxend: A_SB, sboxcol: 16'd16, sboxq: 16'd64, tbo: 6'd6,
                                  tbd: 6'd4, lin: 32'h21, col: 32'h1E, bmode: 1'b0}));     // 7
    for (int n = 0; n < 8; n++)
      prog.push_back(w1(enc(UF_SBOX, OP_SBOX, 32'(n))));                                   // 8..15
    prog.push_back(word4(enc(UF_MB, OP_MOV, f_regs(R_B5, R_A6)),
                         enc(UF_PERM, OP_PERINIC, 32'd0),
                         enc(UF_LS, OP_LOAD, f_mem(R_A4, 1'b0, A_ROT)), enc_nop()));       // 16
    prog.push_back(perbit_of(p_tab, 0));                                                  // 17
    prog.push_back(perbit_of(p_tab, 16));                                                 // 18
    prog.push_back(w1(enc(UF_LS, OP_STORE, f_mem(R_A5, 1'b0, A_F))));                     // 19
    // 20: counted loop, four units busy; JG reads A2 before this word's DEC
    prog.push_back(word4(enc(UF_ALU2, OP_DEC), enc(UF_ROT, OP_ROL, 32'd0),
                         enc(UF_MB, OP_JG, f_br(R_A2, R_X, 16'd20)),
                         enc(UF_SHF, OP_SHL, 32'd3)));
    prog.push_back(w1(enc(UF_ALU1, OP_INC)));                                             // 21 delay slot
    // 22: slot 0 INC A1, slot 2 MOV A1 <- A4: the later slot wins
    prog.push_back(word4(enc(UF_ALU1, OP_INC), enc_nop(),
                         enc(UF_MB, OP_MOV, f_regs(R_A1, R_A4)), enc_nop()));
    prog.push_back(w1(enc(UF_LS, OP_STORE, f_mem(R_A1, 1'b0, A_PRI))));                   // 23
    prog.push_back(w1(enc(UF_LS, OP_LOAD, f_mem(R_X, 1'b0, A_PRI))));                     // 24 forwarded
    prog.push_back(w1(enc(UF_LS, OP_STORE, f_mem(R_X, 1'b0, A_FWD))));                    // 25
    // 26: SBOX and LOAD together: the LOAD into B2 is dropped
    prog.push_back(word4(enc(UF_SBOX, OP_SBOX, 32'd0),
                         enc(UF_LS, OP_LOAD, f_mem(R_B2, 1'b0, A_R)), enc_nop(), enc_nop()));
    prog.push_back(w1(enc(UF_LS, OP_STORE, f_mem(R_B2, 1'b0, A_EXC))));                   // 27
    prog.push_back(w1(enc(UF_MB, OP_JMP, f_br(R_X, R_X, 16'd28))));                       // 28 halt
    prog.push_back(w1(enc_nop()));                                                        // 29 delay slot

    foreach (prog[i]) begin
      @(negedge clk);
      host_i_we = 1; host_i_addr = addr_t'(i); host_i_wdata = prog[i];
    end
    @(negedge clk);
    host_i_we = 0;

    // ---- run ----
    start = 1; start_addr = 16'd0;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 1000) begin @(negedge clk); cycles++; end
    chk(done, "program finished");

    // ---- reference model ----
    for (int i = 0; i < 48; i++) e[i] = r[e_tab[i]];
    x = e ^ k;
    for (int n = 0; n < 8; n++) begin
      logic [5:0] o;
      o = x[6 * n +: 6];
      s_out[4 * n +: 4] = sb[n][{o[5], o[0], o[4:1]}];
    end
    for (int i = 0; i < 32; i++) f[i] = s_out[p_tab[i]];

    dread(A_F, v);
    chk(v == data_t'(f), $sformatf("f(R,K) = %h, expected %h", v, f));
    // loop: body runs loop_n+1 times, ROL by 1 and SHL by 8 each time
    dread(A_PRI, v);
    chk(v == ((rot0 << (loop_n + 1)) | (rot0 >> (128 - (loop_n + 1)))), "slot priority / loop ROL");
    dread(A_FWD, v);
    chk(v == ((rot0 << (loop_n + 1)) | (rot0 >> (128 - (loop_n + 1)))), "store-to-load forwarding");
    dread(A_EXC, v);
    chk(v == '0, "exclusive LOAD dropped");
    chk(word_error, "word_error flags the dropped slot");
    chk(dut.u_core.u_regs.q[R_A2] == '1, "DEC ran loop_n+1 times");
    chk(dut.u_core.u_regs.q[R_A3] == '0, "SHL");
    chk(dut.u_core.u_regs.q[R_JPC] == data_t'(16'd28), "JPC holds last target");
    chk(dut.u_core.u_regs.q[R_AC1] == data_t'(16'd54) && dut.u_core.u_regs.q[R_AC2] == data_t'(16'd36),
        "AC1/AC2 after nine SBOX");

    // ---- timing: 30 words + 2*loop_n repeated loop words, one per cycle,
    // plus one start cycle and three cycles of pipeline fill/drain ----
    chk(n_words == 30 + 2 * loop_n, $sformatf("words executed %0d", n_words));
    chk(cycles == n_words + 4, $sformatf("cycles %0d for %0d words", cycles, n_words));

    // ---- every mechanism happened ----
    chk(n_reg_bypass > 0, "register bypass");
    chk(n_mem_bypass > 0, "D-CACHE data bypass");
    chk(n_taken > 0 && n_not_taken > 0, "branch taken / not taken");
    chk(n_slot_override > 0, "later slot overrides");
    chk(n_excl > 0, "exclusive rule");
    chk(n_fwd > 0, "store-to-load forwarding");
    chk(n_full_word > 0, "four instructions in a word");
    chk(n_perbit == 5 && n_sboxinic == 1 && n_sbox == 9, "wide and special instructions");
    chk(n_halt == 1, "halt");
    $display("words=%0d cycles=%0d bypass=%0d/%0d taken=%0d/%0d override=%0d excl=%0d fwd=%0d full=%0d",
             n_words, cycles, n_reg_bypass, n_mem_bypass, n_taken, n_not_taken, n_slot_override,
             n_excl, n_fwd, n_full_word);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
