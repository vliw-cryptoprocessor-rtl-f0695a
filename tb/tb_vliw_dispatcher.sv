// tb_vliw_dispatcher: self-checking test of the dispatcher: a full word of
// four independent instructions, the wide PERBIT/SBOXINIC words, and each of
// the word rules (unit used twice, two D-CACHE instructions, opcode on the
// wrong unit, wide opcode outside slot 0), then 2000 random words compared
// with a reference model of the word rules written here.
module tb_vliw_dispatcher;
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

  logic              valid;
  logic [WORD_W-1:0] word;
  uinst_t            uinst [NUF];
  logic [WORD_W-1:8] payload;
  logic              conflict, excl_drop;
  vliw_dispatcher dut (.valid, .word, .uinst, .payload, .conflict, .excl_drop);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int nvalid();
    int n = 0;
    for (int u = 0; u < NUF; u++) n += int'(uinst[u].valid);
    return n;
  endfunction


  // reference: the unit that executes an opcode (-1: none, -2: ALU1 or ALU2)
  function automatic int unit_of(int op);
    if (op >= 1 && op <= 9) return -2;
    if (op == 10 || op == 11) return 2;
    if (op == 12 || op == 13) return 3;
    if (op == 14 || op == 15) return 4;
    if (op == 16 || op == 17) return 5;
    if (op == 18 || op == 19) return 6;
    if (op >= 20 && op <= 24) return 7;
    return -1;
  endfunction

  task automatic random_word();
    logic [NSLOT-1:0][SLOT_W-1:0] sl;
    logic exp_v[NUF];
    int   exp_slot[NUF];
    logic exp_conf = 0, exp_excl = 0, excl = 0;
    for (int i = 0; i < NSLOT; i++) begin
      int op = $urandom_range(0, 26);
      int u = unit_of(op);
      int uf = ($urandom_range(0, 3) != 0 && u != -1) ? ((u == -2) ? $urandom_range(0, 1) : u)
                                                       : $urandom_range(0, 7);
      if ($urandom_range(0, 3) == 0) op = 0;
      sl[i] = {32'($urandom), 3'(uf), 5'(op)};
    end
    if ($urandom_range(0, 9) == 0) sl[0][4:0] = 5'($urandom_range(15, 16));
    word = sl;
    foreach (exp_v[u]) begin exp_v[u] = 0; exp_slot[u] = 0; end
    if (sl[0][4:0] == 5'd15 || sl[0][4:0] == 5'd16) begin
      if (int'(sl[0][7:5]) == unit_of(int'(sl[0][4:0]))) begin
        exp_v[sl[0][7:5]] = 1;
      end else exp_conf = 1;
    end else begin
      for (int i = 0; i < NSLOT; i++) begin
        int op = int'(sl[i][4:0]), uf = int'(sl[i][7:5]), u = unit_of(op);
        logic ok_unit = (u == -2) ? (uf <= 1) : (u == uf);
        if (op == 0) continue;
        if (!ok_unit || op == 15 || op == 16 || exp_v[uf]) exp_conf = 1;
        else if ((op >= 17 && op <= 19) && excl) begin exp_conf = 1; exp_excl = 1; end
        else begin
          exp_v[uf] = 1;
          exp_slot[uf] = i;
          if (op >= 17 && op <= 19) excl = 1;
        end
      end
    end
    #1;
    begin
      logic ok = (conflict == exp_conf) && (excl_drop == exp_excl);
      for (int u = 0; u < NUF; u++) begin
        if (uinst[u].valid != exp_v[u]) ok = 0;
        else if (exp_v[u] && (int'(uinst[u].slot) != exp_slot[u]
                 || uinst[u].op != op_e'(sl[exp_slot[u]][4:0])
                 || uinst[u].field != sl[exp_slot[u]][39:8])) ok = 0;
      end
      chk(ok, $sformatf("random word %h", word));
    end
  endtask

  initial begin
    valid = 1'b1;
    // [ADD | INC (ALU2) | MOV | LOAD]
    word = word4(enc(UF_ALU1, OP_ADD), enc(UF_ALU2, OP_INC),
                 enc(UF_MB, OP_MOV, f_regs(R_A1, R_A3)), enc(UF_LS, OP_LOAD, f_mem(R_B1, 1'b0, 16'h77)));
    #1;
    chk(!conflict && nvalid() == 4, "four instructions");
    chk(uinst[UF_ALU1].op == OP_ADD && uinst[UF_ALU1].slot == 0, "slot 0 to ALU1");
    chk(uinst[UF_ALU2].op == OP_INC && uinst[UF_ALU2].slot == 1, "slot 1 to ALU2");
    chk(uinst[UF_MB].slot == 2 && uinst[UF_MB].field == f_regs(R_A1, R_A3), "slot 2 to MB");
    chk(uinst[UF_LS].slot == 3 && uinst[UF_LS].field == f_mem(R_B1, 1'b0, 16'h77), "slot 3 to LS");

    // NOPs only
    word = word4(enc_nop(), enc_nop(), enc_nop(), enc_nop());
    #1;
    chk(!conflict && nvalid() == 0, "all NOP");

    // same unit twice: only the first runs
    word = word4(enc(UF_ALU1, OP_XOR), enc(UF_ALU1, OP_AND), enc_nop(), enc_nop());
    #1;
    chk(conflict && !excl_drop && nvalid() == 1 && uinst[UF_ALU1].op == OP_XOR, "unit twice");

    // SBOX and LOAD in one word (exclusive)
    word = word4(enc(UF_SBOX, OP_SBOX, 32'd2), enc(UF_LS, OP_LOAD), enc(UF_SHF, OP_SHL), enc_nop());
    #1;
    chk(conflict && excl_drop && uinst[UF_SBOX].valid && !uinst[UF_LS].valid
        && uinst[UF_SHF].valid, "exclusive");

    // opcode on a unit that does not execute it
    word = word4(enc(UF_ROT, OP_SHL), enc_nop(), enc_nop(), enc_nop());
    #1;
    chk(conflict && nvalid() == 0, "wrong unit");

    // wide opcode outside slot 0
    word = word4(enc_nop(), enc(UF_PERM, OP_PERBIT), enc_nop(), enc_nop());
    #1;
    chk(conflict && nvalid() == 0, "wide op in slot 1");

    // PERBIT occupies the word
    begin
      logic [PERM_N-1:0][7:0] idx;
      for (int i = 0; i < PERM_N; i++) idx[i] = 8'($urandom);
      word = enc_perbit(idx);
      #1;
      chk(!conflict && nvalid() == 1 && uinst[UF_PERM].op == OP_PERBIT && payload[135:8] == idx,
          "perbit wide");
    end
    // SBOXINIC occupies the word
    word = enc_sboxinic('{sboxend: 16'h10, sboxcol: 16'd16, sboxq: 16'd64, tbo: 6'd6, tbd: 6'd4,
                          lin: 32'h21, col: 32'h1E, bmode: 1'b0});
    #1;
    chk(!conflict && nvalid() == 1 && uinst[UF_SBOX].op == OP_SBOXINIC, "sboxinic wide");

    repeat (2000) random_word();

    valid = 1'b0;
    #1;
    chk(!conflict && nvalid() == 0, "bubble");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
