// tb_vliw_des: DES encryption on the cryptoprocessor, at the default sizes.
//
// The testbench loads the eight DES S-boxes (tb/des_sbox.hex) into the
// D-CACHE as 4-bit entries at 0x100 + 64*n + 16*row + col, computes the
// sixteen 48-bit round keys from the DES key in software (PC-1, rotations,
// PC-2) and stores them at 0x020.., then generates and runs a straight-line
// program of 360 VLIW words:
//   initial permutation IP            - 4 PERBIT, then split into R0 / L0
//   16 rounds of 21 words each:
//     E expansion (PERINIC + 3 PERBIT), XOR with the round key (ALU1),
//     SBOXINIC + 8 SBOX (S8 first: AC1 walks the 48-bit value from bit 0),
//     P permutation (PERINIC + 2 PERBIT), L ^ f (ALU2); the L/R swap is
//     done by MOVs in free slots of the key-XOR and first SBOX words
//   pre-output swap, final permutation FP (4 PERBIT), STORE, halt.
// DES numbers bits from 1 at the most significant end; this processor counts
// from bit 0 at the least significant end, so a DES table entry T[j] of an
// n_in -> n_out permutation becomes "destination bit n_out-j takes source bit
// n_in-T[j]". IP, FP and E are generated from their closed forms; P, PC-1
// and PC-2 are listed. Checked against the standard known-answer pairs; the
// cycle count is checked against one word per cycle.
module tb_vliw_des;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
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

  // ---- DES tables, 1-based from the most significant bit ----
  int p_tab[32]  = '{16,7,20,21,29,12,28,17,1,15,23,26,5,18,31,10,
                     2,8,24,14,32,27,3,9,19,13,30,6,22,11,4,25};
  int pc1[56]    = '{57,49,41,33,25,17,9,1,58,50,42,34,26,18,10,2,59,51,43,35,27,19,11,3,
                     60,52,44,36,63,55,47,39,31,23,15,7,62,54,46,38,30,22,14,6,61,53,45,37,
                     29,21,13,5,28,20,12,4};
  int pc2[48]    = '{14,17,11,24,1,5,3,28,15,6,21,10,23,19,12,4,26,8,16,7,27,20,13,2,
                     41,52,31,37,47,55,30,40,51,45,33,48,44,49,39,56,34,53,46,42,50,36,29,32};
  int shifts[16] = '{1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1};
  int ip_tab[64], fp_tab[64], e_tab[48];
  logic [3:0] sbox_rom [512];

  localparam addr_t A_PT = 16'h0000, A_CT = 16'h0001, A_KEYS = 16'h0020, A_SB = 16'h0100;

  // DES-style permutation of a value (software reference for the key schedule)
  function automatic logic [63:0] des_perm(logic [63:0] x, int tab[], int nin);
    logic [63:0] r = '0;
    foreach (tab[j]) r = {r[62:0], x[nin - tab[j]]};
    return r;
  endfunction

  // PERBIT word for outputs [first, first+16) of an nin -> nout DES table,
  // written to A5 bits counted from PERAC
  function automatic logic [WORD_W-1:0] perbit_des(int tab[], int nin, int nout, int first);
    logic [PERM_N-1:0][7:0] idx;
    for (int i = 0; i < PERM_N; i++) begin
      int p = first + i;                 // destination bit, LSB-first
      idx[i] = 8'(nin - tab[nout - 1 - p]);
    end
    return enc_perbit(idx);
  endfunction

  // PERBIT word copying source bits [first, first+16) unchanged
  function automatic logic [WORD_W-1:0] perbit_copy(int first);
    logic [PERM_N-1:0][7:0] idx;
    for (int i = 0; i < PERM_N; i++) idx[i] = 8'(first + i);
    return enc_perbit(idx);
  endfunction

  function automatic logic [WORD_W-1:0] w1(logic [SLOT_W-1:0] s0);
    return word4(s0, enc_nop(), enc_nop(), enc_nop());
  endfunction

  function automatic logic [WORD_W-1:0] w2(logic [SLOT_W-1:0] s0, logic [SLOT_W-1:0] s1);
    return word4(s0, s1, enc_nop(), enc_nop());
  endfunction

  logic [WORD_W-1:0] prog [$];

  task automatic build_program();
    sbox_cfg_t cfg = '{sboxend: A_SB, sboxcol: 16'd16, sboxq: 16'd64, tbo: 6'd6, tbd: 6'd4,
                       lin: 32'h21, col: 32'h1E, bmode: 1'b0};
    prog.delete();
    // initial permutation; R0 -> A2, L0 -> X (upper bits are ignored)
    prog.push_back(w2(enc(UF_LS, OP_LOAD, f_mem(R_B5, 1'b0, A_PT)), enc(UF_PERM, OP_PERINIC, 32'd0)));
    for (int q = 0; q < 4; q++) prog.push_back(perbit_des(ip_tab, 64, 64, 16 * q));
    prog.push_back(w2(enc(UF_MB, OP_MOV, f_regs(R_B5, R_A5)), enc(UF_PERM, OP_PERINIC, 32'd0)));
    prog.push_back(perbit_copy(32));
    prog.push_back(perbit_copy(48));
    prog.push_back(w1(enc(UF_MB, OP_MOV, f_regs(R_X, R_A5))));
    prog.push_back(w1(enc(UF_MB, OP_MOV, f_regs(R_A2, R_B5))));
    // 16 rounds; on entry A2 = R and X = L
    for (int r = 0; r < 16; r++) begin
      // R to the permutation source; round key: absolute address for round 1, then streamed through DPC
      prog.push_back(word4(enc(UF_MB, OP_MOV, f_regs(R_B5, R_A2)), enc(UF_PERM, OP_PERINIC, 32'd0),
                           enc(UF_LS, OP_LOAD, f_mem(R_B1, r != 0, A_KEYS)), enc_nop()));
      for (int q = 0; q < 3; q++) prog.push_back(perbit_des(e_tab, 32, 48, 16 * q));
      prog.push_back(w1(enc(UF_MB, OP_MOV, f_regs(R_A1, R_A5))));
      prog.push_back(w2(enc(UF_ALU1, OP_XOR), enc(UF_MB, OP_MOV, f_regs(R_A2, R_X))));   // A2 = L
      prog.push_back(w1(enc(UF_MB, OP_MOV, f_regs(R_B6, R_A1))));
      prog.push_back(enc_sboxinic(cfg));
      for (int n = 7; n >= 0; n--)
        prog.push_back(w2(enc(UF_SBOX, OP_SBOX, 32'(n)),
                          (n == 7) ? enc(UF_MB, OP_MOV, f_regs(R_X, R_B5)) : enc_nop()));  // X = R, the next L
      prog.push_back(w2(enc(UF_MB, OP_MOV, f_regs(R_B5, R_A6)), enc(UF_PERM, OP_PERINIC, 32'd0)));
      prog.push_back(perbit_des(p_tab, 32, 32, 0));
      prog.push_back(perbit_des(p_tab, 32, 32, 16));
      prog.push_back(w1(enc(UF_MB, OP_MOV, f_regs(R_B2, R_A5))));
      prog.push_back(w1(enc(UF_ALU2, OP_XOR)));                     // A2 = L ^ f, the next R
    end
    // pre-output R16 || L16 (A2 || X), final permutation, store, halt
    prog.push_back(w2(enc(UF_PERM, OP_PERINIC, 32'd0), enc(UF_MB, OP_MOV, f_regs(R_B5, R_X))));
    prog.push_back(perbit_copy(0));
    prog.push_back(perbit_copy(16));
    prog.push_back(w1(enc(UF_MB, OP_MOV, f_regs(R_B5, R_A2))));
    prog.push_back(perbit_copy(0));
    prog.push_back(perbit_copy(16));
    prog.push_back(w2(enc(UF_MB, OP_MOV, f_regs(R_B5, R_A5)), enc(UF_PERM, OP_PERINIC, 32'd0)));
    for (int q = 0; q < 4; q++) prog.push_back(perbit_des(fp_tab, 64, 64, 16 * q));
    prog.push_back(w1(enc(UF_LS, OP_STORE, f_mem(R_A5, 1'b0, A_CT))));
    prog.push_back(w1(enc(UF_MB, OP_JMP, f_br(R_X, R_X, addr_t'(prog.size())))));
    prog.push_back(w1(enc_nop()));
  endtask

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

  task automatic encrypt(logic [63:0] key, logic [63:0] pt, logic [63:0] exp_ct);
    logic [55:0] cd;
    logic [27:0] c, d;
    data_t v;
    int cycles;
    cd = 56'(des_perm(key, pc1, 64));
    c = cd[55:28];
    d = cd[27:0];
    for (int r = 0; r < 16; r++) begin
      c = (c << shifts[r]) | (c >> (28 - shifts[r]));
      d = (d << shifts[r]) | (d >> (28 - shifts[r]));
      dwrite(A_KEYS + addr_t'(r), data_t'(des_perm({8'd0, c, d}, pc2, 56)));
    end
    dwrite(A_PT, data_t'(pt));
    @(negedge clk);
    start = 1; start_addr = 16'd0;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 2000) begin @(negedge clk); cycles++; end
    dread(A_CT, v);
    chk(done && !word_error, "program finished cleanly");
    chk(v == data_t'(exp_ct), $sformatf("DES(%h, %h) = %h, expected %h", key, pt, v[63:0], exp_ct));
    chk(cycles == prog.size() + 4, $sformatf("%0d cycles for %0d words", cycles, prog.size()));
    $display("DES key=%h pt=%h ct=%h: %0d words, %0d cycles, %0.2f cycles/bit",
             key, pt, v[63:0], prog.size(), cycles, real'(cycles) / 64.0);
  endtask

  initial begin
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) ip_tab[8 * r + c] = ((r < 4) ? 58 + 2 * r : 57 + 2 * (r - 4)) - 8 * c;
    foreach (ip_tab[j]) fp_tab[ip_tab[j] - 1] = j + 1;
    for (int k = 0; k < 8; k++)
      for (int m = 0; m < 6; m++) e_tab[6 * k + m] = ((4 * k + m + 31) % 32) + 1;
    $readmemh("tb/des_sbox.hex", sbox_rom);

    start = 0; start_addr = 0;
    host_i_we = 0; host_i_addr = 0; host_i_wdata = 0;
    host_d_we = 0; host_d_re = 0; host_d_addr = 0; host_d_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int i = 0; i < 512; i++) dwrite(A_SB + addr_t'(i), data_t'(sbox_rom[i]));
    build_program();
    foreach (prog[i]) begin
      @(negedge clk);
      host_i_we = 1; host_i_addr = addr_t'(i); host_i_wdata = prog[i];
    end
    @(negedge clk);
    host_i_we = 0;

    // slot utilisation of the program: wide words count as four slots
    begin
      automatic int used = 0;
      foreach (prog[i]) begin
        if (prog[i][4:0] == OP_PERBIT || prog[i][4:0] == OP_SBOXINIC) used += 4;
        else for (int k = 0; k < NSLOT; k++) used += int'(prog[i][k * SLOT_W +: 5] != OP_NOP);
      end
      $display("slot utilisation %0.2f%% (%0d of %0d slots)", 100.0 * used / (4 * prog.size()),
               used, 4 * prog.size());
    end
    encrypt(64'h1334_5779_9BBC_DFF1, 64'h0123_4567_89AB_CDEF, 64'h85E8_1354_0F0A_B405);
    encrypt(64'h0E32_9232_EA6D_0D73, 64'h8787_8787_8787_8787, 64'h0000_0000_0000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
