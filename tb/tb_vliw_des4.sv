// tb_vliw_des4: DES on four 64-bit blocks at once, at the default sizes.
//
// The four blocks are processed side by side in 32-bit lanes of the 128-bit
// registers: the R halves of blocks 0..3 sit in bits 0..31, 32..63, 64..95
// and 96..127 of one register, the L halves likewise in another. Each round
// expands two blocks at a time (6 PERBIT each) into B6, runs 16 SBOX words
// per pair, applies P to all four lanes (8 PERBIT) and XORs all four L
// halves with one ALU2 operation. Moves and the key XOR of the second pair
// ride in free slots of the S-box words, so a round is 61 words for four
// blocks against 24 for one. The round keys are stored twice side by side
// ({K, K}, one copy per block of a pair); AC1 is restarted for the second
// pair by moving the zero register A4 into it, so the outputs of the second
// pair land after those of the first. The results are checked against a
// software DES written here from the standard, which is itself checked on a
// known-answer pair; the cycle count is checked against one word per cycle.
module tb_vliw_des4;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
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

  localparam addr_t A_PT01 = 16'h0000, A_PT23 = 16'h0001, A_CT01 = 16'h0002, A_CT23 = 16'h0003,
                   A_KEYS = 16'h0020, A_SB = 16'h0100;

  // DES-style permutation of a value (software reference for the key schedule)
  function automatic logic [63:0] des_perm(logic [63:0] x, int tab[], int nin);
    logic [63:0] r = '0;
    foreach (tab[j]) r = {r[62:0], x[nin - tab[j]]};
    return r;
  endfunction


  // PERBIT words for destinations [d0, d0+n) of A5 from a destination -> source map
  function automatic void emit_map(ref logic [WORD_W-1:0] prog [$], input int map[128], input int d0, input int n);
    for (int q = 0; q < n; q += PERM_N) begin
      logic [PERM_N-1:0][7:0] idx;
      for (int i = 0; i < PERM_N; i++) idx[i] = (map[d0 + q + i] < 0) ? 8'h80 : 8'(map[d0 + q + i]);
      prog.push_back(enc_perbit(idx));
    end
  endfunction

  function automatic logic [WORD_W-1:0] w1(logic [SLOT_W-1:0] s0);
    return word4(s0, enc_nop(), enc_nop(), enc_nop());
  endfunction

  function automatic logic [WORD_W-1:0] w2(logic [SLOT_W-1:0] s0, logic [SLOT_W-1:0] s1);
    return word4(s0, s1, enc_nop(), enc_nop());
  endfunction

  function automatic logic [SLOT_W-1:0] mov(reg_e d, reg_e s);
    return enc(UF_MB, OP_MOV, f_regs(d, s));
  endfunction

  logic [WORD_W-1:0] prog [$];

  task automatic build_program();
    sbox_cfg_t cfg = '{sboxend: A_SB, sboxcol: 16'd16, sboxq: 16'd64, tbo: 6'd6, tbd: 6'd4,
                       lin: 32'h21, col: 32'h1E, bmode: 1'b0};
    int m[128];
    logic [SLOT_W-1:0] pinic = enc(UF_PERM, OP_PERINIC, 32'd0);
    prog.delete();

    // initial permutation of the four blocks into lanes: R lanes -> A2, L lanes -> X
    for (int half = 0; half < 2; half++) begin
      for (int p = 0; p < 128; p++) begin
        int k = p / 32, j = p % 32 + 32 * half;
        m[p] = 64 * (k % 2) + 64 - ip_tab[63 - j];
      end
      if (half == 0) prog.push_back(w2(enc(UF_LS, OP_LOAD, f_mem(R_B5, 1'b0, A_PT01)), pinic));
      else prog.push_back(word4(mov(R_A2, R_A5), pinic, enc(UF_LS, OP_LOAD, f_mem(R_B5, 1'b0, A_PT01)), enc_nop()));
      emit_map(prog, m, 0, 64);
      prog.push_back(w1(enc(UF_LS, OP_LOAD, f_mem(R_B5, 1'b0, A_PT23))));
      emit_map(prog, m, 64, 64);
    end
    prog.push_back(w1(mov(R_X, R_A5)));

    // 16 rounds; on entry A2 holds the R lanes and X the L lanes
    for (int r = 0; r < 16; r++) begin
      prog.push_back(word4(mov(R_B5, R_A2), pinic, enc(UF_LS, OP_LOAD, f_mem(R_B1, 1'b0, A_KEYS + addr_t'(r))),
                           enc_nop()));
      for (int pair = 0; pair < 2; pair++) begin
        for (int p = 0; p < 128; p++) begin
          int k = p / 48 + 2 * pair, j = p % 48;
          m[p] = (p < 96) ? 32 * k + 32 - e_tab[47 - j] : -1;
        end
        emit_map(prog, m, 0, 96);
        if (pair == 0) prog.push_back(w2(mov(R_A1, R_A5), pinic));
      end
      prog.push_back(w2(enc(UF_ALU1, OP_XOR), mov(R_A2, R_X)));      // A1 = E(R0,R1) ^ K ; A2 = L
      prog.push_back(w1(mov(R_B6, R_A1)));
      prog.push_back(enc_sboxinic(cfg));
      for (int i = 0; i < 16; i++) begin
        logic [SLOT_W-1:0] extra;
        case (i)
          0:  extra = mov(R_X, R_B5);                                 // X = R, the next L
          1:  extra = mov(R_A1, R_A5);                                // E(R2,R3)
          2:  extra = enc(UF_ALU1, OP_XOR);
          15: extra = mov(R_B6, R_A1);
          default: extra = enc_nop();
        endcase
        prog.push_back(w2(enc(UF_SBOX, OP_SBOX, 32'(7 - i % 8)), extra));
      end
      prog.push_back(w1(mov(R_AC1, R_A4)));                           // A4 is zero: restart AC1, AC2 runs on
      for (int i = 0; i < 16; i++) prog.push_back(w1(enc(UF_SBOX, OP_SBOX, 32'(7 - i % 8))));
      prog.push_back(w2(mov(R_B5, R_A6), pinic));
      for (int p = 0; p < 128; p++) m[p] = 32 * (p / 32) + 32 - p_tab[31 - p % 32];
      emit_map(prog, m, 0, 128);
      prog.push_back(w1(mov(R_B2, R_A5)));
      prog.push_back(w1(enc(UF_ALU2, OP_XOR)));                       // A2 = L ^ f, the next R
    end

    // A2 = R16 lanes, X = L16 lanes: gather each pair, final permutation, store
    for (int pair = 0; pair < 2; pair++) begin
      for (int p = 0; p < 128; p++) m[p] = p % 64 + 64 * pair;
      if (pair == 0) prog.push_back(w2(mov(R_B5, R_X), pinic));
      else prog.push_back(word4(enc(UF_LS, OP_STORE, f_mem(R_A5, 1'b0, A_CT01)), mov(R_B5, R_X), pinic, enc_nop()));
      emit_map(prog, m, 0, 64);                                       // A5[63:0]   = L lanes of the pair
      prog.push_back(w1(mov(R_B5, R_A2)));
      emit_map(prog, m, 64, 64);                                      // A5[127:64] = R lanes of the pair
      prog.push_back(w2(mov(R_B5, R_A5), pinic));
      for (int p = 0; p < 128; p++) begin
        int b = p / 64, s = 64 - fp_tab[63 - p % 64];                // bit s of R16 || L16 of block b
        m[p] = (s < 32) ? 32 * b + s : 64 + 32 * b + s - 32;
      end
      emit_map(prog, m, 0, 128);
    end
    prog.push_back(w1(enc(UF_LS, OP_STORE, f_mem(R_A5, 1'b0, A_CT23))));
    prog.push_back(w1(enc(UF_MB, OP_JMP, f_br(R_X, R_X, addr_t'(prog.size())))));
    prog.push_back(w1(enc_nop()));
  endtask

  // software DES, written from the standard's definition
  function automatic logic [63:0] des_sw(logic [63:0] key, logic [63:0] pt);
    logic [55:0] cd = 56'(des_perm(key, pc1, 64));
    logic [27:0] c = cd[55:28], d = cd[27:0];
    logic [63:0] ip = des_perm(pt, ip_tab, 64);
    logic [31:0] l = ip[63:32], rr = ip[31:0], f, nr;
    for (int r = 0; r < 16; r++) begin
      logic [47:0] x;
      c = (c << shifts[r]) | (c >> (28 - shifts[r]));
      d = (d << shifts[r]) | (d >> (28 - shifts[r]));
      x = 48'(des_perm(64'(rr), e_tab, 32)) ^ 48'(des_perm({8'd0, c, d}, pc2, 56));
      f = '0;
      for (int s = 0; s < 8; s++) begin
        logic [5:0] six = x[47 - 6 * s -: 6];
        f = {f[27:0], sbox_rom[64 * s + 16 * int'({six[5], six[0]}) + int'(six[4:1])]};
      end
      nr = l ^ 32'(des_perm(64'(f), p_tab, 32));
      l = rr;
      rr = nr;
    end
    return des_perm({rr, l}, fp_tab, 64);
  endfunction

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

  task automatic encrypt4(logic [63:0] key, logic [63:0] pt[4]);
    logic [55:0] cd;
    logic [27:0] c, d;
    logic [47:0] k;
    data_t v01, v23;
    logic [63:0] ct[4];
    int cycles;
    cd = 56'(des_perm(key, pc1, 64));
    c = cd[55:28];
    d = cd[27:0];
    for (int r = 0; r < 16; r++) begin
      c = (c << shifts[r]) | (c >> (28 - shifts[r]));
      d = (d << shifts[r]) | (d >> (28 - shifts[r]));
      k = 48'(des_perm({8'd0, c, d}, pc2, 56));
      dwrite(A_KEYS + addr_t'(r), data_t'({k, k}));                 // one copy per block of a pair
    end
    dwrite(A_PT01, {pt[1], pt[0]});
    dwrite(A_PT23, {pt[3], pt[2]});
    @(negedge clk);
    start = 1; start_addr = 16'd0;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 5000) begin @(negedge clk); cycles++; end
    dread(A_CT01, v01);
    dread(A_CT23, v23);
    ct = '{v01[63:0], v01[127:64], v23[63:0], v23[127:64]};
    chk(done && !word_error, "program finished cleanly");
    for (int b = 0; b < 4; b++) begin
      logic [63:0] exp_ct = des_sw(key, pt[b]);
      chk(ct[b] == exp_ct, $sformatf("block %0d: DES(%h, %h) = %h, expected %h", b, key, pt[b], ct[b], exp_ct));
    end
    chk(cycles == prog.size() + 4, $sformatf("%0d cycles for %0d words", cycles, prog.size()));
    $display("DES x4 key=%h: %0d words, %0d cycles, %0.2f cycles/bit", key, prog.size(), cycles,
             real'(cycles) / 256.0);
  endtask

  initial begin
    logic [63:0] pt[4];
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) ip_tab[8 * r + c] = ((r < 4) ? 58 + 2 * r : 57 + 2 * (r - 4)) - 8 * c;
    foreach (ip_tab[j]) fp_tab[ip_tab[j] - 1] = j + 1;
    for (int k = 0; k < 8; k++)
      for (int m = 0; m < 6; m++) e_tab[6 * k + m] = ((4 * k + m + 31) % 32) + 1;
    $readmemh("tb/des_sbox.hex", sbox_rom);
    // the software model against the standard's known-answer pair
    chk(des_sw(64'h1334_5779_9BBC_DFF1, 64'h0123_4567_89AB_CDEF) == 64'h85E8_1354_0F0A_B405,
        "software DES reference");

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

    pt = '{64'h0123_4567_89AB_CDEF, {$urandom, $urandom}, {$urandom, $urandom}, {$urandom, $urandom}};
    encrypt4(64'h1334_5779_9BBC_DFF1, pt);
    pt = '{{$urandom, $urandom}, {$urandom, $urandom}, {$urandom, $urandom}, {$urandom, $urandom}};
    encrypt4({$urandom, $urandom}, pt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
