// tb_vliw_sbox_table4: the S-box unit in the configurations of real ciphers,
// run on the complete processor at its default sizes.
//
// For each cipher's S-box shape (number of tables, input and output width,
// which input bits give the row and which the column) the testbench fills the
// tables in the D-CACHE with random 128-bit words, loads a random state into
// B6 and a random background into A6, and runs the program
//     LOAD B6 ; LOAD A6 ; SBOXINIC cfg ; SBOX n0 ; SBOX n1 ; ... ; STORE A6 ; halt
// with one SBOX per word, substituting consecutive blocks of B6 into
// consecutive blocks of A6. The expected A6 is computed here by a reference
// model written from the definition (origin block at AC1, row and column
// gathered from the LIN/COL masks, entry at
// SBOXEND + row*SBOXCOL + col + SBOXQ*n, its low TBD bits placed at AC2).
// It checks the stored result, that no word was rejected, and that the run
// takes one cycle per word plus four.
module tb_vliw_sbox_table4;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
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

  localparam addr_t A_B6 = 16'h0000, A_A6 = 16'h0001, A_RES = 16'h0002, A_TAB = 16'h1000;

  // one S-box shape: tables, block sizes, masks, table geometry, blocks per run
  typedef struct {
    string       name;
    int          nsbox, tbo, tbd;
    logic [31:0] lin, col;
    logic        bmode;
    int          sboxcol, sboxq, nblocks;
  } shape_t;

  data_t ref_mem [int];

  // reference: gather the bits (or bytes) of v selected by m, lowest first
  function automatic int gather(logic [63:0] v, logic [31:0] m, logic bytes);
    int r = 0, k = 0;
    int unit_w = bytes ? 8 : 1;
    for (int i = 0; i < 32 && i * unit_w < 64; i++)
      if (m[i]) begin
        for (int b = 0; b < unit_w; b++) r |= int'(v[i * unit_w + b]) << (k * unit_w + b);
        k++;
      end
    return r;
  endfunction

  task automatic run_shape(shape_t s);
    logic [WORD_W-1:0] prog [$];
    sbox_cfg_t cfg;
    data_t b6, a6, v;
    int ac1, ac2, cycles, nwords, entries;

    // tables: the highest address a row/column pair can reach, per table
    entries = s.sboxq * s.nsbox;
    ref_mem.delete();
    @(negedge clk);
    for (int i = 0; i < entries; i++) begin
      data_t w = {$urandom, $urandom, $urandom, $urandom};
      ref_mem[int'(A_TAB) + i] = w;
      host_d_we = 1; host_d_addr = A_TAB + addr_t'(i); host_d_wdata = w;
      @(negedge clk);
    end
    b6 = {$urandom, $urandom, $urandom, $urandom};
    a6 = {$urandom, $urandom, $urandom, $urandom};
    host_d_addr = A_B6; host_d_wdata = b6; @(negedge clk);
    host_d_addr = A_A6; host_d_wdata = a6; @(negedge clk);
    host_d_we = 0;

    cfg = '{sboxend: A_TAB, sboxcol: 16'(s.sboxcol), sboxq: 16'(s.sboxq),
            tbo: 6'(s.tbo), tbd: 6'(s.tbd), lin: s.lin, col: s.col, bmode: s.bmode};
    prog.push_back(word4(enc(UF_LS, OP_LOAD, f_mem(R_B6, 1'b0, A_B6)), enc_nop(), enc_nop(), enc_nop()));
    prog.push_back(word4(enc(UF_LS, OP_LOAD, f_mem(R_A6, 1'b0, A_A6)), enc_nop(), enc_nop(), enc_nop()));
    prog.push_back(enc_sboxinic(cfg));
    ac1 = 0;
    ac2 = 0;
    for (int j = 0; j < s.nblocks; j++) begin
      int n = j % s.nsbox;
      logic [63:0] o;
      int row, col, addr;
      data_t e;
      prog.push_back(word4(enc(UF_SBOX, OP_SBOX, 32'(n)), enc_nop(), enc_nop(), enc_nop()));
      o = 64'(b6 >> ac1) & ((64'd1 << s.tbo) - 64'd1);
      row = gather(o, s.lin, s.bmode);
      col = gather(o, s.col, s.bmode);
      addr = (int'(A_TAB) + row * s.sboxcol + col + s.sboxq * n) % 65536;
      e = ref_mem.exists(addr) ? ref_mem[addr] : '0;
      for (int b = 0; b < s.tbd; b++) a6[(ac2 + b) % 128] = e[b];
      ac1 += s.tbo;
      ac2 += s.tbd;
    end
    prog.push_back(word4(enc(UF_LS, OP_STORE, f_mem(R_A6, 1'b0, A_RES)), enc_nop(), enc_nop(), enc_nop()));
    prog.push_back(word4(enc(UF_MB, OP_JMP, f_br(R_X, R_X, addr_t'(prog.size()))),
                         enc_nop(), enc_nop(), enc_nop()));
    prog.push_back(word4(enc_nop(), enc_nop(), enc_nop(), enc_nop()));
    nwords = prog.size();

    foreach (prog[i]) begin
      @(negedge clk);
      host_i_we = 1; host_i_addr = addr_t'(i); host_i_wdata = prog[i];
    end
    @(negedge clk);
    host_i_we = 0;
    start = 1; start_addr = 16'd0;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 1000) begin @(negedge clk); cycles++; end
    @(negedge clk);
    host_d_re = 1; host_d_addr = A_RES;
    @(negedge clk);
    host_d_re = 0;
    v = host_d_rdata;
    chk(done && !word_error, {s.name, ": program finished cleanly"});
    chk(v == a6, $sformatf("%s: A6 = %h, expected %h", s.name, v, a6));
    chk(cycles == nwords + 4, $sformatf("%s: %0d cycles for %0d words", s.name, cycles, nwords));
    $display("%-10s %0d S-boxes %0d->%0d bits, %0d blocks: %0d words, %0d cycles",
             s.name, s.nsbox, s.tbo, s.tbd, s.nblocks, nwords, cycles);
  endtask

  // S-box shapes of the ciphers; table entries are random, only the shapes matter
  shape_t shapes[$] = '{
    '{"DES",      8,  6,  4, 32'h21,  32'h1E,   1'b0, 16,    64,    8},
    '{"AES",      1,  8,  8, 32'hF0,  32'h0F,   1'b0, 16,    256,   16},
    '{"Serpent",  8,  4,  4, 32'h0,   32'hF,    1'b0, 16,    16,    32},
    '{"Cast-128", 4,  8, 32, 32'h0,   32'hFF,   1'b0, 256,   256,   4},
    '{"MARS",     2,  8, 32, 32'h0,   32'hFF,   1'b0, 256,   256,   4},
    '{"Twofish",  8,  4,  4, 32'h0,   32'hF,    1'b0, 16,    16,    32},
    '{"Magenta",  1,  8,  8, 32'h0,   32'hFF,   1'b0, 256,   256,   16},
    '{"Blowfish", 4,  8, 32, 32'h0,   32'hFF,   1'b0, 256,   256,   4},
    '{"LOKI97",   2, 14,  8, 32'h0,   32'h3FFF, 1'b0, 16384, 16384, 9},
    // byte mode: a 16-bit block whose high byte is the row and low byte the column
    '{"bytes",    1, 16,  8, 32'h2,   32'h1,    1'b1, 16,    4352,  8}
  };

  initial begin
    start = 0; start_addr = 0;
    host_i_we = 0; host_i_addr = 0; host_i_wdata = 0;
    host_d_we = 0; host_d_re = 0; host_d_addr = 0; host_d_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (shapes[i]) run_shape(shapes[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
