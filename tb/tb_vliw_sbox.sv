// tb_vliw_sbox: self-checking test of the S-box unit. Decodes an SBOXINIC
// word, then runs SBOX with the configurations of DES (6-bit blocks, row from
// the outer bits), AES (row and column nibbles), a vector S-box (Serpent
// style, no row bits) and byte mode. Expected addresses, merge positions and
// pointer updates are worked out with the table layout written out per
// algorithm rather than with the unit's generic gather logic.
module tb_vliw_sbox;
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

  uinst_t            inst;
  logic [WORD_W-1:0] word;
  sbox_cfg_t         cfg, cfg_new;
  addr_t             ac1, ac2, mem_addr, ac1_new, ac2_new, spc_new;
  data_t             b6;
  logic              mem_re, a6_we, ptr_we, spc_we, cfg_we;
  logic [6:0]        merge_pos, merge_len;

  vliw_sbox dut (
    .inst, .payload(word[WORD_W-1:8]), .cfg, .ac1, .ac2, .b6, .mem_re, .mem_addr,
    .a6_we, .merge_pos, .merge_len, .ptr_we, .ac1_new, .ac2_new, .spc_we, .spc_new,
    .cfg_we, .cfg_new
  );

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run_sbox(int n);
    inst = '{valid: 1'b1, slot: 2'd1, op: OP_SBOX, field: 32'(n)};
    #1;
  endtask

  initial begin
    sbox_cfg_t c;
    int o, row, col, exp_addr;
    // SBOXINIC decode
    c = '{sboxend: 16'h1234, sboxcol: 16'd16, sboxq: 16'd64, tbo: 6'd6, tbd: 6'd4,
          lin: 32'h21, col: 32'h1E, bmode: 1'b0};
    word = enc_sboxinic(c);
    inst = '{valid: 1'b1, slot: 2'd0, op: OP_SBOXINIC, field: word[39:8]};
    cfg = '0; ac1 = 16'd7; ac2 = 16'd9; b6 = '0;
    #1;
    chk(cfg_we && cfg_new == c, "sboxinic decode");
    chk(ptr_we && ac1_new == 0 && ac2_new == 0, "sboxinic clears AC1/AC2");
    chk(!mem_re && !a6_we && !spc_we, "sboxinic has no memory access");

    // DES: eight 6-bit blocks of a 48-bit value, S-box n at sboxend + 64*n
    cfg = c;
    for (int t = 0; t < 200; t++) begin
      b6 = {$urandom, $urandom, $urandom, $urandom};
      ac1 = 16'(6 * $urandom_range(0, 7));
      ac2 = 16'(4 * $urandom_range(0, 7));
      o = int'((b6 >> ac1) & 128'h3F);
      row = ((o >> 5) & 1) * 2 + (o & 1);
      col = (o >> 1) & 15;
      run_sbox(t % 8);
      exp_addr = (16'h1234 + row * 16 + col + 64 * (t % 8)) & 16'hFFFF;
      chk(mem_re && mem_addr == 16'(exp_addr), $sformatf("DES addr o=%0d", o));
      chk(a6_we && merge_pos == 7'(ac2) && merge_len == 7'd4, "DES merge");
      chk(ptr_we && ac1_new == ac1 + 6 && ac2_new == ac2 + 4, "DES pointers");
      chk(spc_we && spc_new == 16'(exp_addr), "DES SPC");
    end

    // AES: one 16x16 S-box, row = high nibble, column = low nibble
    cfg = '{sboxend: 16'h0200, sboxcol: 16'd16, sboxq: 16'd256, tbo: 6'd8, tbd: 6'd8,
            lin: 32'hF0, col: 32'h0F, bmode: 1'b0};
    for (int t = 0; t < 100; t++) begin
      b6 = {$urandom, $urandom, $urandom, $urandom};
      ac1 = 16'(8 * $urandom_range(0, 15));
      ac2 = ac1;
      o = int'((b6 >> ac1) & 128'hFF);
      run_sbox(0);
      chk(mem_addr == 16'(16'h0200 + (o >> 4) * 16 + (o & 15)), "AES addr");
      chk(ac1_new == ac1 + 8 && ac2_new == ac2 + 8 && merge_len == 7'd8, "AES pointers");
    end

    // Serpent-style vectors: 8 S-boxes of 16 entries, no row bits
    cfg = '{sboxend: 16'h0400, sboxcol: 16'd16, sboxq: 16'd16, tbo: 6'd4, tbd: 6'd4,
            lin: 32'h0, col: 32'hF, bmode: 1'b0};
    for (int t = 0; t < 100; t++) begin
      b6 = {$urandom, $urandom, $urandom, $urandom};
      ac1 = 16'(4 * $urandom_range(0, 31));
      ac2 = 16'd0;
      o = int'((b6 >> ac1) & 128'hF);
      run_sbox(t % 8);
      chk(mem_addr == 16'(16'h0400 + o + 16 * (t % 8)), "vector addr");
    end

    // byte mode: 16-bit block, row = upper byte, column = lower byte
    cfg = '{sboxend: 16'h0000, sboxcol: 16'd256, sboxq: 16'd0, tbo: 6'd16, tbd: 6'd0,
            lin: 32'h2, col: 32'h1, bmode: 1'b1};
    b6 = 128'h00AB_CD00;
    ac1 = 16'd8;
    ac2 = 16'd0;
    run_sbox(0);
    chk(mem_addr == 16'(16'hAB * 256 + 16'hCD), "byte mode addr");
    chk(merge_len == 7'd0 && ac2_new == 16'd64, "TBD 0 stands for 64");

    inst.valid = 1'b0;
    #1;
    chk(!mem_re && !a6_we && !ptr_we && !cfg_we, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
