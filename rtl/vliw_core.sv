// vliw_core: the VLIW cryptoprocessor core without its memories.
//
// One 160-bit word enters per cycle and moves through three stages:
//   1 fetch     - the control unit presents IPC to the I-CACHE;
//   2 execute   - the dispatcher routes the slots to the eight functional
//                 units (2 ALUs, shifter, rotator, permutation, S-box,
//                 load/store, move/branch), which read the register view and
//                 compute their results; LOAD and SBOX issue the D-CACHE read;
//   3 write-back - the results, now with the D-CACHE read data, are written to
//                 the register bank and a STORE writes the D-CACHE.
// The register view seen in stage 2 already includes the writes of the word
// in stage 3 (register bypass), and a D-CACHE read of the word a STORE in
// stage 3 is writing gets the stored data (store-to-load forwarding), so
// consecutive words may depend on each other without NOPs.
// Within a word all units read the registers as they were before the word,
// and when two slots write the same register the later slot wins.
// Up to four instructions complete per cycle (one word), sixteen bit
// permutations per PERBIT. No stalls: the only irregularity is the one-word
// branch delay slot.
//
// Interface: `start` (pulse, with start_addr) runs a program until it
// executes a JMP to its own address; `done` then stays high. `word_error`
// is a sticky flag set when the dispatcher dropped a slot that broke the
// word rules. The D-CACHE has one read port (stage 2) and one write port
// (stage 3); the I-CACHE one synchronous read port.
module vliw_core
  import vliw_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  addr_t             start_addr,
  output logic              busy,
  output logic              done,
  output logic              word_error,
  // I-CACHE
  output logic              imem_re,
  output addr_t             imem_addr,
  input  logic [WORD_W-1:0] imem_rdata,
  // D-CACHE
  output logic              dmem_re,
  output addr_t             dmem_raddr,
  input  data_t             dmem_rdata,
  output logic              dmem_we,
  output addr_t             dmem_waddr,
  output data_t             dmem_wdata
);
  // ---------------- control / fetch ----------------
  logic  s2_valid, s3_valid, taken, halt;
  addr_t s2_pc, target, ipc;

  vliw_control u_ctrl (
    .clk, .rst_n, .start, .start_addr, .taken, .target, .halt,
    .imem_re, .imem_addr, .ipc, .s2_valid, .s2_pc, .s3_valid, .busy, .done
  );

  // ---------------- stage 2: dispatch and execute ----------------
  uinst_t            ui [NUF];
  logic [WORD_W-1:8] payload;
  logic              conflict, excl_drop;
  data_t             rv [NREG];   // register view (bypassed)
  data_t             rq [NREG];

  vliw_dispatcher u_disp (
    .valid(s2_valid), .word(imem_rdata), .uinst(ui), .payload, .conflict, .excl_drop
  );

  logic  alu1_we, alu2_we, shf_we, rot_we;
  data_t alu1_y, alu2_y, shf_y, rot_y;

  vliw_alu     u_alu1 (.inst(ui[UF_ALU1]), .a(rv[R_A1]), .b(rv[R_B1]), .we(alu1_we), .y(alu1_y));
  vliw_alu     u_alu2 (.inst(ui[UF_ALU2]), .a(rv[R_A2]), .b(rv[R_B2]), .we(alu2_we), .y(alu2_y));
  vliw_shifter u_shf  (.inst(ui[UF_SHF]),  .a(rv[R_A3]), .we(shf_we), .y(shf_y));
  vliw_rotator u_rot  (.inst(ui[UF_ROT]),  .a(rv[R_A4]), .we(rot_we), .y(rot_y));

  logic  a5_we, perac_we;
  data_t a5_new;
  addr_t perac_new;

  vliw_perm u_perm (
    .inst(ui[UF_PERM]), .idx(payload[135:8]), .a5(rv[R_A5]), .b5(rv[R_B5]),
    .perac(addr_t'(rv[R_PERAC])), .a5_we, .a5_new, .perac_we, .perac_new
  );

  sbox_cfg_t cur_cfg, cfg_new;
  logic      sb_re, a6_we, ptr_we, spc_we, cfg_we;
  addr_t     sb_addr, ac1_new, ac2_new, spc_new;
  logic [6:0] merge_pos, merge_len;

  always_comb begin
    cur_cfg.sboxend = rv[R_SBOXEND][15:0];
    cur_cfg.sboxcol = rv[R_SBOXCOL][15:0];
    cur_cfg.sboxq   = rv[R_SBOXQ][15:0];
    cur_cfg.tbo     = rv[R_TBO][5:0];
    cur_cfg.tbd     = rv[R_TBD][5:0];
    cur_cfg.lin     = rv[R_LIN][31:0];
    cur_cfg.col     = rv[R_COL][31:0];
    cur_cfg.bmode   = rv[R_BMODE][0];
  end

  vliw_sbox u_sbox (
    .inst(ui[UF_SBOX]), .payload, .cfg(cur_cfg),
    .ac1(addr_t'(rv[R_AC1])), .ac2(addr_t'(rv[R_AC2])), .b6(rv[R_B6]),
    .mem_re(sb_re), .mem_addr(sb_addr), .a6_we, .merge_pos, .merge_len,
    .ptr_we, .ac1_new, .ac2_new, .spc_we, .spc_new, .cfg_we, .cfg_new
  );

  logic  ls_re, ls_we, ls_dst_we, dpc_we;
  addr_t ls_addr, dpc_new;
  data_t ls_wdata;
  reg_e  ls_dst;

  vliw_loadstore u_ls (
    .inst(ui[UF_LS]), .regs(rv), .mem_re(ls_re), .mem_we(ls_we), .mem_addr(ls_addr),
    .mem_wdata(ls_wdata), .dst_we(ls_dst_we), .dst(ls_dst), .dpc_we, .dpc_new
  );

  logic  mv_we;
  reg_e  mv_dst;
  data_t mv_data;

  vliw_movbranch u_mb (
    .inst(ui[UF_MB]), .pc(s2_pc), .regs(rv), .dst_we(mv_we), .dst(mv_dst), .data(mv_data),
    .taken, .target, .halt
  );

  // D-CACHE read: at most one of LOAD / SBOX per word (dispatcher rule)
  assign dmem_re    = ls_re | sb_re;
  assign dmem_raddr = sb_re ? sb_addr : ls_addr;

  // Collect each unit's register writes and place them by slot.
  function automatic wr_t w(logic we, reg_e dst, data_t data, wsrc_e src = WS_VAL);
    return '{we: we, dst: dst, data: data, src: src, mpos: '0, mlen: '0};
  endfunction

  wr_t uw [NUF][WR_PER_SLOT];
  wr_t wr2 [NWR];

  always_comb begin
    for (int u = 0; u < NUF; u++)
      for (int k = 0; k < WR_PER_SLOT; k++) uw[u][k] = WR_NONE;
    uw[UF_ALU1][0] = w(alu1_we, R_A1, alu1_y);
    uw[UF_ALU2][0] = w(alu2_we, R_A2, alu2_y);
    uw[UF_SHF][0]  = w(shf_we,  R_A3, shf_y);
    uw[UF_ROT][0]  = w(rot_we,  R_A4, rot_y);
    uw[UF_PERM][0] = w(a5_we, R_A5, a5_new);
    uw[UF_PERM][1] = w(perac_we, R_PERAC, data_t'(perac_new));
    uw[UF_SBOX][0] = '{we: a6_we, dst: R_A6, data: rv[R_A6], src: WS_MERGE,
                       mpos: merge_pos, mlen: merge_len};
    uw[UF_SBOX][1] = w(ptr_we, R_AC1, data_t'(ac1_new));
    uw[UF_SBOX][2] = w(ptr_we, R_AC2, data_t'(ac2_new));
    uw[UF_SBOX][3] = w(spc_we, R_SPC, data_t'(spc_new));
    uw[UF_LS][0]   = w(ls_dst_we, ls_dst, '0, WS_DMEM);
    uw[UF_LS][1]   = w(dpc_we, R_DPC, data_t'(dpc_new));
    uw[UF_MB][0]   = w(mv_we, mv_dst, mv_data);
    uw[UF_MB][1]   = w(taken, R_JPC, data_t'(target));

    for (int i = 0; i < NWR; i++) wr2[i] = WR_NONE;
    for (int u = 0; u < NUF; u++) begin
      if (ui[u].valid) begin
        for (int k = 0; k < WR_PER_SLOT; k++) wr2[int'(ui[u].slot) * WR_PER_SLOT + k] = uw[u][k];
      end
    end
  end

  // ---------------- stage 2 -> stage 3 register ----------------
  wr_t       wr3 [NWR];
  logic      cfg_we3, st_we3;
  sbox_cfg_t cfg3;
  addr_t     st_addr3;
  data_t     st_data3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NWR; i++) wr3[i] <= WR_NONE;
      cfg_we3  <= 1'b0;
      cfg3     <= '0;
      st_we3   <= 1'b0;
      st_addr3 <= '0;
      st_data3 <= '0;
      word_error <= 1'b0;
    end else begin
      for (int i = 0; i < NWR; i++) wr3[i] <= wr2[i];
      cfg_we3  <= cfg_we;
      cfg3     <= cfg_new;
      st_we3   <= ls_we;
      st_addr3 <= ls_addr;
      st_data3 <= ls_wdata;
      if (start && !busy) word_error <= 1'b0;
      else if (conflict)  word_error <= 1'b1;
    end
  end

  // A LOAD or SBOX reading the address that the previous word's STORE is
  // writing in the same cycle gets the stored data forwarded, since the
  // D-CACHE returns the old contents in that case.
  logic  fwd3;
  data_t fwd_data3, rdata3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd3      <= 1'b0;
      fwd_data3 <= '0;
    end else begin
      fwd3      <= dmem_re && st_we3 && (dmem_raddr == st_addr3);
      fwd_data3 <= st_data3;
    end
  end

  assign rdata3 = fwd3 ? fwd_data3 : dmem_rdata;

  // ---------------- stage 3: write-back ----------------
  wr_t wrb [NWR];

  always_comb begin
    for (int i = 0; i < NWR; i++) begin
      wrb[i] = wr3[i];
      if (wr3[i].src == WS_DMEM)  wrb[i].data = rdata3;
      if (wr3[i].src == WS_MERGE) wrb[i].data = bit_merge(wr3[i].data, wr3[i].mpos,
                                                          wr3[i].mlen, rdata3);
    end
  end

  vliw_regbank u_regs (
    .clk, .rst_n, .ipc, .cfg_we(cfg_we3), .cfg(cfg3), .wr(wrb), .view(rv), .q(rq)
  );

  assign dmem_we    = st_we3;
  assign dmem_waddr = st_addr3;
  assign dmem_wdata = st_data3;
endmodule
