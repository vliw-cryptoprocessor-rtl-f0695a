// vliw_sbox: configurable substitution unit, the S-BOX (UF6).
//
// SBOXINIC (a wide instruction) loads the S-box configuration registers
// SBOXEND, SBOXCOL, SBOXQ, TBO, TBD, LIN, COL and B from the word and clears
// the block pointers AC1 and AC2.
// SBOX n substitutes one block:
//   1. the origin block is the TBO bits of B6 starting at bit AC1;
//   2. the row is formed from the origin bits (B=0) or bytes (B=1) selected
//      by the mask LIN, the column from those selected by COL, each gathered
//      in order with the lowest selected position as least significant bit;
//   3. the D-CACHE address is
//        SBOXEND + row*SBOXCOL + col + SBOXQ*n        (16 bits, wrapping);
//   4. the low TBD bits of the word read there replace bits AC2..AC2+TBD-1
//      of A6; AC1 advances by TBO, AC2 by TBD, and SPC records the address.
// This unit computes steps 1-3 and the pointer updates combinationally in the
// execute stage and issues the D-CACHE read; the read data arrives one cycle
// later and the core merges it into A6 in the write-back stage.
// The parameter set, register roles, the address formula and the pointer
// updates follow the architecture. Mask form of LIN/COL, LSB-first
// numbering, "0 encodes 64" for TBO/TBD and the use of SPC are this design's
// choices.
module vliw_sbox
  import vliw_pkg::*;
(
  input  uinst_t            inst,
  input  logic [WORD_W-1:8] payload,   // SBOXINIC operands
  input  sbox_cfg_t         cfg,       // current configuration registers
  input  addr_t             ac1,
  input  addr_t             ac2,
  input  data_t             b6,        // bits to be substituted
  // D-CACHE read, issued in the execute stage
  output logic              mem_re,
  output addr_t             mem_addr,
  // A6 merge, completed in write-back with the read data
  output logic              a6_we,
  output logic [6:0]        merge_pos,
  output logic [6:0]        merge_len,
  // pointer and address registers
  output logic              ptr_we,
  output addr_t             ac1_new,
  output addr_t             ac2_new,
  output logic              spc_we,
  output addr_t             spc_new,
  // configuration write (SBOXINIC)
  output logic              cfg_we,
  output sbox_cfg_t         cfg_new
);
  logic [6:0]  tbo_n, tbd_n;
  logic [63:0] origin, omask;
  logic [31:0] row, col;
  addr_t       addr;

  always_comb begin
    tbo_n  = (cfg.tbo == '0) ? 7'd64 : {1'b0, cfg.tbo};
    tbd_n  = (cfg.tbd == '0) ? 7'd64 : {1'b0, cfg.tbd};
    omask  = (tbo_n == 7'd64) ? '1 : ((64'd1 << tbo_n) - 64'd1);
    origin = 64'(b6 >> ac1[6:0]) & omask;
    row    = cfg.bmode ? byte_gather(origin, cfg.lin) : bit_gather(origin, cfg.lin);
    col    = cfg.bmode ? byte_gather(origin, cfg.col) : bit_gather(origin, cfg.col);
    addr   = cfg.sboxend + addr_t'(row) * cfg.sboxcol + addr_t'(col)
           + cfg.sboxq * addr_t'(inst.field[15:0]);

    mem_re    = 1'b0;
    mem_addr  = addr;
    a6_we     = 1'b0;
    merge_pos = ac2[6:0];
    merge_len = {1'b0, cfg.tbd};
    ptr_we    = 1'b0;
    ac1_new   = ac1 + addr_t'(tbo_n);
    ac2_new   = ac2 + addr_t'(tbd_n);
    spc_we    = 1'b0;
    spc_new   = addr;
    cfg_we    = 1'b0;
    cfg_new   = dec_sboxinic(payload);

    if (inst.valid && inst.op == OP_SBOX) begin
      mem_re = 1'b1;
      a6_we  = 1'b1;
      ptr_we = 1'b1;
      spc_we = 1'b1;
    end else if (inst.valid && inst.op == OP_SBOXINIC) begin
      cfg_we  = 1'b1;
      ptr_we  = 1'b1;
      ac1_new = '0;
      ac2_new = '0;
    end
  end
endmodule
