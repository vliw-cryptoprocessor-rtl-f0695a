// vliw_pkg: shared types, constants and encodings of the VLIW cryptoprocessor.
//
// The processor fetches one 160-bit VLIW word per cycle. The word holds four
// 40-bit instruction slots; slot 0 sits in bits [39:0], slot 3 in [159:120].
// Each slot is laid out as
//     [39:8]  32-bit operand field (data / address / configuration)
//     [7:5]   functional unit (UF1..UF8 encoded 0..7)
//     [4:0]   opcode (25 instructions)
// The two "wide" instructions, PERBIT and SBOXINIC, take the whole word: their
// opcode is in slot 0 and bits [159:8] carry their operands.
//
// The 40-bit slot, the four slots, the eight units and the 25 instructions
// follow the architecture description; the 32/3/5 split of the slot, all
// numeric encodings, and the operand layouts below are this design's choice.
// The register bank holds the 24 registers of the architecture plus the two
// S-box line/column selector registers LIN and COL.
package vliw_pkg;

  localparam int unsigned WORD_W  = 160;  // VLIW word
  localparam int unsigned SLOT_W  = 40;   // one instruction
  localparam int unsigned NSLOT   = 4;
  localparam int unsigned DATA_W  = 128;  // general registers and D-CACHE words
  localparam int unsigned ADDR_W  = 16;   // counter registers / memory addresses
  localparam int unsigned NUF     = 8;
  localparam int unsigned PERM_N  = 16;   // bit permutations per PERBIT
  localparam int unsigned NREG    = 26;
  localparam int unsigned WR_PER_SLOT = 4;
  localparam int unsigned NWR     = NSLOT * WR_PER_SLOT;

  typedef enum logic [2:0] {
    UF_ALU1 = 3'd0, UF_ALU2 = 3'd1, UF_SHF = 3'd2, UF_ROT = 3'd3,
    UF_PERM = 3'd4, UF_SBOX = 3'd5, UF_LS  = 3'd6, UF_MB  = 3'd7
  } uf_e;

  typedef enum logic [4:0] {
    OP_NOP      = 5'd0,  OP_AND   = 5'd1,  OP_OR    = 5'd2,  OP_XOR = 5'd3,
    OP_ADD      = 5'd4,  OP_SUB   = 5'd5,  OP_INC   = 5'd6,  OP_DEC = 5'd7,
    OP_NOT      = 5'd8,  OP_CLR   = 5'd9,  OP_SHL   = 5'd10, OP_SHR = 5'd11,
    OP_ROL      = 5'd12, OP_ROR   = 5'd13, OP_PERINIC = 5'd14, OP_PERBIT = 5'd15,
    OP_SBOXINIC = 5'd16, OP_SBOX  = 5'd17, OP_LOAD  = 5'd18, OP_STORE = 5'd19,
    OP_MOV      = 5'd20, OP_JMP   = 5'd21, OP_JZ    = 5'd22, OP_JL  = 5'd23,
    OP_JG       = 5'd24
  } op_e;

  typedef enum logic [4:0] {
    R_X     = 5'd0,  R_A1    = 5'd1,  R_B1    = 5'd2,  R_A2   = 5'd3,
    R_B2    = 5'd4,  R_A3    = 5'd5,  R_A4    = 5'd6,  R_A5   = 5'd7,
    R_B5    = 5'd8,  R_A6    = 5'd9,  R_B6    = 5'd10,
    R_PERAC = 5'd11, R_AC1   = 5'd12, R_AC2   = 5'd13, R_SPC  = 5'd14,
    R_DPC   = 5'd15, R_IPC   = 5'd16, R_JPC   = 5'd17,
    R_SBOXEND = 5'd18, R_SBOXCOL = 5'd19, R_SBOXQ = 5'd20, R_TBO = 5'd21,
    R_TBD   = 5'd22, R_BMODE = 5'd23, R_LIN   = 5'd24, R_COL  = 5'd25
  } reg_e;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // One decoded slot as handed to a functional unit.
  typedef struct packed {
    logic        valid;
    logic [1:0]  slot;     // slot it came from; later slots win register conflicts
    op_e         op;
    logic [31:0] field;
  } uinst_t;

  // S-box configuration registers written by SBOXINIC.
  typedef struct packed {
    logic [15:0] sboxend;  // base address of the first S-box in D-CACHE
    logic [15:0] sboxcol;  // columns per S-box
    logic [15:0] sboxq;    // elements per S-box
    logic [5:0]  tbo;      // origin block size in bits (0 encodes 64)
    logic [5:0]  tbd;      // destination block size in bits (0 encodes 64)
    logic [31:0] lin;      // origin block bits/bytes forming the row
    logic [31:0] col;      // origin block bits/bytes forming the column
    logic        bmode;    // 0: LIN/COL select bits, 1: they select bytes
  } sbox_cfg_t;

  // Source of a stage-3 register write.
  typedef enum logic [1:0] {
    WS_VAL   = 2'd0,  // data computed in stage 2
    WS_DMEM  = 2'd1,  // D-CACHE read data (LOAD)
    WS_MERGE = 2'd2   // D-CACHE data merged into data[mpos +: mlen] (SBOX)
  } wsrc_e;

  typedef struct packed {
    logic   we;
    reg_e   dst;
    data_t  data;
    wsrc_e  src;
    logic [6:0] mpos;
    logic [6:0] mlen;   // 0 encodes 64
  } wr_t;

  localparam wr_t WR_NONE = '{we: 1'b0, dst: R_X, data: '0, src: WS_VAL, mpos: '0, mlen: '0};

  // Bits each register really has; writes are truncated to this.
  function automatic data_t reg_mask(reg_e r);
    case (r)
      R_PERAC, R_AC1, R_AC2, R_SPC, R_DPC, R_IPC, R_JPC,
      R_SBOXEND, R_SBOXCOL, R_SBOXQ: return data_t'(17'h0FFFF);
      R_TBO, R_TBD:                  return data_t'(7'h3F);
      R_BMODE:                       return data_t'(1'b1);
      R_LIN, R_COL:                  return data_t'(33'h0FFFFFFFF);
      default:                       return '1;
    endcase
  endfunction

  // Which unit executes an opcode (ALU ops may go to either ALU).
  function automatic logic op_fits_uf(op_e op, uf_e uf);
    case (op)
      OP_NOP, OP_AND, OP_OR, OP_XOR, OP_ADD, OP_SUB, OP_INC, OP_DEC, OP_NOT, OP_CLR:
        return (uf == UF_ALU1) || (uf == UF_ALU2);
      OP_SHL, OP_SHR:             return uf == UF_SHF;
      OP_ROL, OP_ROR:             return uf == UF_ROT;
      OP_PERINIC, OP_PERBIT:      return uf == UF_PERM;
      OP_SBOXINIC, OP_SBOX:       return uf == UF_SBOX;
      OP_LOAD, OP_STORE:          return uf == UF_LS;
      OP_MOV, OP_JMP, OP_JZ, OP_JL, OP_JG: return uf == UF_MB;
      default:                    return 1'b0;
    endcase
  endfunction

  // Instructions that use the single D-CACHE access path of a word.
  function automatic logic op_exclusive(op_e op);
    return (op == OP_LOAD) || (op == OP_STORE) || (op == OP_SBOX);
  endfunction

  // Gather the bits of v selected by mask m into the low bits of the result,
  // keeping their order (lowest selected bit lands in bit 0).
  function automatic logic [31:0] bit_gather(logic [63:0] v, logic [31:0] m);
    logic [31:0] r;
    int unsigned k;
    r = '0;
    k = 0;
    for (int i = 0; i < 32; i++) begin
      if (m[i]) begin
        r[k[4:0]] = v[i];
        k++;
      end
    end
    return r;
  endfunction

  // Same, with each mask bit selecting a byte of v.
  function automatic logic [31:0] byte_gather(logic [63:0] v, logic [31:0] m);
    logic [31:0] r;
    int unsigned k;
    r = '0;
    k = 0;
    for (int i = 0; i < 8; i++) begin
      if (m[i]) begin
        if (k < 4) r[k[1:0]*8 +: 8] = v[i*8 +: 8];
        k++;
      end
    end
    return r;
  endfunction

  // Replace bits [pos +: len] of base by the low len bits of ins (len 0 = 64).
  function automatic data_t bit_merge(data_t base, logic [6:0] pos, logic [6:0] len, data_t ins);
    data_t m, r;
    logic [7:0] l;
    l = (len == 7'd0) ? 8'd64 : {1'b0, len};
    m = (l >= 8'd128) ? '1 : ((data_t'(1) << l) - data_t'(1));
    r = (base & ~(m << pos)) | ((ins & m) << pos);
    return r;
  endfunction

  // ---- instruction encoders, used by testbenches and program generators ----
  function automatic logic [SLOT_W-1:0] enc(uf_e uf, op_e op, logic [31:0] field = '0);
    return {field, uf, op};
  endfunction

  function automatic logic [SLOT_W-1:0] enc_nop();
    return enc(UF_ALU1, OP_NOP);
  endfunction

  function automatic logic [31:0] f_regs(reg_e ra, reg_e rb = R_X);
    return {19'd0, rb, 3'd0, ra};
  endfunction

  // LOAD/STORE field: register, mode (0 absolute, 1 through DPC), address
  function automatic logic [31:0] f_mem(reg_e r, logic indirect, addr_t a);
    return {a, 10'd0, indirect, r};
  endfunction

  function automatic logic [31:0] f_br(reg_e ra, reg_e rb, addr_t target);
    return {target, 3'd0, rb, 3'd0, ra};
  endfunction

  function automatic logic [WORD_W-1:0] word4(logic [SLOT_W-1:0] s0, logic [SLOT_W-1:0] s1,
                                              logic [SLOT_W-1:0] s2, logic [SLOT_W-1:0] s3);
    return {s3, s2, s1, s0};
  endfunction

  // PERBIT: idx[i] picks the B5 bit copied to A5[PERAC+i]; idx[i][7]=1 skips i.
  function automatic logic [WORD_W-1:0] enc_perbit(logic [PERM_N-1:0][7:0] idx);
    return {24'd0, idx, UF_PERM, OP_PERBIT};
  endfunction

  function automatic logic [WORD_W-1:0] enc_sboxinic(sbox_cfg_t c);
    return {27'd0, c.bmode, c.col, c.lin, c.tbd, c.tbo, c.sboxq, c.sboxcol, c.sboxend,
            UF_SBOX, OP_SBOXINIC};
  endfunction

  function automatic sbox_cfg_t dec_sboxinic(logic [WORD_W-1:8] p);
    sbox_cfg_t c;
    c.sboxend = p[23:8];
    c.sboxcol = p[39:24];
    c.sboxq   = p[55:40];
    c.tbo     = p[61:56];
    c.tbd     = p[67:62];
    c.lin     = p[99:68];
    c.col     = p[131:100];
    c.bmode   = p[132];
    return c;
  endfunction

endpackage
