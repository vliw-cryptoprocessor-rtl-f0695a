// vliw_dispatcher: instruction dispatcher.
//
// Splits the 160-bit VLIW word in the execute stage into its four 40-bit
// slots and hands each to the functional unit named by the slot's UF field.
// There is no run-time scheduling: which unit runs what is fixed by the
// program. The dispatcher only enforces the word rules:
//   * PERBIT and SBOXINIC occupy the whole word; they are recognised in
//     slot 0 and the other slots are then not decoded;
//   * a unit accepts one instruction per word (the first slot naming it);
//   * LOAD, STORE and SBOX share the single D-CACHE access path, so only the
//     first of them in a word is executed;
//   * an opcode sent to a unit that does not execute it is dropped.
// A dropped slot raises `conflict` for that cycle. NOP slots are ignored.
// The per-slot routing, the wide instructions and the exclusive-instruction
// rule follow the architecture; dropping (rather than trapping) is this
// design's choice. Purely combinational.
module vliw_dispatcher
  import vliw_pkg::*;
(
  input  logic              valid,
  input  logic [WORD_W-1:0] word,
  output uinst_t            uinst [NUF],  // one per unit, indexed by uf_e
  output logic [WORD_W-1:8] payload,      // operands of a wide instruction
  output logic              conflict,     // a slot of this word was dropped
  output logic              excl_drop     // dropped because of the exclusive rule
);
  logic [SLOT_W-1:0] s;
  op_e  op;
  uf_e  uf;
  logic excl_used;
  logic wide;

  always_comb begin
    for (int u = 0; u < NUF; u++) uinst[u] = '{valid: 1'b0, slot: 2'd0, op: OP_NOP, field: '0};
    payload   = word[WORD_W-1:8];
    conflict  = 1'b0;
    excl_drop = 1'b0;
    excl_used = 1'b0;
    s  = word[SLOT_W-1:0];
    op = op_e'(s[4:0]);
    uf = uf_e'(s[7:5]);
    wide = valid && (op_e'(word[4:0]) == OP_PERBIT || op_e'(word[4:0]) == OP_SBOXINIC);
    if (wide) begin
      if (op_fits_uf(op_e'(word[4:0]), uf_e'(word[7:5]))) begin
        uinst[word[7:5]] = '{valid: 1'b1, slot: 2'd0, op: op_e'(word[4:0]), field: word[39:8]};
      end else begin
        conflict = 1'b1;
      end
    end else if (valid) begin
      for (int i = 0; i < NSLOT; i++) begin
        s  = word[i*SLOT_W +: SLOT_W];
        op = op_e'(s[4:0]);
        uf = uf_e'(s[7:5]);
        if (op != OP_NOP) begin
          if (!op_fits_uf(op, uf) || op == OP_PERBIT || op == OP_SBOXINIC
              || uinst[uf].valid) begin
            conflict = 1'b1;
          end else if (op_exclusive(op) && excl_used) begin
            conflict  = 1'b1;
            excl_drop = 1'b1;
          end else begin
            uinst[uf] = '{valid: 1'b1, slot: 2'(i), op: op, field: s[39:8]};
            if (op_exclusive(op)) excl_used = 1'b1;
          end
        end
      end
    end
  end
endmodule
