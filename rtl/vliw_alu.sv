// vliw_alu: arithmetic and logic unit, used twice (UF1 and UF2).
//
// Executes AND, OR, XOR, ADD, SUB, INC, DEC, NOT, CLR and NOP on the unit's
// fixed pair of 128-bit registers: A <- A op B (A1/B1 for UF1, A2/B2 for UF2).
// As in the architecture, the result always goes back to the A register, and
// the whole operation (including a full 128-bit carry chain) is done in one
// cycle. The unit is purely combinational: the core samples `we`/`y` in the
// execute stage and commits them one stage later. ADD/SUB/INC/DEC are modulo
// 2^128; the operation list and register roles follow the architecture, the
// modular arithmetic is this design's choice.
module vliw_alu
  import vliw_pkg::*;
(
  input  uinst_t inst,   // decoded slot routed to this unit
  input  data_t  a,      // A register
  input  data_t  b,      // B register
  output logic   we,     // write A
  output data_t  y       // new value of A
);
  always_comb begin
    we = inst.valid;
    y  = a;
    case (inst.op)
      OP_AND: y = a & b;
      OP_OR:  y = a | b;
      OP_XOR: y = a ^ b;
      OP_ADD: y = a + b;
      OP_SUB: y = a - b;
      OP_INC: y = a + data_t'(1);
      OP_DEC: y = a - data_t'(1);
      OP_NOT: y = ~a;
      OP_CLR: y = '0;
      default: we = 1'b0;  // NOP and anything not an ALU operation
    endcase
  end
endmodule
