// vliw_movbranch: move and branch unit (UF8).
//
// MOV d, s copies register s (field[12:8]) to register d (field[4:0]); a
// narrower destination keeps the low bits, a narrower source reads as
// zero-extended. JMP t, JZ a,t (a == 0), JL a,b,t (a < b) and JG a,b,t
// (a > b) compare full 128-bit registers, unsigned, with a in field[4:0],
// b in field[12:8] and the target t in field[31:16]. A taken branch loads
// the instruction counter with t and records t in JPC.
// Branches resolve in the execute stage while the next word is already being
// fetched, so the word after a branch always executes (one delay slot); the
// pipeline is never stalled. A JMP to its own address is the halt
// convention: the control unit then stops fetching.
// The instruction list follows the architecture; operand encodings, branch
// conditions, the delay slot and the halt convention are this design's
// choices.
module vliw_movbranch
  import vliw_pkg::*;
(
  input  uinst_t inst,
  input  addr_t  pc,            // address of the word in the execute stage
  input  data_t  regs [NREG],
  output logic   dst_we,
  output reg_e   dst,
  output data_t  data,
  output logic   taken,
  output addr_t  target,
  output logic   halt
);
  reg_e  ra, rb;
  data_t va, vb;

  always_comb begin
    ra     = reg_e'(inst.field[4:0]);
    rb     = reg_e'(inst.field[12:8]);
    va     = (int'(ra) < NREG) ? regs[ra] : '0;
    vb     = (int'(rb) < NREG) ? regs[rb] : '0;
    target = inst.field[31:16];
    dst    = ra;
    data   = vb;
    dst_we = inst.valid && inst.op == OP_MOV && int'(ra) < NREG;
    taken  = 1'b0;
    if (inst.valid) begin
      case (inst.op)
        OP_JMP:  taken = 1'b1;
        OP_JZ:   taken = (va == '0);
        OP_JL:   taken = (va < vb);
        OP_JG:   taken = (va > vb);
        default: taken = 1'b0;
      endcase
    end
    halt = inst.valid && inst.op == OP_JMP && target == pc;
  end
endmodule
