// vliw_rotator: rotator (UF4).
//
// ROL and ROR rotate the 128-bit register A4 by 1, 2, 4, 8 or 32 positions;
// the result goes back to A4. The amount is chosen by field[2:0]:
// 0 -> 1, 1 -> 2, 2 -> 4, 3 -> 8, 4 -> 32, codes 5..7 rotate by 0. The amount
// set comes from the architecture; the selector encoding is this design's
// choice. Combinational, one cycle.
module vliw_rotator
  import vliw_pkg::*;
(
  input  uinst_t inst,
  input  data_t  a,      // A4
  output logic   we,
  output data_t  y
);
  logic [6:0] amt;

  always_comb begin
    case (inst.field[2:0])
      3'd0: amt = 7'd1;
      3'd1: amt = 7'd2;
      3'd2: amt = 7'd4;
      3'd3: amt = 7'd8;
      3'd4: amt = 7'd32;
      default: amt = 7'd0;
    endcase
    we = inst.valid && (inst.op == OP_ROL || inst.op == OP_ROR);
    if (inst.op == OP_ROL) y = (a << amt) | (a >> (7'd0 - amt));
    else                   y = (a >> amt) | (a << (7'd0 - amt));
  end
endmodule
