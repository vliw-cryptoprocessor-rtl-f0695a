// vliw_shifter: logical shifter (UF3).
//
// SHL and SHR shift the 128-bit register A3 by 1, 2, 3, 8 or 32 positions,
// filling with zeros; the result goes back to A3. The amount is chosen by
// field[2:0] of the instruction: 0 -> 1, 1 -> 2, 2 -> 3, 3 -> 8, 4 -> 32.
// Codes 5..7 shift by 0. The amount set comes from the architecture; the
// selector encoding is this design's choice. Combinational, one cycle.
module vliw_shifter
  import vliw_pkg::*;
(
  input  uinst_t inst,
  input  data_t  a,      // A3
  output logic   we,
  output data_t  y
);
  logic [5:0] amt;

  always_comb begin
    case (inst.field[2:0])
      3'd0: amt = 6'd1;
      3'd1: amt = 6'd2;
      3'd2: amt = 6'd3;
      3'd3: amt = 6'd8;
      3'd4: amt = 6'd32;
      default: amt = 6'd0;
    endcase
    we = inst.valid && (inst.op == OP_SHL || inst.op == OP_SHR);
    y  = (inst.op == OP_SHL) ? (a << amt) : (a >> amt);
  end
endmodule
