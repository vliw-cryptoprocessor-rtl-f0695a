// vliw_perm: bit permutation unit, the P-BOX (UF5).
//
// PERINIC starts a permutation: it clears A5 and sets the permutation
// accumulator PERAC to field[6:0], the first destination bit.
// PERBIT is a wide instruction holding a 16-entry permutation table: for
// i = 0..15 it copies bit idx[i] of the source register B5 to bit PERAC+i
// (mod 128) of A5, then advances PERAC by 16. An entry with bit 7 set leaves
// its destination bit alone, so a single bit can be moved as well as a run
// of 16. Sixteen bit permutations per cycle, the table carried in the
// instruction and the A5/B5/PERAC roles follow the architecture; the clearing
// of A5 by PERINIC, the skip bit and LSB-first bit numbering are this
// design's choices. Combinational; the core commits A5 and PERAC one stage
// later.
module vliw_perm
  import vliw_pkg::*;
(
  input  uinst_t                   inst,
  input  logic [PERM_N-1:0][7:0]   idx,       // PERBIT table (word bits [135:8])
  input  data_t                    a5,
  input  data_t                    b5,
  input  addr_t                    perac,
  output logic                     a5_we,
  output data_t                    a5_new,
  output logic                     perac_we,
  output addr_t                    perac_new
);
  always_comb begin
    a5_we     = 1'b0;
    a5_new    = a5;
    perac_we  = 1'b0;
    perac_new = perac;
    if (inst.valid) begin
      case (inst.op)
        OP_PERINIC: begin
          a5_we     = 1'b1;
          a5_new    = '0;
          perac_we  = 1'b1;
          perac_new = addr_t'(inst.field[6:0]);
        end
        OP_PERBIT: begin
          a5_we = 1'b1;
          for (int i = 0; i < PERM_N; i++) begin
            if (!idx[i][7]) a5_new[7'(perac[6:0] + 7'(i))] = b5[idx[i][6:0]];
          end
          perac_we  = 1'b1;
          perac_new = perac + addr_t'(PERM_N);
        end
        default: ;
      endcase
    end
  end
endmodule
