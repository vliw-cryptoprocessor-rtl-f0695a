// vliw_loadstore: load/store unit (UF7), the only path between the registers
// and the D-CACHE besides the S-box unit.
//
// LOAD r, [a] reads D-CACHE word a into register r; STORE [a], r writes r to
// word a. field[4:0] names r, field[5] selects the addressing mode and
// field[31:16] holds a:
//   mode 0 (absolute): address a, then DPC <- a + 1;
//   mode 1 (stream):   address DPC, then DPC <- DPC + 1.
// A LOAD issues its read in the execute stage and the data reaches r in the
// write-back stage; a STORE captures address and data in the execute stage
// and writes the D-CACHE in the write-back stage. A register narrower than
// 128 bits takes the low bits of the word. LOAD/STORE and the use of DPC as
// the data pointer follow the architecture; the two addressing modes and the
// field layout are this design's choices.
module vliw_loadstore
  import vliw_pkg::*;
(
  input  uinst_t inst,
  input  data_t  regs [NREG],   // register view in the execute stage
  output logic   mem_re,
  output logic   mem_we,
  output addr_t  mem_addr,
  output data_t  mem_wdata,
  output logic   dst_we,        // LOAD destination (data from D-CACHE)
  output reg_e   dst,
  output logic   dpc_we,
  output addr_t  dpc_new
);
  reg_e  r;
  addr_t a, dpc;

  always_comb begin
    r        = reg_e'(inst.field[4:0]);
    dpc      = addr_t'(regs[R_DPC]);
    a        = inst.field[5] ? dpc : inst.field[31:16];
    mem_addr = a;
    mem_wdata = (int'(r) < NREG) ? regs[r] : '0;
    dst      = r;
    dpc_new  = a + addr_t'(1);
    mem_re   = inst.valid && inst.op == OP_LOAD;
    mem_we   = inst.valid && inst.op == OP_STORE;
    dst_we   = mem_re && int'(r) < NREG;
    dpc_we   = mem_re || mem_we;
  end
endmodule
