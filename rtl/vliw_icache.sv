// vliw_icache: instruction memory (I-CACHE), 2^16 words of 160 bits.
//
// Holds the programs, one VLIW word per address. The core reads it with a
// synchronous port (address in the fetch cycle, word in the next cycle); a
// second, write-only port loads programs from outside. In the original
// prototype this memory sat outside the FPGA; here it is a plain array that
// maps to block RAM or an external SRAM model. The 16-bit address and
// 160-bit word follow the architecture.
module vliw_icache #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 160
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
