// vliw_dcache: data memory (D-CACHE), 2^16 words of 128 bits.
//
// Holds S-box tables, keys, the text to process and the results. One
// synchronous read port (data one cycle after the address) and one write
// port, so a LOAD or SBOX in the execute stage and a STORE in the write-back
// stage of the previous word can proceed in the same cycle. A read of the
// address being written returns the old contents. In the original prototype
// this memory sat outside the FPGA; the 16-bit address and 128-bit word
// follow the architecture, the port arrangement is this design's choice.
module vliw_dcache #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 128
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
