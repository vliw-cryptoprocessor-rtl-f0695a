// vliw_crypto_top: the VLIW cryptoprocessor with its two memories.
//
// Connects the core to a 2^16 x 160-bit I-CACHE (programs) and a
// 2^16 x 128-bit D-CACHE (S-boxes, keys, text, results) in a Harvard
// arrangement, so instruction fetch, a D-CACHE read and a D-CACHE write can
// all happen in the same cycle. A host port loads programs and data and
// reads results; while the core is busy it owns the D-CACHE and host
// D-CACHE accesses are ignored. Host reads return data one cycle after
// host_d_re. Run a program by pulsing `start` with its first address and
// waiting for `done` (the program ends with a JMP to itself). Memory writes
// are blocked while reset is asserted, so that nothing is written before
// the core's registers have been cleared.
module vliw_crypto_top
  import vliw_pkg::*;
#(
  parameter int unsigned IAW = 16,   // I-CACHE address bits
  parameter int unsigned DAW = 16    // D-CACHE address bits
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  addr_t             start_addr,
  output logic              busy,
  output logic              done,
  output logic              word_error,
  // host access to the I-CACHE
  input  logic              host_i_we,
  input  addr_t             host_i_addr,
  input  logic [WORD_W-1:0] host_i_wdata,
  // host access to the D-CACHE
  input  logic              host_d_we,
  input  logic              host_d_re,
  input  addr_t             host_d_addr,
  input  data_t             host_d_wdata,
  output data_t             host_d_rdata
);
  logic              imem_re;
  addr_t             imem_addr;
  logic [WORD_W-1:0] imem_rdata;
  logic              dmem_re, dmem_we;
  addr_t             dmem_raddr, dmem_waddr;
  data_t             dmem_rdata, dmem_wdata;

  vliw_core u_core (
    .clk, .rst_n, .start, .start_addr, .busy, .done, .word_error,
    .imem_re, .imem_addr, .imem_rdata,
    .dmem_re, .dmem_raddr, .dmem_rdata, .dmem_we, .dmem_waddr, .dmem_wdata
  );

  vliw_icache #(.AW(IAW), .DW(WORD_W)) u_icache (
    .clk, .re(imem_re), .raddr(imem_addr[IAW-1:0]), .rdata(imem_rdata),
    .we(host_i_we && !busy && rst_n), .waddr(host_i_addr[IAW-1:0]), .wdata(host_i_wdata)
  );

  logic d_re, d_we;
  addr_t d_raddr, d_waddr;
  data_t d_wdata;

  always_comb begin
    if (busy) begin
      d_re = dmem_re;  d_raddr = dmem_raddr;
      d_we = dmem_we;  d_waddr = dmem_waddr;  d_wdata = dmem_wdata;
    end else begin
      d_re = host_d_re;  d_raddr = host_d_addr;
      d_we = host_d_we;  d_waddr = host_d_addr;  d_wdata = host_d_wdata;
    end
  end

  vliw_dcache #(.AW(DAW), .DW(DATA_W)) u_dcache (
    .clk, .re(d_re), .raddr(d_raddr[DAW-1:0]), .rdata(dmem_rdata),
    .we(d_we && rst_n), .waddr(d_waddr[DAW-1:0]), .wdata(d_wdata)
  );

  assign host_d_rdata = dmem_rdata;
endmodule
