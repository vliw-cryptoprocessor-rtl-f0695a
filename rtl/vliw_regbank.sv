// vliw_regbank: the register bank.
//
// Holds the 24 architectural registers plus the S-box selectors LIN and COL:
//   general (128 bit): X, A1, B1, A2, B2, A3, A4, A5, B5, A6, B6
//   counters (16 bit): PERAC, AC1, AC2, SPC, DPC, IPC, JPC
//   configuration:     SBOXEND, SBOXCOL, SBOXQ (16 bit), TBO, TBD (6 bit),
//                      B (1 bit), LIN, COL (32 bit)
// All registers sit in one array of 128-bit entries; a write is masked to the
// register's real width, so the unused upper bits stay at their reset value
// of zero. IPC belongs to the control unit: reads return `ipc` and writes to
// it are ignored.
// Writes come from the write-back stage as an ordered list: the S-box
// configuration write first, then wr[0], wr[1], ... with a later entry
// overriding an earlier one to the same register. The core orders the list
// by slot, so the instruction in the later slot of a word wins, as the
// architecture prescribes for MOV against an ALU result.
// `view` is the register state after this cycle's writes, computed
// combinationally: the execute stage reads it, which bypasses results that
// are still in write-back to the next word. `q` is the committed state.
module vliw_regbank
  import vliw_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  addr_t     ipc,
  input  logic      cfg_we,
  input  sbox_cfg_t cfg,
  input  wr_t       wr [NWR],
  output data_t     view [NREG],
  output data_t     q    [NREG]
);
  data_t nxt [NREG];

  always_comb begin
    for (int r = 0; r < NREG; r++) nxt[r] = q[r];
    if (cfg_we) begin
      nxt[R_SBOXEND] = data_t'(cfg.sboxend);
      nxt[R_SBOXCOL] = data_t'(cfg.sboxcol);
      nxt[R_SBOXQ]   = data_t'(cfg.sboxq);
      nxt[R_TBO]     = data_t'(cfg.tbo);
      nxt[R_TBD]     = data_t'(cfg.tbd);
      nxt[R_LIN]     = data_t'(cfg.lin);
      nxt[R_COL]     = data_t'(cfg.col);
      nxt[R_BMODE]   = data_t'(cfg.bmode);
    end
    for (int i = 0; i < NWR; i++) begin
      if (wr[i].we && int'(wr[i].dst) < NREG && wr[i].dst != R_IPC)
        nxt[wr[i].dst] = wr[i].data & reg_mask(wr[i].dst);
    end
    nxt[R_IPC] = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) q[r] <= '0;
    end else begin
      for (int r = 0; r < NREG; r++) q[r] <= nxt[r];
    end
  end

  always_comb begin
    for (int r = 0; r < NREG; r++) view[r] = nxt[r];
    view[R_IPC] = data_t'(ipc);
  end
endmodule
