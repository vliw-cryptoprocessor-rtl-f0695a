// tb_vliw_regbank: self-checking test of the register bank against a
// reference model: random ordered write lists (later entries win), width
// masking of counter and configuration registers, the read-only IPC, the
// SBOXINIC configuration write, and the same-cycle bypass through `view`.
module tb_vliw_regbank;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  addr_t     ipc;
  logic      cfg_we;
  sbox_cfg_t cfg;
  wr_t       wr [NWR];
  data_t     view [NREG], q [NREG];
  data_t     model [NREG];
  vliw_regbank dut (.clk, .rst_n, .ipc, .cfg_we, .cfg, .wr, .view, .q);

  function automatic int width_of(int r);
    if (r <= 10) return 128;
    if (r <= 20) return 16;
    if (r <= 22) return 6;
    if (r == 23) return 1;
    return 32;
  endfunction

  function automatic data_t trunc(int r, data_t v);
    data_t m = '0;
    for (int i = 0; i < width_of(r); i++) m[i] = 1'b1;
    return v & m;
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < NWR; i++) wr[i] = WR_NONE;
    cfg_we = 0; cfg = '0; ipc = 16'h1234;
    for (int r = 0; r < NREG; r++) model[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      ipc = 16'($urandom);
      cfg_we = (t % 5 == 0);
      cfg = {$urandom, $urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < NWR; i++) begin
        wr[i].we   = 1'($urandom);
        wr[i].dst  = reg_e'($urandom_range(0, NREG - 1));
        wr[i].data = {$urandom, $urandom, $urandom, $urandom};
        wr[i].src  = WS_VAL;
      end
      if (t % 3 == 0) begin   // same register twice: the later write wins
        wr[2] = '{we: 1, dst: R_A1, data: 128'h1, src: WS_VAL, mpos: '0, mlen: '0};
        wr[9] = '{we: 1, dst: R_A1, data: 128'h2, src: WS_VAL, mpos: '0, mlen: '0};
        for (int i = 10; i < NWR; i++) if (wr[i].dst == R_A1) wr[i].we = 1'b0;
      end
      // reference next state
      if (cfg_we) begin
        model[R_SBOXEND] = data_t'(cfg.sboxend); model[R_SBOXCOL] = data_t'(cfg.sboxcol);
        model[R_SBOXQ] = data_t'(cfg.sboxq);     model[R_TBO] = data_t'(cfg.tbo);
        model[R_TBD] = data_t'(cfg.tbd);         model[R_LIN] = data_t'(cfg.lin);
        model[R_COL] = data_t'(cfg.col);         model[R_BMODE] = data_t'(cfg.bmode);
      end
      for (int i = 0; i < NWR; i++)
        if (wr[i].we && wr[i].dst != R_IPC) model[wr[i].dst] = trunc(int'(wr[i].dst), wr[i].data);
      #1;
      for (int r = 0; r < NREG; r++) begin
        automatic data_t e = (r == int'(R_IPC)) ? data_t'(ipc) : model[r];
        chk(view[r] === e, $sformatf("view r=%0d t=%0d", r, t));
      end
      if (t % 3 == 0) chk(view[R_A1] == 128'h2, "later write wins");
      @(posedge clk);
      #1;
      for (int r = 0; r < NREG; r++)
        if (r != int'(R_IPC)) chk(q[r] === model[r], $sformatf("q r=%0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
