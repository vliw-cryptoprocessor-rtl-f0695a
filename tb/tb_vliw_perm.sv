// tb_vliw_perm: self-checking test of the permutation unit: PERINIC, random
// PERBIT tables (with skipped entries and wrap-around of PERAC), and the DES
// expansion E built from three PERBIT words.
module tb_vliw_perm;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uinst_t inst;
  logic [PERM_N-1:0][7:0] idx;
  data_t a5, b5, a5_new, exp;
  addr_t perac, perac_new;
  logic  a5_we, perac_we;
  vliw_perm dut (.inst, .idx, .a5, .b5, .perac, .a5_we, .a5_new, .perac_we, .perac_new);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // DES expansion table, 0-based source bit for each of the 48 output bits
  int e_tab[48] = '{31,0,1,2,3,4,3,4,5,6,7,8,7,8,9,10,11,12,11,12,13,14,15,16,
                    15,16,17,18,19,20,19,20,21,22,23,24,23,24,25,26,27,28,27,28,29,30,31,0};

  initial begin
    // PERINIC
    a5 = {$urandom, $urandom, $urandom, $urandom};
    b5 = '0; perac = 16'h55; idx = '0;
    inst = '{valid: 1'b1, slot: 2'd0, op: OP_PERINIC, field: 32'd40};
    #1;
    chk(a5_we && a5_new == '0 && perac_we && perac_new == 16'd40, "perinic");

    // random PERBIT
    for (int n = 0; n < 500; n++) begin
      a5 = {$urandom, $urandom, $urandom, $urandom};
      b5 = {$urandom, $urandom, $urandom, $urandom};
      perac = 16'($urandom_range(0, 127));
      for (int i = 0; i < PERM_N; i++) idx[i] = 8'($urandom);
      inst = '{valid: 1'b1, slot: 2'd0, op: OP_PERBIT, field: '0};
      #1;
      exp = a5;
      for (int i = 0; i < PERM_N; i++)
        if (idx[i] < 128) exp[(int'(perac) + i) % 128] = b5[idx[i]];
      chk(a5_we && a5_new === exp, "perbit data");
      chk(perac_we && perac_new == perac + 16, "perbit perac");
    end

    // DES expansion: three PERBIT words after PERINIC 0
    b5 = {96'd0, 32'h_F0AA_5C3E};
    a5 = '0; perac = '0;
    for (int w = 0; w < 3; w++) begin
      for (int i = 0; i < PERM_N; i++) idx[i] = 8'(e_tab[w*16 + i]);
      inst = '{valid: 1'b1, slot: 2'd0, op: OP_PERBIT, field: '0};
      #1;
      a5 = a5_new; perac = perac_new;
    end
    exp = '0;
    for (int i = 0; i < 48; i++) exp[i] = b5[e_tab[i]];
    chk(a5 === exp && perac == 16'd48, "DES expansion");

    inst = '{valid: 1'b0, slot: 2'd0, op: OP_PERBIT, field: '0};
    #1;
    chk(!a5_we && !perac_we, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
