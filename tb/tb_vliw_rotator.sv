// tb_vliw_rotator: self-checking test of the rotator. Every amount selector
// and both directions on random data, compared with a bit-by-bit reference.
module tb_vliw_rotator;
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
  data_t  a, y, exp;
  logic   we;
  vliw_rotator dut (.inst, .a, .we, .y);

  initial begin
    int amts[8] = '{1, 2, 4, 8, 32, 0, 0, 0};
    for (int n = 0; n < 200; n++) begin
      for (int sel = 0; sel < 8; sel++) begin
        for (int left = 0; left < 2; left++) begin
          a = {$urandom, $urandom, $urandom, $urandom};
          inst = '{valid: 1'b1, slot: 2'd0, op: left ? OP_ROL : OP_ROR, field: 32'(sel)};
          #1;
          for (int i = 0; i < 128; i++)
            exp[i] = left ? a[(i - amts[sel] + 128) % 128] : a[(i + amts[sel]) % 128];
          checks++;
          if (!we || y !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL sel=%0d left=%0d a=%h y=%h exp=%h", sel, left, a, y, exp);
          end
        end
      end
    end
    inst = '{valid: 1'b1, slot: 2'd0, op: OP_SHL, field: '0};
    #1;
    checks++;
    if (we) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
