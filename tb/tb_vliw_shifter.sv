// tb_vliw_shifter: self-checking test of the shifter. Every amount selector
// and both directions on random data, compared with a bit-by-bit reference.
module tb_vliw_shifter;
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
  vliw_shifter dut (.inst, .a, .we, .y);

  initial begin
    int amts[8] = '{1, 2, 3, 8, 32, 0, 0, 0};
    for (int n = 0; n < 200; n++) begin
      for (int sel = 0; sel < 8; sel++) begin
        for (int left = 0; left < 2; left++) begin
          a = {$urandom, $urandom, $urandom, $urandom};
          inst = '{valid: 1'b1, slot: 2'd0, op: left ? OP_SHL : OP_SHR, field: 32'(sel)};
          #1;
          for (int i = 0; i < 128; i++) begin
            automatic int src = left ? i - amts[sel] : i + amts[sel];
            exp[i] = (src >= 0 && src < 128) ? a[src] : 1'b0;
          end
          checks++;
          if (!we || y !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL sel=%0d left=%0d a=%h y=%h exp=%h", sel, left, a, y, exp);
          end
        end
      end
    end
    inst = '{valid: 1'b1, slot: 2'd0, op: OP_ROL, field: '0};
    #1;
    checks++;
    if (we) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
