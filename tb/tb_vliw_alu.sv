// tb_vliw_alu: self-checking test of the ALU. Random 128-bit operands for every
// opcode; the expected result is built 32 bits at a time with explicit carry
// and borrow propagation, independently of the 128-bit operators in the unit.
module tb_vliw_alu;
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
  data_t  a, b, y;
  logic   we;
  vliw_alu dut (.inst, .a, .b, .we, .y);

  function automatic data_t add_ref(data_t x, data_t z, logic cin);
    data_t r;
    logic [32:0] t;
    logic c = cin;
    for (int i = 0; i < 4; i++) begin
      t = {1'b0, x[i*32 +: 32]} + {1'b0, z[i*32 +: 32]} + 33'(c);
      r[i*32 +: 32] = t[31:0];
      c = t[32];
    end
    return r;
  endfunction

  function automatic data_t rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    op_e ops[10] = '{OP_NOP, OP_AND, OP_OR, OP_XOR, OP_ADD, OP_SUB, OP_INC, OP_DEC, OP_NOT, OP_CLR};
    data_t exp;
    logic  exp_we;
    for (int n = 0; n < 400; n++) begin
      foreach (ops[k]) begin
        a = rnd128();
        b = rnd128();
        if (n == 0) begin a = '1; b = data_t'(1); end   // full carry chain
        if (n == 1) begin a = '0; b = data_t'(1); end   // full borrow chain
        inst = '{valid: 1'b1, slot: 2'd0, op: ops[k], field: '0};
        #1;
        exp_we = 1'b1;
        case (ops[k])
          OP_AND: exp = a & b;
          OP_OR:  exp = a | b;
          OP_XOR: exp = a ^ b;
          OP_ADD: exp = add_ref(a, b, 1'b0);
          OP_SUB: exp = add_ref(a, ~b, 1'b1);
          OP_INC: exp = add_ref(a, '0, 1'b1);
          OP_DEC: exp = add_ref(a, '1, 1'b0);
          OP_NOT: exp = ~a;
          OP_CLR: exp = '0;
          default: begin exp = a; exp_we = 1'b0; end
        endcase
        checks++;
        if (we !== exp_we || (exp_we && y !== exp)) begin
          failures++;
          if (failures < 10) $display("FAIL op=%s a=%h b=%h y=%h exp=%h", ops[k].name(), a, b, y, exp);
        end
      end
    end
    inst = '{valid: 1'b0, slot: 2'd0, op: OP_ADD, field: '0};
    #1;
    checks++;
    if (we) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
