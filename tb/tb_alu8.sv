// tb_alu8: checks the two-slice 8-bit ALU with random operands on the
// functions the processor uses (add, subtract, compare, logic, increment,
// decrement, shift), with expected results and carries from plain 9-bit
// arithmetic, and the 8-bit A=B output after a compare.
module tb_alu8;
  import cpu_pkg::*;
  logic [7:0] a, b, f;
  alu_fn_t fn;
  logic carry, aeqb;
  int checks = 0, failures = 0;

  alu8 dut (.a(a), .b(b), .fn(fn), .f(f), .carry(carry), .aeqb(aeqb));

  task automatic check(input string name, input alu_fn_t fn_, input logic [8:0] exp, input bit chk_c);
    fn = fn_; #1;
    checks++;
    if (f !== exp[7:0] || (chk_c && carry !== exp[8])) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h f=%h c=%b exp=%h", name, a, b, f, carry, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = 8'($urandom); b = (i % 7 == 0) ? a : 8'($urandom);
      check("add", FN_ADD, {1'b0, a} + {1'b0, b}, 1);
      check("sub", FN_SUB, {1'b0, a} + {1'b0, ~b} + 9'd1, 1);
      check("and", FN_AND, {1'b0, a & b}, 0);
      check("or",  FN_OR,  {1'b0, a | b}, 0);
      check("xor", FN_XOR, {1'b0, a ^ b}, 0);
      check("not", FN_NOT, {1'b0, ~a}, 0);
      check("inc", FN_INC, {1'b0, a} + 9'd1, 1);
      check("dec", FN_DEC, {1'b0, a} + 9'h0FF, 1);
      check("shl", FN_SHL, {a, 1'b0}, 1);
      check("pass", FN_PASS_A, {1'b0, a}, 0);
      fn = FN_CMP; #1;
      checks++;
      if (aeqb !== (a == b)) begin
        failures++;
        $display("FAIL cmp a=%h b=%h aeqb=%b", a, b, aeqb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
