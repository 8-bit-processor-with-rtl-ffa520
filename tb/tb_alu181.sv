// tb_alu181: exhaustive check of one 74181 slice against the data-sheet
// function tables (32 functions x all operands x both carry-in levels).
// The expected values are written straight from the tables (A plus B, A minus
// B minus 1, NAND, ...), independently of the slice's propagate/generate form.
module tb_alu181;
  logic [3:0] a, b, s, f;
  logic m, cn, cn4, aeqb, p_n, g_n;
  int checks = 0, failures = 0;

  alu181 dut (.a(a), .b(b), .s(s), .m(m), .cn(cn), .f(f), .cn4(cn4), .aeqb(aeqb), .p_n(p_n), .g_n(g_n));

  function automatic logic [4:0] arith(input logic [3:0] s_, input logic [3:0] x, input logic [3:0] y, input logic cin);
    logic [4:0] A, B, AB, AnB, AoB, AonB, C;
    A = {1'b0, x}; B = {1'b0, y}; C = {4'b0, cin};
    AB = {1'b0, x & y}; AnB = {1'b0, x & ~y}; AoB = {1'b0, x | y}; AonB = {1'b0, x | ~y};
    case (s_)
      4'h0: return A + C;
      4'h1: return AoB + C;
      4'h2: return AonB + C;
      4'h3: return 5'h0F + C;            // minus 1
      4'h4: return A + AnB + C;
      4'h5: return AoB + AnB + C;
      4'h6: return A + {1'b0, ~y} + C;   // A minus B minus 1
      4'h7: return AnB + 5'h0F + C;
      4'h8: return A + AB + C;
      4'h9: return A + B + C;
      4'hA: return AonB + AB + C;
      4'hB: return AB + 5'h0F + C;
      4'hC: return A + A + C;
      4'hD: return AoB + A + C;
      4'hE: return AonB + A + C;
      default: return A + 5'h0F + C;
    endcase
  endfunction

  function automatic logic [3:0] logic_fn(input logic [3:0] s_, input logic [3:0] x, input logic [3:0] y);
    case (s_)
      4'h0: return ~x;        4'h1: return ~(x | y);
      4'h2: return ~x & y;    4'h3: return 4'h0;
      4'h4: return ~(x & y);  4'h5: return ~y;
      4'h6: return x ^ y;     4'h7: return x & ~y;
      4'h8: return ~x | y;    4'h9: return ~(x ^ y);
      4'hA: return y;         4'hB: return x & y;
      4'hC: return 4'hF;      4'hD: return x | ~y;
      4'hE: return x | y;     default: return x;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] exp5;
    for (int im = 0; im < 2; im++)
      for (int ic = 0; ic < 2; ic++)
        for (int is = 0; is < 16; is++)
          for (int ia = 0; ia < 16; ia++)
            for (int ib = 0; ib < 16; ib++) begin
              a = 4'(ia); b = 4'(ib); s = 4'(is); m = 1'(im); cn = 1'(ic);
              #1;
              checks++;
              if (m) begin
                if (f !== logic_fn(s, a, b)) begin
                  failures++;
                  if (failures < 10) $display("FAIL logic s=%h a=%h b=%h f=%h", s, a, b, f);
                end
              end else begin
                exp5 = arith(s, a, b, ~cn);
                if (f !== exp5[3:0] || cn4 !== ~exp5[4]) begin
                  failures++;
                  if (failures < 10) $display("FAIL arith s=%h a=%h b=%h cn=%b f=%h cn4=%b exp=%h", s, a, b, cn, f, cn4, exp5);
                end
              end
              checks++;
              if (aeqb !== (f == 4'hF)) failures++;
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
