// alu181: one 4-bit slice with the function of the 74181 ALU (active-high
// data), two of which form the processor's 8-bit ALU.
//
// Each bit forms a propagate term P = A | (B & S0) | (~B & S1) and a generate
// term G = (A & ~B & S2) | (A & B & S3). In logic mode (m = 1) F = ~(P ^ G);
// in arithmetic mode F = P plus G plus carry, which yields the sixteen
// arithmetic functions of the part (A plus B with S = 1001, A minus B minus 1
// with S = 0110, and so on). cn is the active-low carry in and cn4 the
// active-low carry out, as on the part; aeqb is high when F = 1111, p_n and
// g_n are the group propagate and generate for a look-ahead unit.
// Purely combinational. The function follows the 74181 data sheet; the
// source only names the part.
module alu181 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] s,
  input  logic       m,
  input  logic       cn,
  output logic [3:0] f,
  output logic       cn4,
  output logic       aeqb,
  output logic       p_n,
  output logic       g_n
);
  logic [3:0] p, g, h, c;
  logic       cy;

  always_comb begin
    p = a | (b & {4{s[0]}}) | (~b & {4{s[1]}});
    g = (a & ~b & {4{s[2]}}) | (a & b & {4{s[3]}});
    h = p & ~g;
    cy = ~cn;
    for (int i = 0; i < 4; i++) begin
      c[i] = cy;
      cy   = g[i] | (p[i] & cy);
    end
    f = m ? ~h : (h ^ c);
  end

  assign cn4  = ~cy;
  assign aeqb = &f;
  assign p_n  = ~&p;
  assign g_n  = ~(g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]));
endmodule
