// alu8: the processor's 8-bit ALU, two alu181 (74181) slices in ripple carry.
//
// The low slice takes A[3:0], B[3:0] and the carry in from the FN header; its
// active-low carry out feeds the carry in of the high slice. Both slices share
// S3..S0 and M. fn is the 6-bit FN header {CN, M, S3, S2, S1, S0}. carry is the
// high slice's carry out made active high (meaningful in arithmetic mode) and
// aeqb is the AND of the two slices' A=B outputs (their open-collector
// outputs wired together). Combinational. The two-slice structure follows the
// source's ALU schematic; the nibble assignment and the header order are this
// design's reading of it.
module alu8
  import cpu_pkg::*;
(
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  alu_fn_t    fn,
  output logic [7:0] f,
  output logic       carry,
  output logic       aeqb
);
  logic cn_mid, cn_out, eq_lo, eq_hi;
  logic p_lo, g_lo, p_hi, g_hi;

  alu181 u_lo (
    .a(a[3:0]), .b(b[3:0]), .s(fn.s), .m(fn.m), .cn(fn.cn),
    .f(f[3:0]), .cn4(cn_mid), .aeqb(eq_lo), .p_n(p_lo), .g_n(g_lo)
  );
  alu181 u_hi (
    .a(a[7:4]), .b(b[7:4]), .s(fn.s), .m(fn.m), .cn(cn_mid),
    .f(f[7:4]), .cn4(cn_out), .aeqb(eq_hi), .p_n(p_hi), .g_n(g_hi)
  );

  assign carry = ~cn_out;
  assign aeqb  = eq_lo & eq_hi;
endmodule
