// gpr: 16 x 8-bit general purpose register file made of two ram189 (74189)
// slices, one per nibble.
//
// we writes the data bus value d into register addr on the rising clock
// edge; q is register addr, combinational, for the data-bus and address-bus
// buffers. Since the 74189 reads back the complement of what it stores, d is
// inverted on the way in, so q returns the true value. The register number
// comes from the control word (this design's choice; the source does not say
// what addresses the file). Registers are not reset.
module gpr (
  input  logic       clk,
  input  logic       we,
  input  logic [3:0] addr,
  input  logic [7:0] d,
  output logic [7:0] q
);
  logic oe_lo, oe_hi;

  ram189 u_lo (.clk(clk), .cs_n(1'b0), .we_n(~we), .addr(addr), .d(~d[3:0]),
               .q(q[3:0]), .oe(oe_lo));
  ram189 u_hi (.clk(clk), .cs_n(1'b0), .we_n(~we), .addr(addr), .d(~d[7:4]),
               .q(q[7:4]), .oe(oe_hi));
endmodule
