// instruction_register: 8-bit opcode register built from two chained ctr193
// (74193) counters, as in the source's IR schematic.
//
// load takes d (the data bus) on the rising clock edge, inc adds one, rst
// (asynchronous) clears it; load wins over inc. The upper nibble counts when
// inc is high and the lower nibble is at 15. The value q selects the 16-step
// block of the control store. Loading, incrementing and resetting are the
// functions the source gives the IR; the synchronous cascade is this
// design's.
module instruction_register (
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic       inc,
  input  logic [7:0] d,
  output logic [7:0] q
);
  logic co_lo, co_hi, bo_lo, bo_hi;

  ctr193 u_lo (.clk(clk), .rst(rst), .clr(1'b0), .load(load), .d(d[3:0]),
               .up(inc), .down(1'b0), .q(q[3:0]), .co(co_lo), .bo(bo_lo));
  ctr193 u_hi (.clk(clk), .rst(rst), .clr(1'b0), .load(load), .d(d[7:4]),
               .up(inc & co_lo), .down(1'b0), .q(q[7:4]), .co(co_hi), .bo(bo_hi));
endmodule
