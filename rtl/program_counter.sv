// program_counter: 8-bit program counter built from two chained ctr193
// (74193) counters, as in the source's PC schematic.
//
// inc adds one on the rising clock edge, load takes d from the data bus (load
// wins), rst clears it asynchronously to 0. q addresses the program memory
// through the address-bus buffer and can also be put on the data bus (to save
// a return address). The 8-bit width limits programs to 256 bytes, as the
// source states.
module program_counter (
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
