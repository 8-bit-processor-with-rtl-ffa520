// alu_out_buffer: holds the ALU result and offers it to the data bus and the
// address bus.
//
// With REGISTERED = 1 (default) the buffer is an octal D flip-flop (74574):
// the ALU result is captured on the rising clock edge of a cycle with latch
// high, and q shows it from the next cycle on. The microcode therefore spends
// one step computing and latching and a later step putting q on a bus. With
// REGISTERED = 0 it is a plain non-storing buffer (74541), q = alu_f at once,
// and latch is ignored. The source's text names the flip-flop while its
// buffer schematic shows the 74541; the flip-flop is the default here. Which
// bus q reaches is decided by the bus enables in bus8.
module alu_out_buffer #(
  parameter bit REGISTERED = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       latch,
  input  logic [7:0] alu_f,
  output logic [7:0] q
);
  if (REGISTERED) begin : g_reg
    reg574 #(.W(8)) u_reg (.clk(clk), .rst(rst), .load(latch), .d(alu_f), .q(q));
  end else begin : g_pass
    assign q = alu_f;
  end
endmodule
