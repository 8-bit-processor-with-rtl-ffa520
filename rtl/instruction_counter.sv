// instruction_counter: 4-bit micro-step counter (one ctr193 / 74193).
//
// It counts up on every rising clock edge and so walks through the steps of
// the current 16-step instruction block; q is the low 4 bits of the control
// store address. rst_ctr (the RST CTR control bit) clears it at the end of
// the cycle that asserts it, so the next cycle is step 0, the fetch. hold
// (the HALT control bit) stops the count; holding is this design's addition.
// rst clears it asynchronously at power-on.
module instruction_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic       rst_ctr,
  input  logic       hold,
  output logic [3:0] q
);
  logic co, bo;

  ctr193 u_ctr (.clk(clk), .rst(rst), .clr(rst_ctr), .load(1'b0), .d(4'h0),
                .up(~hold), .down(1'b0), .q(q), .co(co), .bo(bo));
endmodule
