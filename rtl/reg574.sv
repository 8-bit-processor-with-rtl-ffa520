// reg574: W-bit edge-triggered register with load enable, used for the A and B
// ALU operand registers (74574 octal D flip-flops in the source design).
//
// On a rising clock edge with load high, q takes d. The outputs always drive
// the ALU, i.e. the part's output-control pin is held active. rst is an
// asynchronous clear, which the 74574 lacks; it is added so that the
// registers start at a known value.
module reg574 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end
endmodule
