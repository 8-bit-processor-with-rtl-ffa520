// flag_logic: computes flags from the ALU and holds them in a flag register.
//
// carry is the ALU's active-high carry out, aeqb its A=B output (A equals B
// after a compare, which the 74181 computes as A minus B minus 1 = 1111) and
// zero is set when the ALU result is 0. All three are captured on the rising
// clock edge of a cycle with load (the FLAG_IN control bit) and cleared by
// rst. Which flags exist is this design's choice: the source only says that
// a flag logic unit calculates flags from the ALU output.
module flag_logic (
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic [7:0] alu_f,
  input  logic       alu_carry,
  input  logic       alu_aeqb,
  output logic       carry,
  output logic       aeqb,
  output logic       zero
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      carry <= 1'b0; aeqb <= 1'b0; zero <= 1'b0;
    end else if (load) begin
      carry <= alu_carry;
      aeqb  <= alu_aeqb;
      zero  <= (alu_f == 8'h00);
    end
  end
endmodule
