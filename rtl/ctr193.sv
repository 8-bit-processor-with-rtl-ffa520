// ctr193: 4-bit up/down counter with parallel load and clear, the function of
// the 74193 used for the program counter, instruction register and
// instruction counter.
//
// The original part counts on the rising edge of one of two count clocks and
// loads and clears asynchronously. Here everything happens on one system
// clock: clr has priority, then load, then up, then down. co is high while the
// counter sits at 15 (the next up-count wraps), bo while it sits at 0 (the
// next down-count wraps); they let two counters be chained into 8 bits, like
// the carry and borrow pins of the part. rst is an asynchronous power-on clear.
module ctr193 (
  input  logic       clk,
  input  logic       rst,
  input  logic       clr,
  input  logic       load,
  input  logic [3:0] d,
  input  logic       up,
  input  logic       down,
  output logic [3:0] q,
  output logic       co,
  output logic       bo
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)       q <= '0;
    else if (clr)  q <= '0;
    else if (load) q <= d;
    else if (up)   q <= q + 4'd1;
    else if (down) q <= q - 4'd1;
  end

  assign co = (q == 4'hF);
  assign bo = (q == 4'h0);
endmodule
