// ram189: 16-word by 4-bit RAM slice with the function of the 74189.
//
// Active-low chip select cs_n and write enable we_n. With cs_n and we_n low,
// d is written to word addr on the rising clock edge. With cs_n low and we_n
// high the slice reads: q is the complement of the stored word and oe is
// high. Otherwise oe is low, standing for the part's high-impedance outputs
// (q then reads 0). The read is combinational. The organisation and the
// complemented read follow the source; the clocked write replaces the part's
// write pulse.
module ram189 (
  input  logic       clk,
  input  logic       cs_n,
  input  logic       we_n,
  input  logic [3:0] addr,
  input  logic [3:0] d,
  output logic [3:0] q,
  output logic       oe
);
  logic [3:0] mem [16];

  always_ff @(posedge clk) begin
    if (!cs_n && !we_n) mem[addr] <= d;
  end

  assign oe = !cs_n && we_n;
  assign q  = oe ? ~mem[addr] : 4'h0;
endmodule
