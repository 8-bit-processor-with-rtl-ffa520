// program_memory: the processor's byte-wide program and data memory (an
// AT28C64B EEPROM in the source), 2**AW bytes on the address and data buses.
//
// rd_data = mem[addr] combinationally; the data-bus buffer decides when it
// drives the bus (MMRY RD). wr writes wr_data to mem[addr] on the rising clock
// edge (MMRY WR, this design's addition so that stores work). A second port
// serves an external programmer: prog_we writes, dbg_addr / dbg_data read
// back. Only the 256 bytes an 8-bit address bus can reach are built; the
// chip's upper address lines count as tied low. Contents are not reset.
module program_memory #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [7:0]    rd_data,
  input  logic          wr,
  input  logic [7:0]    wr_data,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [7:0]    prog_data,
  input  logic [AW-1:0] dbg_addr,
  output logic [7:0]    dbg_data
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (prog_we)  mem[prog_addr] <= prog_data;
    else if (wr)  mem[addr]      <= wr_data;
  end

  assign rd_data  = mem[addr];
  assign dbg_data = mem[dbg_addr];
endmodule
