// control_store: the microprogrammed control unit's memory. In the source it
// is five byte-wide EEPROMs side by side, giving a 40-bit control word.
//
// The address is {IR, CTR}: the opcode in the instruction register picks one
// of 256 blocks of 16 words, and the instruction counter picks the step in
// the block. The read is combinational (EEPROM access), so a new opcode
// loaded into IR selects its block in the same cycle the counter moves on.
// At start-up the array holds cpu_pkg::default_microcode(); an external
// programmer can overwrite any word through prog_we / prog_addr / prog_data,
// which is how a user defines new instructions. Write timing of a real
// EEPROM is not modelled.
module control_store
  import cpu_pkg::*;
#(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 40
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] q,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [DW-1:0] prog_data
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int unsigned i = 0; i < 2**AW; i++)
      mem[i] = DW'(default_microcode(8'(i >> 4), 4'(i)));
  end

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  assign q = mem[addr];
endmodule
