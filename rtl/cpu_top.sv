// cpu_top: an 8-bit microprogrammed processor whose instruction set lives
// entirely in a writable control store, so that a user can reshape the
// architecture by reprogramming it.
//
// Structure (after the source's block diagram): a data bus and an address bus,
// both 8 bits. On the data bus: A and B operand registers feeding a 74181-style
// ALU, the ALU output buffer, 16 general purpose registers, the program
// counter, the instruction register and the program memory. The address bus
// is driven by the PC, the GPR file or the ALU buffer and addresses memory.
// The control store is addressed by {IR, CTR} and its 40-bit word drives every
// buffer enable and register load of the cycle.
//
// Timing: one micro-step per clock. Step 0 of every block is the fetch (PC to
// address bus, memory read, IR in); since the control store read is
// combinational, the new opcode's block is selected as soon as IR loads, and
// step 1 (INC PC) already comes from it. An instruction ends with RST CTR,
// after which the next fetch runs. Reset (asynchronous, active high) clears
// PC, IR, CTR, A, B, the ALU buffer and the flags.
//
// Interface: prog_mem_* and prog_cs_* let an external programmer fill the
// program memory and the control store (use them while rst is high);
// dbg_mem_addr/dbg_mem_data read memory back. The remaining outputs expose
// the registers, buses and flags. halted is high while the HALT step runs.
// The microcode and the control word layout are this design's own (see
// cpu_pkg); interrupts, which the source only names, are not built.
module cpu_top
  import cpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        prog_mem_we,
  input  logic [7:0]  prog_mem_addr,
  input  logic [7:0]  prog_mem_data,
  input  logic        prog_cs_we,
  input  logic [11:0] prog_cs_addr,
  input  logic [39:0] prog_cs_data,
  input  logic [7:0]  dbg_mem_addr,
  output logic [7:0]  dbg_mem_data,
  output logic [7:0]  pc,
  output logic [7:0]  ir,
  output logic [3:0]  ctr,
  output logic [7:0]  a_reg,
  output logic [7:0]  b_reg,
  output logic [7:0]  data_bus,
  output logic [7:0]  addr_bus,
  output logic [2:0]  flags,     // {carry, a_eq_b, zero}
  output logic        halted
);
  ctrl_t      cw;
  logic [39:0] cw_bits;
  logic [7:0] alu_f, alu_q, gpr_q, mem_q;
  logic       alu_carry, alu_aeqb;
  logic       f_carry, f_aeqb, f_zero;

  // ---------------- control unit ----------------
  control_store #(.AW(CS_AW), .DW(CTRL_W)) u_cs (
    .clk(clk), .addr({ir, ctr}), .q(cw_bits),
    .prog_we(prog_cs_we), .prog_addr(prog_cs_addr), .prog_data(prog_cs_data)
  );
  assign cw = ctrl_t'(cw_bits);

  instruction_register u_ir (
    .clk(clk), .rst(rst), .load(cw.ir_in), .inc(cw.ir_inc), .d(data_bus), .q(ir)
  );

  instruction_counter u_ctr (
    .clk(clk), .rst(rst), .rst_ctr(cw.rst_ctr), .hold(cw.halt), .q(ctr)
  );

  // ---------------- datapath ----------------
  program_counter u_pc (
    .clk(clk), .rst(rst), .load(cw.pc_ld), .inc(cw.pc_inc), .d(data_bus), .q(pc)
  );

  reg574 #(.W(8)) u_a (.clk(clk), .rst(rst), .load(cw.a_in), .d(data_bus), .q(a_reg));
  reg574 #(.W(8)) u_b (.clk(clk), .rst(rst), .load(cw.b_in), .d(data_bus), .q(b_reg));

  alu8 u_alu (.a(a_reg), .b(b_reg), .fn(cw.alu_fn), .f(alu_f),
              .carry(alu_carry), .aeqb(alu_aeqb));

  alu_out_buffer u_alubuf (.clk(clk), .rst(rst), .latch(cw.alu_latch), .alu_f(alu_f), .q(alu_q));

  flag_logic u_flags (.clk(clk), .rst(rst), .load(cw.flag_in), .alu_f(alu_f),
                      .alu_carry(alu_carry), .alu_aeqb(alu_aeqb),
                      .carry(f_carry), .aeqb(f_aeqb), .zero(f_zero));

  gpr u_gpr (.clk(clk), .we(cw.gpr_in), .addr(cw.gpr_addr), .d(data_bus), .q(gpr_q));

  program_memory #(.AW(8)) u_mem (
    .clk(clk), .addr(addr_bus), .rd_data(mem_q),
    .wr(cw.mem_wr), .wr_data(data_bus),
    .prog_we(prog_mem_we), .prog_addr(prog_mem_addr), .prog_data(prog_mem_data),
    .dbg_addr(dbg_mem_addr), .dbg_data(dbg_mem_data)
  );

  // ---------------- buses ----------------
  logic [7:0] dsrc [4];
  logic [7:0] asrc [3];
  assign dsrc[0] = mem_q;
  assign dsrc[1] = pc;
  assign dsrc[2] = alu_q;
  assign dsrc[3] = gpr_q;
  assign asrc[0] = pc;
  assign asrc[1] = alu_q;
  assign asrc[2] = gpr_q;

  bus8 #(.N(4)) u_dbus (.clk(clk), .en({cw.gpr_out_d, cw.alu_out_d, cw.pc_out_d, cw.mem_rd}),
                        .src(dsrc), .bus(data_bus));
  bus8 #(.N(3)) u_abus (.clk(clk), .en({cw.gpr_out_a, cw.alu_out_a, cw.pc_out_a}),
                        .src(asrc), .bus(addr_bus));

  assign flags  = {f_carry, f_aeqb, f_zero};
  assign halted = cw.halt;
endmodule
