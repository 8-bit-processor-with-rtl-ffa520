// tb_cpu_top: runs a whole program on the processor at its default sizes.
//
// The testbench holds the processor in reset, loads a program through the
// programmer port, and also programs one new instruction into the control
// store (opcode 0x80, which continues in block 0x81 by incrementing the
// instruction register), showing that the instruction set can be extended.
// The program adds, subtracts, compares, calls a subroutine through a
// register and returns through the link register R15, jumps, reads memory
// through a register address and stores through the ALU address path, then
// halts. Results are checked in memory and in the registers against values
// worked out by hand, the load-A instruction is checked to take exactly the
// five cycles of its microprogram, and every control mechanism is counted
// and must have happened at least once.
module tb_cpu_top;
  import cpu_pkg::*;

  logic        clk = 0, rst = 1;
  logic        prog_mem_we = 0, prog_cs_we = 0;
  logic [7:0]  prog_mem_addr = 0, prog_mem_data = 0, dbg_mem_addr = 0, dbg_mem_data;
  logic [11:0] prog_cs_addr = 0;
  logic [39:0] prog_cs_data = 0;
  logic [7:0]  pc, ir, a_reg, b_reg, data_bus, addr_bus;
  logic [3:0]  ctr;
  logic [2:0]  flags;
  logic        halted;
  int checks = 0, failures = 0, cycles = 0;

  cpu_top dut (.*);
  always #5 clk = ~clk;

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- program ----------------
  logic [7:0] prog [256];
  initial begin
    for (int i = 0; i < 256; i++) prog[i] = OP_HLT;
    // main
    prog[8'h00] = OP_LDA;       prog[8'h01] = 8'h25;
    prog[8'h02] = OP_LDB;       prog[8'h03] = 8'h17;
    prog[8'h04] = OP_ADD;                              // A = 3C
    prog[8'h05] = OP_STA | 1;                          // R1 = 3C
    prog[8'h06] = OP_LDR | 2;   prog[8'h07] = 8'h80;   // R2 = 80
    prog[8'h08] = OP_LDA;       prog[8'h09] = 8'h80;
    prog[8'h0A] = OP_STI | 1;                          // mem[80] = 3C
    prog[8'h0B] = OP_LDAI | 2;                         // A = mem[80]
    prog[8'h0C] = OP_LDB;       prog[8'h0D] = 8'h3C;
    prog[8'h0E] = OP_CMP;                              // A=B flag
    prog[8'h0F] = OP_LDR | 3;   prog[8'h10] = 8'h30;
    prog[8'h11] = OP_CALL | 3;                         // R15 = 12, PC = 30
    prog[8'h12] = OP_MOVA | 4;                         // A = R4 = 10
    prog[8'h13] = OP_LDB;       prog[8'h14] = 8'h01;
    prog[8'h15] = OP_SUB;                              // A = 0F
    prog[8'h16] = OP_STA | 5;                          // R5 = 0F
    prog[8'h17] = OP_MOVB | 5;                         // B = 0F
    prog[8'h18] = OP_NOP;
    prog[8'h19] = OP_LDA;       prog[8'h1A] = 8'h82;
    prog[8'h1B] = OP_STI | 5;                          // mem[82] = 0F
    prog[8'h1C] = 8'h80;                               // custom: R7 = A ^ B = 8D
    prog[8'h1D] = OP_LDA;       prog[8'h1E] = 8'h84;
    prog[8'h1F] = OP_STI | 7;                          // mem[84] = 8D
    prog[8'h20] = OP_JMP;       prog[8'h21] = 8'h28;
    prog[8'h28] = OP_HLT;
    // subroutine
    prog[8'h30] = OP_LDA;       prog[8'h31] = 8'hF0;
    prog[8'h32] = OP_LDB;       prog[8'h33] = 8'h20;
    prog[8'h34] = OP_ADD;                              // A = 10, carry
    prog[8'h35] = OP_STA | 4;                          // R4 = 10
    prog[8'h36] = OP_JR | 4'hF;                        // return
    prog[8'h80] = 8'h00; prog[8'h82] = 8'h00; prog[8'h84] = 8'h00;
  end

  // custom instruction 0x80: steps 0-1 as always, step 2 increments IR so
  // that steps 3.. come from block 0x81
  function automatic logic [39:0] custom_word(input int step);
    ctrl_t w = '0;
    case (step)
      2: w.ir_inc = 1'b1;
      3: begin w.alu_fn = FN_XOR; w.alu_latch = 1'b1; end
      4: begin w.alu_out_d = 1'b1; w.gpr_in = 1'b1; w.gpr_addr = 4'd7; end
      5: w.rst_ctr = 1'b1;
      default: w = '0;
    endcase
    return 40'(w);
  endfunction

  // ---------------- mechanism counters ----------------
  int n_fetch = 0, n_pcinc = 0, n_rstctr = 0, n_pcld = 0, n_pcoutd = 0, n_gproutd = 0,
      n_gprouta = 0, n_aluoutd = 0, n_alouta = 0, n_memwr = 0, n_flag = 0, n_irinc = 0,
      n_halt = 0, n_aeqb = 0, n_carry = 0, n_lda = 0;
  int lda_start = -1;
  always @(posedge clk) if (!rst) begin
    cycles++;
    if (dut.cw.ir_in)     n_fetch++;
    if (dut.cw.pc_inc)    n_pcinc++;
    if (dut.cw.rst_ctr)   n_rstctr++;
    if (dut.cw.pc_ld)     n_pcld++;
    if (dut.cw.pc_out_d)  n_pcoutd++;
    if (dut.cw.gpr_out_d) n_gproutd++;
    if (dut.cw.gpr_out_a) n_gprouta++;
    if (dut.cw.alu_out_d) n_aluoutd++;
    if (dut.cw.alu_out_a) n_alouta++;
    if (dut.cw.mem_wr)    n_memwr++;
    if (dut.cw.flag_in)   n_flag++;
    if (dut.cw.ir_inc)    n_irinc++;
    if (halted)           n_halt++;
    if (flags[1])         n_aeqb++;
    if (flags[2])         n_carry++;
    // length of load-A: from its first step (after IR takes 0x01) to the next fetch
    if (ctr == 4'd0 && lda_start >= 0) begin
      n_lda++;
      checks++;
      if (cycles - lda_start != 5) begin
        failures++;
        $display("FAIL load-A took %0d cycles", cycles - lda_start);
      end
      lda_start = -1;
    end
    if (ctr == 4'd0 && data_bus == OP_LDA && dut.cw.ir_in) lda_start = cycles;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog: processor did not halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // load program memory and the custom microcode while in reset
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); prog_mem_we = 1; prog_mem_addr = 8'(i); prog_mem_data = prog[i];
    end
    for (int s = 2; s <= 5; s++) begin
      @(negedge clk); prog_mem_we = 0; prog_cs_we = 1;
      prog_cs_addr = {(s == 2) ? 8'h80 : 8'h81, 4'(s)}; prog_cs_data = custom_word(s);
    end
    @(negedge clk); prog_cs_we = 0;
    check("pc in reset", pc, 8'h00);
    check("ir in reset", ir, 8'h00);
    rst = 0;
    wait (halted);
    @(negedge clk);
    // the HALT at 0x28 was fetched, so PC points past it
    check("pc at halt", pc, 8'h29);
    check("ir at halt", ir, OP_HLT);
    check("A at halt", a_reg, 8'h84);
    check("B at halt", b_reg, 8'h0F);
    check("flags after SUB", {5'b0, flags}, 8'b100);  // carry (no borrow), not equal, not zero
    dbg_mem_addr = 8'h80; #1 check("mem[80]", dbg_mem_data, 8'h3C);
    dbg_mem_addr = 8'h82; #1 check("mem[82]", dbg_mem_data, 8'h0F);
    dbg_mem_addr = 8'h84; #1 check("mem[84]", dbg_mem_data, 8'h8D);
    dbg_mem_addr = 8'h00; #1 check("mem[00] untouched", dbg_mem_data, OP_LDA);
    // a halted processor stays put
    repeat (10) @(posedge clk);
    #1 check("pc stays", pc, 8'h29);
    check("ctr stays", {4'h0, ctr}, 8'h02);
    $display("mechanisms: fetch=%0d inc_pc=%0d rst_ctr=%0d pc_load=%0d pc_to_dbus=%0d gpr_to_dbus=%0d gpr_to_abus=%0d alu_to_dbus=%0d alu_to_abus=%0d mem_write=%0d flag_load=%0d ir_inc=%0d halt=%0d a_eq_b=%0d carry=%0d lda_timed=%0d cycles=%0d",
             n_fetch, n_pcinc, n_rstctr, n_pcld, n_pcoutd, n_gproutd, n_gprouta, n_aluoutd, n_alouta,
             n_memwr, n_flag, n_irinc, n_halt, n_aeqb, n_carry, n_lda, cycles);
    checks++; if (n_fetch   == 0) begin failures++; $display("FAIL no fetch"); end
    checks++; if (n_pcinc   == 0) begin failures++; $display("FAIL no INC PC"); end
    checks++; if (n_rstctr  == 0) begin failures++; $display("FAIL no RST CTR"); end
    checks++; if (n_pcld    == 0) begin failures++; $display("FAIL no PC load"); end
    checks++; if (n_pcoutd  == 0) begin failures++; $display("FAIL no PC to data bus"); end
    checks++; if (n_gproutd == 0) begin failures++; $display("FAIL no GPR to data bus"); end
    checks++; if (n_gprouta == 0) begin failures++; $display("FAIL no GPR to address bus"); end
    checks++; if (n_aluoutd == 0) begin failures++; $display("FAIL no ALU to data bus"); end
    checks++; if (n_alouta  == 0) begin failures++; $display("FAIL no ALU to address bus"); end
    checks++; if (n_memwr   == 0) begin failures++; $display("FAIL no memory write"); end
    checks++; if (n_flag    == 0) begin failures++; $display("FAIL no flag load"); end
    checks++; if (n_irinc   == 0) begin failures++; $display("FAIL no IR increment"); end
    checks++; if (n_halt    == 0) begin failures++; $display("FAIL no halt"); end
    checks++; if (n_aeqb    == 0) begin failures++; $display("FAIL A=B flag never set"); end
    checks++; if (n_carry   == 0) begin failures++; $display("FAIL carry flag never set"); end
    checks++; if (n_lda     == 0) begin failures++; $display("FAIL load-A never timed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
