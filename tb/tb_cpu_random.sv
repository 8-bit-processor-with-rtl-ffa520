// tb_cpu_random: runs random programs on the processor (default sizes) and
// compares the end state with an instruction-level reference model.
//
// Each program first gives all 16 registers a value, then runs a random mix
// of loads, register moves, ALU operations, indirect loads and stores, stores
// of A into registers and forward jumps over a junk byte, and finally stores
// every register to memory and halts. The model executes the same
// instructions on its own copy of the state; A, B, the flags (carry only
// where the ALU was in arithmetic mode), all 256 memory bytes and the total
// cycle count (from the per-instruction cycle table) must match.
module tb_cpu_random;
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
  int checks = 0, failures = 0;

  cpu_top dut (.*);
  always #5 clk = ~clk;

  localparam int PROGRAMS = 25;

  initial begin
    repeat (PROGRAMS * 1500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model state ----------------
  logic [7:0] m_mem [256];
  logic [7:0] m_r [16];
  logic [7:0] m_a, m_b;
  logic       m_c, m_e, m_z, m_c_valid;
  int         m_cycles;

  logic [7:0] code [256];
  int         len;

  task automatic emit(input logic [7:0] b);
    code[len] = b; len++;
  endtask

  // ALU operation as the model sees it: 9-bit arithmetic for the arithmetic
  // ones, plain bit operations otherwise
  task automatic model_alu(input int k);
    logic [8:0] r9;
    logic       arith;
    arith = 1;
    case (k)
      0: r9 = {1'b0, m_a} + {1'b0, m_b};
      1: r9 = {1'b0, m_a} + {1'b0, ~m_b} + 9'd1;
      2: begin r9 = {1'b0, m_a & m_b}; arith = 0; end
      3: begin r9 = {1'b0, m_a | m_b}; arith = 0; end
      4: begin r9 = {1'b0, m_a ^ m_b}; arith = 0; end
      5: begin r9 = {1'b0, ~m_a};      arith = 0; end
      6: r9 = {1'b0, m_a} + 9'd1;
      7: r9 = {1'b0, m_a} + 9'h0FF;
      8: r9 = {m_a, 1'b0};
      default: r9 = {1'b0, m_a} + {1'b0, ~m_b};   // compare: A minus B minus 1
    endcase
    m_c = r9[8]; m_c_valid = arith;
    m_e = (r9[7:0] == 8'hFF);
    m_z = (r9[7:0] == 8'h00);
    if (k != 9) m_a = r9[7:0];
  endtask

  task automatic gen_program();
    int kind, n, k;
    logic [7:0] v;
    len = 0;
    for (int i = 0; i < 256; i++) begin
      code[i] = 8'($urandom);            // random data everywhere
    end
    m_cycles = 0;
    for (int i = 0; i < 16; i++) begin
      v = 8'($urandom);
      emit(OP_LDR | 8'(i)); emit(v); m_cycles += 5;
    end
    // body; the state effects are computed later by replay()
    while (len < 110) begin
      kind = $urandom % 10;
      n = $urandom % 16;
      case (kind)
        0: begin v = 8'($urandom); emit(OP_LDA); emit(v); m_cycles += 5; end
        1: begin v = 8'($urandom); emit(OP_LDB); emit(v); m_cycles += 5; end
        2: begin emit(OP_MOVA | 8'(n)); m_cycles += 4; end
        3: begin emit(OP_MOVB | 8'(n)); m_cycles += 4; end
        4, 5: begin
          k = $urandom % 10;
          emit(OP_ADD | 8'(k)); m_cycles += (k == 9) ? 4 : 5;
        end
        6: begin emit(OP_STA | 8'(n)); m_cycles += 5; end
        7: begin emit(OP_LDAI | 8'(n)); m_cycles += 4; end
        8: begin // store through A into the data area
          v = 8'hC0 + 8'($urandom % 48);
          emit(OP_LDA); emit(v); emit(OP_STI | 8'(n)); m_cycles += 5 + 5;
        end
        default: begin // forward jump over one junk byte
          emit(OP_JMP); emit(8'(len + 2)); len++; m_cycles += 4;
        end
      endcase
    end
    for (int i = 0; i < 16; i++) begin
      emit(OP_LDA); emit(8'hF0 + 8'(i)); emit(OP_STI | 8'(i)); m_cycles += 10;
    end
    emit(OP_HLT); m_cycles += 2;  // cycles until the HALT step is reached
  endtask

  // Replays the generated program instruction by instruction on the model,
  // so that indirect loads see the memory as it is at that point.
  task automatic replay();
    int p, k, n;
    logic [7:0] op;
    for (int i = 0; i < 256; i++) m_mem[i] = code[i];
    m_a = 0; m_b = 0; m_c = 0; m_e = 0; m_z = 0; m_c_valid = 1;
    p = 0;
    forever begin
      op = m_mem[p]; n = int'(op[3:0]);
      p++;
      if (op == OP_HLT) break;
      case (op[7:4])
        4'h0: begin
          if (op == OP_LDA) m_a = m_mem[p];
          else if (op == OP_LDB) m_b = m_mem[p];
          if (op == OP_JMP) p = int'(m_mem[p]); else p++;
        end
        4'h1: begin m_r[n] = m_mem[p]; p++; end
        4'h2: m_a = m_r[n];
        4'h3: m_b = m_r[n];
        4'h4: m_a = m_mem[m_r[n]];
        4'h5: m_mem[m_a] = m_r[n];
        4'hC: begin k = n; model_alu(k); end
        4'hD: m_r[n] = m_a;
        default: ;
      endcase
    end
  endtask

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    int run_cycles;
    for (int t = 0; t < PROGRAMS; t++) begin
      rst = 1;
      gen_program();
      replay();
      for (int i = 0; i < 256; i++) begin
        @(negedge clk); prog_mem_we = 1; prog_mem_addr = 8'(i); prog_mem_data = code[i];
      end
      @(negedge clk); prog_mem_we = 0;
      rst = 0;
      run_cycles = 0;
      while (!halted) begin
        @(posedge clk); run_cycles++;
        #1;
      end
      checks++;
      if (run_cycles != m_cycles) begin
        failures++;
        $display("FAIL program %0d took %0d cycles, expected %0d", t, run_cycles, m_cycles);
      end
      check("A", a_reg, m_a);
      check("B", b_reg, m_b);
      check("A=B flag", {7'b0, flags[1]}, {7'b0, m_e});
      check("zero flag", {7'b0, flags[0]}, {7'b0, m_z});
      if (m_c_valid) check("carry flag", {7'b0, flags[2]}, {7'b0, m_c});
      for (int i = 0; i < 256; i++) begin
        dbg_mem_addr = 8'(i); #1;
        check($sformatf("mem[%02h]", i), dbg_mem_data, m_mem[i]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
