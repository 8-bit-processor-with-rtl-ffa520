// cpu_pkg: types and constants shared by the 8-bit microprogrammed processor.
//
// The processor is driven by a 40-bit control word read from five byte-wide
// control-store EEPROMs at address {IR, CTR}: 256 instruction blocks of 16
// micro-steps each. The 40-bit width, the 12-bit address and the shape of the
// fetch steps (step 0: PC out, MMRY RD, IR in; step 1: INC PC) follow the
// source design. The bit layout of the control word and the default
// instruction set coded in default_microcode() are this design's own: the
// source leaves both to the user, which is the point of the architecture.
package cpu_pkg;

  localparam int unsigned DATA_W  = 8;
  localparam int unsigned STEP_W  = 4;                // instruction counter
  localparam int unsigned CS_AW   = DATA_W + STEP_W;  // 12 control-store address lines
  localparam int unsigned CTRL_W  = 40;               // five bytes of control

  // ALU function select, as wired to the FN header: {CN, M, S3, S2, S1, S0}.
  // CN is the 74181's active-low carry in, M = 1 selects logic functions.
  typedef struct packed {
    logic       cn;
    logic       m;
    logic [3:0] s;
  } alu_fn_t;

  // 40-bit control word. One bit per buffer enable / register load, plus the
  // ALU function and the general purpose register number.
  typedef struct packed {
    logic [10:0] spare;      // 39:29 free for user extensions
    logic [3:0]  gpr_addr;   // 28:25 register number for GPR access
    alu_fn_t     alu_fn;     // 24:19
    logic        halt;       // 18 stop the instruction counter
    logic        flag_in;    // 17 load the flag register
    logic        rst_ctr;    // 16 end of instruction: counter back to step 0
    logic        ir_inc;     // 15 increment the instruction register
    logic        gpr_out_a;  // 14 GPR -> address bus
    logic        gpr_out_d;  // 13 GPR -> data bus
    logic        gpr_in;     // 12 data bus -> GPR
    logic        alu_out_a;  // 11 ALU buffer -> address bus
    logic        alu_out_d;  // 10 ALU buffer -> data bus
    logic        alu_latch;  // 9  ALU result -> ALU output buffer
    logic        b_in;       // 8  data bus -> B
    logic        a_in;       // 7  data bus -> A
    logic        ir_in;      // 6  data bus -> IR
    logic        mem_wr;     // 5  data bus -> memory[address bus]
    logic        mem_rd;     // 4  memory[address bus] -> data bus
    logic        pc_ld;      // 3  data bus -> PC
    logic        pc_inc;     // 2  PC + 1
    logic        pc_out_d;   // 1  PC -> data bus
    logic        pc_out_a;   // 0  PC -> address bus
  } ctrl_t;

  // ALU functions used by the default microcode (74181, active-high data).
  localparam alu_fn_t FN_PASS_A = '{cn: 1'b1, m: 1'b1, s: 4'b1111}; // F = A
  localparam alu_fn_t FN_ADD    = '{cn: 1'b1, m: 1'b0, s: 4'b1001}; // A plus B
  localparam alu_fn_t FN_SUB    = '{cn: 1'b0, m: 1'b0, s: 4'b0110}; // A minus B
  localparam alu_fn_t FN_CMP    = '{cn: 1'b1, m: 1'b0, s: 4'b0110}; // A minus B minus 1
  localparam alu_fn_t FN_AND    = '{cn: 1'b1, m: 1'b1, s: 4'b1011};
  localparam alu_fn_t FN_OR     = '{cn: 1'b1, m: 1'b1, s: 4'b1110};
  localparam alu_fn_t FN_XOR    = '{cn: 1'b1, m: 1'b1, s: 4'b0110};
  localparam alu_fn_t FN_NOT    = '{cn: 1'b1, m: 1'b1, s: 4'b0000}; // not A
  localparam alu_fn_t FN_INC    = '{cn: 1'b0, m: 1'b0, s: 4'b0000}; // A plus 1
  localparam alu_fn_t FN_DEC    = '{cn: 1'b1, m: 1'b0, s: 4'b1111}; // A minus 1
  localparam alu_fn_t FN_SHL    = '{cn: 1'b1, m: 1'b0, s: 4'b1100}; // A plus A

  // Default instruction set. Opcodes 0x1n..0x7n and 0xDn carry a register
  // number n in their low nibble; the microcode, not the hardware, decodes it.
  localparam logic [7:0] OP_NOP  = 8'h00; // -
  localparam logic [7:0] OP_LDA  = 8'h01; // A <- #imm
  localparam logic [7:0] OP_LDB  = 8'h02; // B <- #imm
  localparam logic [7:0] OP_JMP  = 8'h03; // PC <- #imm
  localparam logic [7:0] OP_LDR  = 8'h10; // Rn <- #imm
  localparam logic [7:0] OP_MOVA = 8'h20; // A <- Rn
  localparam logic [7:0] OP_MOVB = 8'h30; // B <- Rn
  localparam logic [7:0] OP_LDAI = 8'h40; // A <- mem[Rn]
  localparam logic [7:0] OP_STI  = 8'h50; // mem[A] <- Rn (address via ALU buffer)
  localparam logic [7:0] OP_JR   = 8'h60; // PC <- Rn   (0x6F is "return")
  localparam logic [7:0] OP_CALL = 8'h70; // R15 <- PC, PC <- Rn
  localparam logic [7:0] OP_ADD  = 8'hC0; // A <- A + B, flags
  localparam logic [7:0] OP_SUB  = 8'hC1; // A <- A - B, flags
  localparam logic [7:0] OP_AND  = 8'hC2;
  localparam logic [7:0] OP_OR   = 8'hC3;
  localparam logic [7:0] OP_XOR  = 8'hC4;
  localparam logic [7:0] OP_NOT  = 8'hC5;
  localparam logic [7:0] OP_INC  = 8'hC6;
  localparam logic [7:0] OP_DEC  = 8'hC7;
  localparam logic [7:0] OP_SHL  = 8'hC8;
  localparam logic [7:0] OP_CMP  = 8'hC9; // flags only: A=B set when A == B
  localparam logic [7:0] OP_STA  = 8'hD0; // Rn <- A
  localparam logic [7:0] OP_HLT  = 8'hFF;

  // Control word for one micro-step of one opcode in the default microcode.
  // Every block starts with the two fetch steps; the last step of every
  // instruction is a lone RST CTR, as in the load-A example of the source.
  function automatic ctrl_t default_microcode(input logic [7:0] op,
                                              input logic [3:0] step);
    ctrl_t       w [16];
    int unsigned n;
    logic [3:0]  r;
    for (int i = 0; i < 16; i++) w[i] = '0;
    r = op[3:0];
    // step 0: PC out, MMRY RD, IR in
    w[0].pc_out_a = 1'b1; w[0].mem_rd = 1'b1; w[0].ir_in = 1'b1;
    // step 1: INC PC
    w[1].pc_inc = 1'b1;
    n = 2;
    unique casez (op)
      OP_LDA, OP_LDB: begin
        w[2].pc_out_a = 1'b1; w[2].mem_rd = 1'b1;
        w[2].a_in = (op == OP_LDA); w[2].b_in = (op == OP_LDB);
        w[3].pc_inc = 1'b1;
        n = 4;
      end
      OP_JMP: begin
        w[2].pc_out_a = 1'b1; w[2].mem_rd = 1'b1; w[2].pc_ld = 1'b1;
        n = 3;
      end
      8'h1?: begin // LDR
        w[2].pc_out_a = 1'b1; w[2].mem_rd = 1'b1; w[2].gpr_in = 1'b1; w[2].gpr_addr = r;
        w[3].pc_inc = 1'b1;
        n = 4;
      end
      8'h2?, 8'h3?: begin // MOVA / MOVB
        w[2].gpr_out_d = 1'b1; w[2].gpr_addr = r;
        w[2].a_in = (op[7:4] == 4'h2); w[2].b_in = (op[7:4] == 4'h3);
        n = 3;
      end
      8'h4?: begin // LDAI: GPR straight onto the address bus
        w[2].gpr_out_a = 1'b1; w[2].gpr_addr = r; w[2].mem_rd = 1'b1; w[2].a_in = 1'b1;
        n = 3;
      end
      8'h5?: begin // STI: address from A through the ALU buffer, data from Rn
        w[2].alu_fn = FN_PASS_A; w[2].alu_latch = 1'b1;
        w[3].alu_out_a = 1'b1; w[3].gpr_out_d = 1'b1; w[3].gpr_addr = r; w[3].mem_wr = 1'b1;
        n = 4;
      end
      8'h6?: begin // JR
        w[2].gpr_out_d = 1'b1; w[2].gpr_addr = r; w[2].pc_ld = 1'b1;
        n = 3;
      end
      8'h7?: begin // CALL: link in R15
        w[2].pc_out_d = 1'b1; w[2].gpr_in = 1'b1; w[2].gpr_addr = 4'hF;
        w[3].gpr_out_d = 1'b1; w[3].gpr_addr = r; w[3].pc_ld = 1'b1;
        n = 4;
      end
      8'hC?: begin // ALU operations on A and B
        alu_fn_t f;
        unique case (op[3:0])
          4'h0: f = FN_ADD;
          4'h1: f = FN_SUB;
          4'h2: f = FN_AND;
          4'h3: f = FN_OR;
          4'h4: f = FN_XOR;
          4'h5: f = FN_NOT;
          4'h6: f = FN_INC;
          4'h7: f = FN_DEC;
          4'h8: f = FN_SHL;
          4'h9: f = FN_CMP;
          default: f = FN_PASS_A;
        endcase
        w[2].alu_fn = f; w[2].alu_latch = 1'b1; w[2].flag_in = 1'b1;
        if (op[3:0] != 4'h9) begin
          w[3].alu_out_d = 1'b1; w[3].a_in = 1'b1;
          n = 4;
        end else begin
          n = 3;
        end
      end
      8'hD?: begin // STA: A through the ALU onto the data bus
        w[2].alu_fn = FN_PASS_A; w[2].alu_latch = 1'b1;
        w[3].alu_out_d = 1'b1; w[3].gpr_in = 1'b1; w[3].gpr_addr = r;
        n = 4;
      end
      OP_HLT: begin
        w[2].halt = 1'b1;
        n = 3; // never leaves step 2
      end
      default: n = 2; // NOP and unused blocks
    endcase
    if (op != OP_HLT) w[n].rst_ctr = 1'b1;
    return w[step];
  endfunction

endpackage
