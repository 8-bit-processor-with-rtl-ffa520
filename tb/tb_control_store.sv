// tb_control_store: checks the start-up microcode and the programming port.
// Every one of the 256 blocks must begin with the fetch word (PC out to the
// address bus, memory read, IR in) and the INC PC word; the load-A block
// (opcode 0x01) must be exactly: fetch, INC PC, PC out + MMRY RD + A in,
// INC PC, RST CTR. Expected words are built from raw bit numbers of the
// control-word layout. Then random words are programmed and read back.
module tb_control_store;
  logic clk = 0, prog_we;
  logic [11:0] addr, prog_addr;
  logic [39:0] q, prog_data;
  int checks = 0, failures = 0;

  // bit numbers of the control word
  localparam int PC_OUT_A = 0, PC_INC = 2, MEM_RD = 4, IR_IN = 6, A_IN = 7, RST_CTR = 16;
  localparam logic [39:0] W_FETCH = (40'd1 << PC_OUT_A) | (40'd1 << MEM_RD) | (40'd1 << IR_IN);
  localparam logic [39:0] W_INC   = (40'd1 << PC_INC);
  localparam logic [39:0] W_LDA   = (40'd1 << PC_OUT_A) | (40'd1 << MEM_RD) | (40'd1 << A_IN);
  localparam logic [39:0] W_RST   = (40'd1 << RST_CTR);

  control_store dut (.clk(clk), .addr(addr), .q(q), .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(input logic [11:0] a, input logic [39:0] w);
    addr = a; #1;
    checks++;
    if (q !== w) begin
      failures++;
      if (failures < 10) $display("FAIL addr=%h q=%h exp=%h", a, q, w);
    end
  endtask

  initial begin
    logic [39:0] model [logic [11:0]];
    prog_we = 0; prog_addr = 0; prog_data = 0; addr = 0;
    #2;
    for (int op = 0; op < 256; op++) begin
      expect_word({8'(op), 4'd0}, W_FETCH);
      expect_word({8'(op), 4'd1}, W_INC);
    end
    expect_word(12'h012, W_LDA);
    expect_word(12'h013, W_INC);
    expect_word(12'h014, W_RST);
    expect_word(12'h002, W_RST);  // NOP ends after the fetch steps
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 12'($urandom); prog_data = {8'($urandom), 32'($urandom)};
      model[prog_addr] = prog_data;
      @(posedge clk); #1 prog_we = 0;
    end
    foreach (model[a]) expect_word(a, model[a]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
