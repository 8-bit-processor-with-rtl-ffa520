// tb_program_memory: fills the 256 bytes through the programmer port, then
// mixes processor writes and reads and checks both read ports against a
// model, including that a programmer write wins over a processor write.
module tb_program_memory;
  logic clk = 0, wr, prog_we;
  logic [7:0] addr, rd_data, wr_data, prog_addr, prog_data, dbg_addr, dbg_data;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  program_memory dut (.clk(clk), .addr(addr), .rd_data(rd_data), .wr(wr), .wr_data(wr_data),
                      .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
                      .dbg_addr(dbg_addr), .dbg_data(dbg_data));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; prog_we = 0; addr = 0; wr_data = 0; prog_addr = 0; prog_data = 0; dbg_addr = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_data = 8'($urandom); model[i] = prog_data;
      @(posedge clk);
    end
    @(negedge clk); prog_we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      addr = 8'($urandom); dbg_addr = 8'($urandom); wr_data = 8'($urandom);
      wr = $urandom % 3 == 0; prog_we = $urandom % 10 == 0;
      prog_addr = (i % 2 == 0) ? addr : 8'($urandom); prog_data = 8'($urandom);
      #1;
      checks++;
      if (rd_data !== model[addr] || dbg_data !== model[dbg_addr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h rd=%h exp=%h", addr, rd_data, model[addr]);
      end
      @(posedge clk);
      if (prog_we) model[prog_addr] = prog_data;
      else if (wr) model[addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
