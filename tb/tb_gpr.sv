// tb_gpr: writes all 16 registers, then mixes random writes and reads and
// checks that every read returns the true (not complemented) value written.
module tb_gpr;
  logic clk = 0, we;
  logic [3:0] addr;
  logic [7:0] d, q;
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  gpr dut (.clk(clk), .we(we), .addr(addr), .d(d), .q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; d = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); we = 1; addr = 4'(i); d = 8'($urandom); model[i] = d;
      @(posedge clk);
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom % 3 == 0; addr = 4'($urandom); d = 8'($urandom);
      #1;
      if (!we) begin
        checks++;
        if (q !== model[addr]) begin
          failures++;
          if (failures < 10) $display("FAIL r%0d q=%h exp=%h", addr, q, model[addr]);
        end
      end
      @(posedge clk);
      if (we) model[addr] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
