// tb_ram189: writes random words into the 16 x 4 slice and checks that a read
// returns the complement of the stored word, that the outputs are off while
// deselected or writing, and that deselected writes do nothing.
module tb_ram189;
  logic clk = 0, cs_n, we_n, oe;
  logic [3:0] addr, d, q;
  logic [3:0] model [16];
  int checks = 0, failures = 0;

  ram189 dut (.clk(clk), .cs_n(cs_n), .we_n(we_n), .addr(addr), .d(d), .q(q), .oe(oe));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs_n = 1; we_n = 1; addr = 0; d = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); cs_n = 0; we_n = 0; addr = 4'(i); d = 4'($urandom); model[i] = d;
      #1; checks++; if (oe !== 1'b0) failures++;
      @(posedge clk);
    end
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      cs_n = $urandom % 5 == 0; we_n = $urandom % 3 != 0; addr = 4'($urandom); d = 4'($urandom);
      #1;
      checks++;
      if (oe !== (!cs_n && we_n)) failures++;
      if (!cs_n && we_n) begin
        checks++;
        if (q !== ~model[addr]) begin
          failures++;
          if (failures < 10) $display("FAIL addr=%h q=%h exp=%h", addr, q, ~model[addr]);
        end
      end
      @(posedge clk);
      if (!cs_n && !we_n) model[addr] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
