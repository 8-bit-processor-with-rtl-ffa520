// tb_bus8: with one or no source enabled, the bus must carry that source's
// value (0 when idle), for random source values.
module tb_bus8;
  logic clk = 0;
  logic [3:0] en;
  logic [7:0] src [4];
  logic [7:0] bus;
  int checks = 0, failures = 0;

  bus8 #(.N(4)) dut (.clk(clk), .en(en), .src(src), .bus(bus));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) src[k] = 8'($urandom);
      sel = $urandom % 5;
      en = (sel == 4) ? 4'b0000 : 4'(1 << sel);
      #1;
      checks++;
      if (bus !== ((sel == 4) ? 8'h00 : src[sel])) begin
        failures++;
        if (failures < 10) $display("FAIL en=%b bus=%h", en, bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
