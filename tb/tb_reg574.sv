// tb_reg574: loads random values into the 8-bit register with random load
// enables and checks that it holds its value whenever load is low.
module tb_reg574;
  logic clk = 0, rst = 1, load;
  logic [7:0] d, q, ref_q;
  int checks = 0, failures = 0;

  reg574 #(.W(8)) dut (.clk(clk), .rst(rst), .load(load), .d(d), .q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; d = 0; ref_q = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++; if (q !== 8'h00) failures++;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = $urandom % 3 == 0;
      d = 8'($urandom);
      @(posedge clk);
      if (load) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h exp=%h", q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
