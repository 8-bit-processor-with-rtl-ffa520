// tb_alu_out_buffer: checks both builds of the ALU output buffer. The default
// (flip-flop) one must show a value only after a clock edge with latch high
// and keep it otherwise; the pass-through one must follow its input at once.
module tb_alu_out_buffer;
  logic clk = 0, rst = 1, latch;
  logic [7:0] f, q_reg, q_pass, ref_q;
  int checks = 0, failures = 0;

  alu_out_buffer dut (.clk(clk), .rst(rst), .latch(latch), .alu_f(f), .q(q_reg));
  alu_out_buffer #(.REGISTERED(1'b0)) dut_pass (.clk(clk), .rst(rst), .latch(latch), .alu_f(f), .q(q_pass));
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    latch = 0; f = 0; ref_q = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      latch = $urandom % 2 == 0;
      f = 8'($urandom);
      #1;
      checks++;
      // before the edge the registered output still shows the old value
      if (q_reg !== ref_q || q_pass !== f) failures++;
      @(posedge clk);
      if (latch) ref_q = f;
      #1;
      checks++;
      if (q_reg !== ref_q) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h exp=%h", q_reg, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
