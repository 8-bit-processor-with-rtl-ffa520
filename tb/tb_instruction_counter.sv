// tb_instruction_counter: the micro-step counter must count 0..15 and wrap,
// go back to 0 one cycle after RST CTR and stand still under hold.
module tb_instruction_counter;
  logic clk = 0, rst = 1, rst_ctr, hold;
  logic [3:0] q, ref_q;
  int checks = 0, failures = 0;

  instruction_counter dut (.clk(clk), .rst(rst), .rst_ctr(rst_ctr), .hold(hold), .q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic r, input logic h);
    @(negedge clk);
    rst_ctr = r; hold = h;
    @(posedge clk);
    if (r) ref_q = 0;
    else if (!h) ref_q = ref_q + 1;
    #1;
    checks++;
    if (q !== ref_q) begin
      failures++;
      if (failures < 10) $display("FAIL q=%h exp=%h", q, ref_q);
    end
  endtask

  initial begin
    rst_ctr = 0; hold = 0; ref_q = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++; if (q !== 4'h0) failures++;
    repeat (20) step(1'b0, 1'b0);        // full wrap
    step(1'b1, 1'b0);                    // RST CTR
    repeat (5) step(1'b0, 1'b1);         // held
    for (int i = 0; i < 1500; i++) step($urandom % 6 == 0, $urandom % 5 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
