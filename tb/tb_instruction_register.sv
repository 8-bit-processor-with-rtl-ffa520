// tb_instruction_register: drives the 8-bit register/counter with random load and increment
// requests, long increment runs across the nibble boundary (0x0F -> 0x10)
// and the 0xFF -> 0x00 wrap, and compares it each cycle with a reference.
module tb_instruction_register;
  logic clk = 0, rst = 1, load, inc;
  logic [7:0] d, q, ref_q;
  int checks = 0, failures = 0, nibble_carries = 0;

  instruction_register dut (.clk(clk), .rst(rst), .load(load), .inc(inc), .d(d), .q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic ld, input logic in, input logic [7:0] dv);
    @(negedge clk);
    load = ld; inc = in; d = dv;
    @(posedge clk);
    if (ld) ref_q = dv;
    else if (in) begin
      if (ref_q[3:0] == 4'hF) nibble_carries++;
      ref_q = ref_q + 8'd1;
    end
    #1;
    checks++;
    if (q !== ref_q) begin
      failures++;
      if (failures < 10) $display("FAIL q=%h exp=%h", q, ref_q);
    end
  endtask

  initial begin
    load = 0; inc = 0; d = 0; ref_q = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++; if (q !== 8'h00) failures++;
    for (int i = 0; i < 300; i++) step(1'b0, 1'b1, 8'h00);   // count through 0xFF -> 0x00
    step(1'b1, 1'b0, 8'hFE);
    repeat (3) step(1'b0, 1'b1, 8'h00);
    for (int i = 0; i < 2000; i++)
      step($urandom % 8 == 0, $urandom % 2 == 0, 8'($urandom));
    // asynchronous reset in mid-run
    step(1'b1, 1'b0, 8'h5A);
    #2 rst = 1; #1;
    checks++; if (q !== 8'h00) failures++;
    #1 rst = 0; ref_q = 0;
    checks++; if (nibble_carries < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
