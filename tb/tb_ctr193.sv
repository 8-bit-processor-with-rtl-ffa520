// tb_ctr193: drives the 4-bit up/down counter with random clear, load, up and
// down requests and compares it every cycle with a reference count kept in
// the testbench, including the co (at 15) and bo (at 0) outputs.
module tb_ctr193;
  logic clk = 0, rst = 1, clr, load, up, down, co, bo;
  logic [3:0] d, q, ref_q;
  int checks = 0, failures = 0;

  ctr193 dut (.clk(clk), .rst(rst), .clr(clr), .load(load), .d(d), .up(up), .down(down), .q(q), .co(co), .bo(bo));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {clr, load, up, down, d} = '0;
    ref_q = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++; if (q !== 4'h0) failures++;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      clr  = ($urandom % 20) == 0;
      load = ($urandom % 10) == 0;
      up   = ($urandom % 2) == 0;
      down = ($urandom % 3) == 0;
      d    = 4'($urandom);
      @(posedge clk);
      if (clr) ref_q = 0;
      else if (load) ref_q = d;
      else if (up) ref_q = ref_q + 1;
      else if (down) ref_q = ref_q - 1;
      #1;
      checks++;
      if (q !== ref_q || co !== (ref_q == 15) || bo !== (ref_q == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h exp=%h co=%b bo=%b", q, ref_q, co, bo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
