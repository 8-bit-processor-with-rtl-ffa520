// tb_flag_logic: the flags must take carry, A=B and (result == 0) on a clock
// edge with load high and keep them otherwise.
module tb_flag_logic;
  logic clk = 0, rst = 1, load, c_in, e_in, carry, aeqb, zero;
  logic [7:0] f;
  logic [2:0] ref_f;
  int checks = 0, failures = 0;

  flag_logic dut (.clk(clk), .rst(rst), .load(load), .alu_f(f), .alu_carry(c_in), .alu_aeqb(e_in),
                  .carry(carry), .aeqb(aeqb), .zero(zero));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; c_in = 0; e_in = 0; f = 0; ref_f = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load = $urandom % 2 == 0; c_in = 1'($urandom); e_in = 1'($urandom);
      f = ($urandom % 4 == 0) ? 8'h00 : 8'($urandom);
      @(posedge clk);
      if (load) ref_f = {c_in, e_in, f == 8'h00};
      #1;
      checks++;
      if ({carry, aeqb, zero} !== ref_f) begin
        failures++;
        if (failures < 10) $display("FAIL flags=%b exp=%b", {carry, aeqb, zero}, ref_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
