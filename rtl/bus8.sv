// bus8: one shared 8-bit bus (data bus or address bus) with N buffered
// sources, each switched on by its own enable.
//
// The source uses tri-state buffers; here the bus is the OR of the sources
// whose enable is high, which is the same whenever at most one buffer drives.
// An assertion flags cycles in which two enables are high. An undriven bus
// reads 0. Combinational.
module bus8 #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic [N-1:0] en,
  input  logic [7:0]   src [N],
  output logic [7:0]   bus
);
  always_comb begin
    bus = '0;
    for (int i = 0; i < N; i++)
      if (en[i]) bus |= src[i];
  end

  a_one_driver: assert property (@(posedge clk) $onehot0(en))
    else $error("bus8: more than one driver enabled (%b)", en);
endmodule
