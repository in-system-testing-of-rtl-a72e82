// lut_but: one block under test (BUT) of the LUT test configurations.
//
// Six LUTs share one 6-bit address bus (the output bus of the previous BUT).
// Every LUT holds the identity or the complement function of one address bit,
// so the BUT's 6-bit output bus equals its input, or its bitwise complement.
// The rotation input selects which physical LUT computes which output bit:
// with rotation r, LUT j drives output bit (j + r) mod 6. Stepping r through
// 0..5 for both functions gives the 12 LUT configurations.
// Each LUT's O6 is also registered in a flip-flop (through the FF-MUX), so the
// state of the BUT can be read back for fault isolation. The output bus is
// combinational; the flip-flops capture it every enabled clock.
// Fault injection: a fault descriptor whose unit equals INDEX forces memory
// location idx of LUT sub to the stuck-at value, which is how a permanent
// fault of a LUT cell is emulated.
// The grouping of six LUTs, the identity/complement functions, the rotation
// and the registered O6 follow the source design; reset of the flip-flops
// and the fault port are this model's own.
module lut_but
  import bist_pkg::*;
#(
  parameter int unsigned INDEX = 0  // position of the BUT in its ILA
) (
  input  logic       clk,
  input  logic       rst,
  input  lut_fn_e    fn,
  input  logic [2:0] rot,     // 0..5
  input  fault_t     fault,
  input  logic [5:0] a,       // shared address bus from the previous BUT
  output logic [5:0] y,       // output bus, bit k from the LUT computing bit k
  output logic [5:0] ff_q     // registered O6 of each physical LUT
);
  logic [5:0][63:0] init;
  logic [5:0]       o6;
  logic [5:0]       o5_unused;

  always_comb begin
    for (int unsigned j = 0; j < 6; j++) begin
      init[j] = ila_lut_init(lut_bit_of(j, 32'(rot)), fn);
      if (fault.en && fault.unit == 16'(INDEX) && fault.sub == 3'(j))
        init[j][fault.idx] = fault.value;
    end
  end

  for (genvar j = 0; j < 6; j++) begin : g_lut
    lut6 u_lut (.init(init[j]), .a(a), .o6(o6[j]), .o5(o5_unused[j]));
  end

  // Route each LUT to the output bit it computes.
  always_comb begin
    for (int unsigned k = 0; k < 6; k++) y[k] = o6[lut_of_bit(k, 32'(rot))];
  end

  always_ff @(posedge clk) begin
    if (rst) ff_q <= '0;
    else     ff_q <= o6;
  end
endmodule
