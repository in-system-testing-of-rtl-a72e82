// ila_tpg: test pattern generator of an iterative logic array.
//
// A WIDTH-bit binary counter that walks through all 2**WIDTH vectors. Each
// vector is held for HOLD clock cycles so that an array with registers in its
// path can settle; `sample` is high in the last cycle of each hold, when the
// output response analyzer may compare. `last` marks the sample of the final
// vector. The counter advances only while the clock enable `ce` is high: the
// BIST stops it when a fault is seen, which freezes the array in the failing
// state for read-back.
// The counter and its clock enable follow the source design (a counter in a
// DSP block, stopped through CE on a fault); HOLD is this model's own.
module ila_tpg #(
  parameter int unsigned WIDTH = 6,
  parameter int unsigned HOLD  = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  output logic [WIDTH-1:0] vec,
  output logic             sample,
  output logic             last
);
  localparam int unsigned HW = (HOLD > 1) ? $clog2(HOLD) : 1;

  logic [HW-1:0] hold_cnt;

  assign sample = (32'(hold_cnt) == HOLD - 1);
  assign last   = sample && (vec == '1);

  always_ff @(posedge clk) begin
    if (rst) begin
      vec      <= '0;
      hold_cnt <= '0;
    end else if (ce) begin
      if (sample) begin
        hold_cnt <= '0;
        vec      <= vec + 1'b1;
      end else begin
        hold_cnt <= hold_cnt + 1'b1;
      end
    end
  end
endmodule
