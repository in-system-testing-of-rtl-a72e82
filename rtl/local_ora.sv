// local_ora: local output response analyzer of the RAM test.
//
// Compares the outputs of two neighbouring RAMs that receive the same
// stimulus. In every cycle where `en` is high, a difference in any bit sets
// the flip-flop `fail`, which then stays at 1 until reset, so that the
// failing pair can be found later by reading back the flip-flop.
// Follows the source design (mismatch registered as 1 in the local ORA's
// flip-flop); the enable is this model's own.
module local_ora #(
  parameter int unsigned WIDTH = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             fail
);
  always_ff @(posedge clk) begin
    if (rst)                fail <= 1'b0;
    else if (en && a != b)  fail <= 1'b1;
  end
endmodule
