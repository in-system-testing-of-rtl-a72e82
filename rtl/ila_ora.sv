// ila_ora: output response analyzer of an iterative logic array.
//
// Compares the ILA output with the vector the TPG applied. The expected value
// is the TPG vector, bitwise complemented when `invert` is set (complement
// function through an odd number of BUTs); `mask` selects the bits that are
// compared. `mismatch` is the combinational result for the current sample and
// is used to stop the TPG in the same cycle; `fail` is the registered, sticky
// result that stays high until reset.
// The comparison with the TPG vector follows the source design; the sticky
// register, the mask and the complement input are this model's own.
module ila_ora #(
  parameter int unsigned WIDTH = 6
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sample,
  input  logic             invert,
  input  logic [WIDTH-1:0] mask,
  input  logic [WIDTH-1:0] tpg_vec,
  input  logic [WIDTH-1:0] ila_out,
  output logic             mismatch,
  output logic             fail
);
  logic [WIDTH-1:0] expected;

  assign expected = tpg_vec ^ {WIDTH{invert}};
  assign mismatch = sample && (((ila_out ^ expected) & mask) != '0);

  always_ff @(posedge clk) begin
    if (rst)           fail <= 1'b0;
    else if (mismatch) fail <= 1'b1;
  end
endmodule
