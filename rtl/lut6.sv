// lut6: model of a 6-input look-up table of a 7-series SLICE.
//
// The 64-bit INIT vector is the LUT's configuration memory. O6 reads location
// A[5:0]; O5 reads the lower half of the memory at A[4:0], so that with A6
// tied high the LUT gives two functions of five inputs (INIT[63:32] on O6,
// INIT[31:0] on O5). Both outputs are purely combinational.
// The pin names A[5:0], O6 and O5 follow the source design's figure of the
// logic circuit; the split of the memory between O6 and O5 is the usual
// 7-series arrangement and is this model's own choice.
module lut6 (
  input  logic [63:0] init, // configuration memory
  input  logic [5:0]  a,    // address pins A6..A1
  output logic        o6,
  output logic        o5
);
  assign o6 = init[a];
  assign o5 = init[{1'b0, a[4:0]}];
endmodule
