// srl_lut: a SLICEM LUT configured as a shift register.
//
// In 32-bit mode the 32 cells shift by one position on every enabled clock:
// the input d enters cell 0 and cell 31 leaves on the cascade output mc. In
// 16-bit mode only cells 0..15 are used and mc is cell 15. The contents are
// preset with `load` (the initial value set by the configuration). `bits`
// gives all cells for read-back.
// Fault injection: when fault.unit == INDEX, cell fault.idx[4:0] is stuck at
// fault.value: it passes the stuck value on, whatever was shifted into it.
// The two lengths follow the source design; the load port stands for the
// initial contents that a configuration gives the register.
module srl_lut
  import bist_pkg::*;
#(
  parameter int unsigned INDEX = 0
) (
  input  logic        clk,
  input  logic        ce,
  input  logic        load,
  input  logic [31:0] load_val,
  input  logic        mode16,
  input  fault_t      fault,
  input  logic        d,
  output logic        mc,
  output logic [31:0] bits
);
  logic [31:0] sr;

  always_comb begin
    bits = sr;
    if (fault.en && fault.unit == 16'(INDEX)) bits[fault.idx[4:0]] = fault.value;
  end

  assign mc = mode16 ? bits[15] : bits[31];

  always_ff @(posedge clk) begin
    if (load) begin
      sr <= load_val;
    end else if (ce) begin
      if (mode16) sr <= {16'h0000, bits[14:0], d};
      else        sr <= {bits[30:0], d};
    end
  end
endmodule
