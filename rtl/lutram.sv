// lutram: a SLICEM LUT configured as distributed RAM.
//
// The 64 memory cells of the LUT are used in one of three modes:
//   RAM_64X1_SP: 64 words x 1 bit, one address (wa) for write and read
//   RAM_32X2_SP: 32 words x 2 bits, one address (wa[4:0])
//   RAM_32X2_DP: 32 words x 2 bits, write at wa[4:0], read at ra[4:0]
// Writes are synchronous (on the rising clock while we is high); reads are
// asynchronous. In the 2-bit modes bit 0 of a word lives in cell a and bit 1
// in cell 32 + a.
// Fault injection: when fault.unit == INDEX, memory cell fault.idx reads as
// fault.value whatever is written into it.
// The three modes follow the source design; the placement of the two bits in
// the 64 cells is this model's choice.
module lutram
  import bist_pkg::*;
#(
  parameter int unsigned INDEX = 0
) (
  input  logic       clk,
  input  ram_mode_e  mode,
  input  fault_t     fault,
  input  logic       we,
  input  logic [5:0] wa,
  input  logic [4:0] ra,
  input  logic [1:0] di,
  output logic [1:0] dout
);
  logic [63:0] mem;
  logic [63:0] cells;  // what the cells deliver, with a stuck cell applied
  logic [4:0]  rd_a;

  always_comb begin
    cells = mem;
    if (fault.en && fault.unit == 16'(INDEX)) cells[fault.idx] = fault.value;
  end

  always_ff @(posedge clk) begin
    if (we) begin
      if (mode == RAM_64X1_SP) begin
        mem[wa] <= di[0];
      end else begin
        mem[{1'b0, wa[4:0]}] <= di[0];
        mem[{1'b1, wa[4:0]}] <= di[1];
      end
    end
  end

  assign rd_a = (mode == RAM_32X2_DP) ? ra : wa[4:0];

  always_comb begin
    if (mode == RAM_64X1_SP) dout = {1'b0, cells[wa]};
    else                     dout = {cells[{1'b1, rd_a}], cells[{1'b0, rd_a}]};
  end
endmodule
