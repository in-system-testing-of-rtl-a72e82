// srl_bist: the shift-register test configuration.
//
// The SRLs of the test area are split into two regions. The N_SRL shift
// registers of each region are cascaded into one circular shift register
// (the cascade output of the last feeds the input of the first). While `rst`
// is high both rings are preset to the alternating pattern 1010...: cell p of the ring
// (counted along the shift direction from bit 0 of the first SRL) holds
// ~p[0], so bit 0 is 1. Both rings shift on the same enabled clock, and the
// ORA compares bit 0 of the two rings with an XOR. A stuck cell makes the
// bits that pass it constant; within one revolution that run reaches bit 0,
// the XOR turns 1 and `mismatch` (combinational, for stopping the shift) and
// the sticky `fail` report it. `done` rises after RUN cycles of shifting,
// which is two revolutions of the longest ring.
// Read-back: bits_a / bits_b, SRL i of the ring at index i.
// Two rings, the 1010 pattern and the XOR of bit 0 follow the source design;
// the run length and the pattern phase are this model's own.
module srl_bist
  import bist_pkg::*;
#(
  parameter int unsigned N_SRL = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     ce,
  input  logic                     mode16,
  input  fault_t                   fault,
  output logic [N_SRL-1:0][31:0]   bits_a,
  output logic [N_SRL-1:0][31:0]   bits_b,
  output logic                     mismatch,
  output logic                     fail,
  output logic                     done
);
  localparam int unsigned RUN = 2 * 32 * N_SRL;
  localparam int unsigned CW  = $clog2(RUN + 1);

  // 32-bit and 16-bit SRLs both hold an even number of cells, so every SRL
  // starts with the same alternating word.
  localparam logic [31:0] PATTERN = 32'h5555_5555;

  logic [N_SRL-1:0] mc_a, mc_b;
  logic [CW-1:0]    cnt;

  for (genvar i = 0; i < N_SRL; i++) begin : g_srl
    srl_lut #(.INDEX(i)) u_a (
      .clk, .ce, .load(rst), .load_val(PATTERN), .mode16, .fault,
      .d   (mc_a[(i+N_SRL-1)%N_SRL]),
      .mc  (mc_a[i]),
      .bits(bits_a[i])
    );
    srl_lut #(.INDEX(256 + i)) u_b (
      .clk, .ce, .load(rst), .load_val(PATTERN), .mode16, .fault,
      .d   (mc_b[(i+N_SRL-1)%N_SRL]),
      .mc  (mc_b[i]),
      .bits(bits_b[i])
    );
  end

  assign mismatch = bits_a[0][0] ^ bits_b[0][0];
  assign done     = (32'(cnt) == RUN);

  always_ff @(posedge clk) begin
    if (rst) begin
      fail <= 1'b0;
      cnt  <= '0;
    end else begin
      if (mismatch)      fail <= 1'b1;
      if (ce && !done)   cnt  <= cnt + 1'b1;
    end
  end
endmodule
