// srl_fault_locator: isolates a stuck cell in a circular shift register from
// its read-back contents.
//
// A fault-free ring always holds alternating bits, so no two cells that are
// next to each other along the shift path are equal. A stuck cell passes a
// constant on, so the cells after it fill with that constant. The locator
// looks for the start of that run: the cell p that equals its successor but
// differs from its predecessor. The stuck cell is p (or p - 1 when the cell
// before the fault happened to hold the stuck value already). Cells are
// numbered along the shift path, cell b of SRL i being i * LEN + b, with
// LEN = 16 or 32. The logic is combinational.
// The method (finding where the pattern stops alternating) follows the source
// design; this exact rule is this model's own.
module srl_fault_locator #(
  parameter int unsigned N_SRL = 8
) (
  input  logic [N_SRL-1:0][31:0] bits,
  input  logic                   mode16,
  output logic                   found,
  output logic [15:0]            run_cell,     // start of the constant run
  output logic [15:0]            srl_idx   // SRL holding that cell
);
  localparam int unsigned L32 = N_SRL * 32;
  localparam int unsigned L16 = N_SRL * 16;

  // start[p]: cell p equals its successor and differs from its predecessor.
  // Cell p of the 16-bit ring is bit p % 16 of SRL p / 16.
  logic [L32-1:0] start32;
  logic [L16-1:0] start16;

  for (genvar p = 0; p < L32; p++) begin : g_s32
    localparam int unsigned PM = (p + L32 - 1) % L32;
    localparam int unsigned PP = (p + 1) % L32;
    assign start32[p] = (bits[p / 32][p % 32] == bits[PP / 32][PP % 32]) &&
                        (bits[p / 32][p % 32] != bits[PM / 32][PM % 32]);
  end

  for (genvar p = 0; p < L16; p++) begin : g_s16
    localparam int unsigned PM = (p + L16 - 1) % L16;
    localparam int unsigned PP = (p + 1) % L16;
    assign start16[p] = (bits[p / 16][p % 16] == bits[PP / 16][PP % 16]) &&
                        (bits[p / 16][p % 16] != bits[PM / 16][PM % 16]);
  end

  always_comb begin
    found    = 1'b0;
    run_cell = '0;
    if (mode16) begin
      for (int p = 0; p < int'(L16); p++) begin
        if (!found && start16[p]) begin
          found    = 1'b1;
          run_cell = 16'(p);
        end
      end
      srl_idx = run_cell >> 4;
    end else begin
      for (int p = 0; p < int'(L32); p++) begin
        if (!found && start32[p]) begin
          found    = 1'b1;
          run_cell = 16'(p);
        end
      end
      srl_idx = run_cell >> 5;
    end
  end
endmodule
