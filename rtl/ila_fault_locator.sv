// ila_fault_locator: isolates a fault from the read-back flip-flop values of
// an iterative logic array.
//
// After a fault stops the TPG, every unit of the array holds in its
// flip-flops the response to the frozen vector. Unit i of a fault-free array
// holds the vector, complemented when `complement` is set and i is even
// (i + 1 complementing stages). The locator finds the first unit whose
// flip-flops differ from that and counts its wrong bits. Under the single
// stuck-at fault model one wrong bit means the fault is in that unit itself,
// while several wrong bits can only come from a wrong input, so the fault is
// in the unit before it (first_unit - 1; `at_input` when that is the array's
// input). The logic is combinational.
// The rule follows the source design's fault-isolation method, which runs on
// the host after read-back; here it is written as logic.
module ila_fault_locator #(
  parameter int unsigned N_UNIT = 32,
  parameter int unsigned W      = 6
) (
  input  logic [N_UNIT-1:0][W-1:0] ff,          // read-back, unit order
  input  logic [W-1:0]             vec,         // frozen TPG vector
  input  logic                     complement,
  output logic                     found,       // some unit is wrong
  output logic [15:0]              first_unit,  // first wrong unit
  output logic [15:0]              n_wrong,     // wrong bits in it
  output logic                     in_pred,     // fault is in the unit before
  output logic                     at_input,    // ... which is the array input
  output logic [15:0]              fault_unit   // unit holding the fault
);
  always_comb begin
    logic [W-1:0] diff;
    found      = 1'b0;
    first_unit = '0;
    n_wrong    = '0;
    for (int i = 0; i < int'(N_UNIT); i++) begin
      diff = ff[i] ^ vec ^ {W{complement && (i % 2 == 0)}};
      if (!found && diff != '0) begin
        found      = 1'b1;
        first_unit = 16'(i);
        n_wrong    = 16'($countones(diff));
      end
    end
    in_pred    = found && (n_wrong > 16'd1);
    at_input   = in_pred && (first_unit == 16'd0);
    fault_unit = (in_pred && !at_input) ? first_unit - 16'd1 : first_unit;
  end
endmodule
