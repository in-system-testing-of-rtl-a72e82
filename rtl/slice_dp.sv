// slice_dp: a SLICE of four logic circuits (A..D) for the data-path tests.
//
// The four circuits share the configuration (every circuit of a SLICE is set
// up identically) but each has its own LUT contents. Circuits A and B take
// their LUT address from the A/B bus, C and D from the C/D bus; address pin
// A6 is tied high so that O6 and O5 are both usable, A5 is tied low. When the
// address buses are not driven by the previous SLICE (connectivity other than
// LUT), address bit 0 of each LUT is the circuit's own X input. The wide
// multiplexers pair A with B and C with D. The carry chain runs
// CIN -> A -> B -> C -> D -> COUT.
// Outputs are the buses {DO,CO,BO,AO}, {DF,CF,BF,AF} (flip-flops FFQ) and
// {D5Q..A5Q} (5FF flip-flops), and COUT.
// The four identical circuits and the named buses follow the source design;
// the address-pin ties, the wide-mux pairing and the carry order are this
// model's choices.
module slice_dp
  import bist_pkg::*;
#(
  parameter int unsigned SLICE = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  dp_cfg_t     cfg,
  input  fault_t      fault,
  input  logic [3:0]  ab_addr,  // A/B[3:0]
  input  logic [3:0]  cd_addr,  // C/D[3:0]
  input  logic [3:0]  x,        // {DX, CX, BX, AX}
  input  logic        cin,
  output logic [3:0]  o,        // {DO, CO, BO, AO}
  output logic [3:0]  q,        // {DF, CF, BF, AF}
  output logic [3:0]  q5,       // 5FF outputs
  output logic        cout
);
  logic [3:0] o6;
  logic [4:0] chain;
  logic [3:0][5:0] addr;

  assign chain[0] = cin;
  assign cout     = chain[4];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      if (cfg.link == LINK_LUT)
        addr[k] = {2'b10, (k < 2) ? ab_addr : cd_addr};
      else
        addr[k] = {2'b10, 3'b000, x[k]};
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_circ
    slice_circuit #(.SLICE(SLICE), .CIRCUIT(k)) u_circ (
      .clk, .rst, .ce, .cfg, .fault,
      .a       (addr[k]),
      .x       (x[k]),
      .chain_in(chain[k]),
      .nb_o6   (o6[k ^ 1]),
      .o6      (o6[k]),
      .cy      (chain[k+1]),
      .o       (o[k]),
      .q       (q[k]),
      .q5      (q5[k])
    );
  end
endmodule
