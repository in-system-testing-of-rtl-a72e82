// dp_ila: iterative logic array of SLICEs for the data-path configurations.
//
// N_SLICE SLICEs are cascaded with the connectivity of the loaded row:
//   LINK_LUT  : {DO..AO} -> next A/B address, {DF..AF} -> next C/D address
//   LINK_O_AX : {DO..AO} -> next {DX..AX}
//   LINK_F_AX : {DF..AF} -> next {DX..AX}
//   LINK_CARRY: COUT -> next CIN
// The TPG's 4-bit vector drives the first SLICE on every input that the row
// uses (both address buses, the X inputs, or CIN from bit 0). Unless the row
// links through X, all X inputs are tied to the row's constant. Every SLICE
// passes its input to its output, so after the array has settled the last
// SLICE's buses equal the TPG vector. Registers in the path add up to one
// clock of latency per SLICE, so the TPG must hold each vector for at least
// N_SLICE + 1 cycles.
// Read-back: q_all and q5_all hold all flip-flops, SLICE i at index i.
// The connectivity follows the source design's table; the tie of unused X
// inputs and the use of the vector on both address buses are this model's.
module dp_ila
  import bist_pkg::*;
#(
  parameter int unsigned N_SLICE = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  input  dp_cfg_t                 cfg,
  input  fault_t                  fault,
  input  logic [3:0]              tpg_vec,
  output logic [3:0]              out_o,   // {DO..AO} of the last SLICE
  output logic [3:0]              out_q,   // {DF..AF} of the last SLICE
  output logic                    out_cy,  // COUT of the last SLICE
  output logic [N_SLICE-1:0][3:0] q_all,
  output logic [N_SLICE-1:0][3:0] q5_all
);
  logic [N_SLICE-1:0][3:0] o, q;
  logic [N_SLICE-1:0]      cout;
  logic [N_SLICE-1:0][3:0] ab, cd, xin;
  logic [N_SLICE-1:0]      cin;

  always_comb begin
    for (int i = 0; i < int'(N_SLICE); i++) begin
      if (i == 0) begin
        ab[i]  = tpg_vec;
        cd[i]  = tpg_vec;
        cin[i] = tpg_vec[0];
        xin[i] = (cfg.link inside {LINK_O_AX, LINK_F_AX}) ? tpg_vec : {4{cfg.x_val}};
      end else begin
        ab[i]  = o[i-1];
        cd[i]  = q[i-1];
        cin[i] = cout[i-1];
        case (cfg.link)
          LINK_O_AX: xin[i] = o[i-1];
          LINK_F_AX: xin[i] = q[i-1];
          default:   xin[i] = {4{cfg.x_val}};
        endcase
      end
    end
  end

  for (genvar i = 0; i < N_SLICE; i++) begin : g_slice
    slice_dp #(.SLICE(i)) u_slice (
      .clk, .rst, .ce, .cfg, .fault,
      .ab_addr(ab[i]),
      .cd_addr(cd[i]),
      .x      (xin[i]),
      .cin    (cin[i]),
      .o      (o[i]),
      .q      (q[i]),
      .q5     (q5_all[i]),
      .cout   (cout[i])
    );
  end

  assign q_all  = q;
  assign out_o  = o[N_SLICE-1];
  assign out_q  = q[N_SLICE-1];
  assign out_cy = cout[N_SLICE-1];
endmodule
