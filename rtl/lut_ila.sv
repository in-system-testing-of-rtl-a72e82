// lut_ila: iterative logic array (ILA) of LUT BUTs.
//
// N_BUT blocks under test are cascaded: the 6-bit output bus of BUT i is the
// shared address bus of BUT i+1, and the test pattern generator drives the
// first BUT. Since every BUT implements the same identity or complement
// function, the last BUT's output equals the TPG vector, complemented when
// the function is the complement and N_BUT is odd. A faulty LUT makes its BUT
// output a wrong bit, which then travels unchanged to the ILA output.
// The array is combinational from tpg_vec to ila_out; ff_q holds the
// registered O6 values of all LUTs (BUT i in ff_q[i], physical LUT order) for
// read-back.
// The cascade follows the source design; its length is a parameter here (the
// source tests every LUT of the device in one array).
module lut_ila
  import bist_pkg::*;
#(
  parameter int unsigned N_BUT = 32
) (
  input  logic                  clk,
  input  logic                  rst,
  input  lut_fn_e               fn,
  input  logic [2:0]            rot,
  input  fault_t                fault,
  input  logic [5:0]            tpg_vec,
  output logic [5:0]            ila_out,
  output logic [N_BUT-1:0][5:0] ff_q
);
  logic [N_BUT:0][5:0] bus;

  assign bus[0] = tpg_vec;

  for (genvar i = 0; i < N_BUT; i++) begin : g_but
    lut_but #(.INDEX(i)) u_but (
      .clk, .rst, .fn, .rot, .fault,
      .a   (bus[i]),
      .y   (bus[i+1]),
      .ff_q(ff_q[i])
    );
  end

  assign ila_out = bus[N_BUT];
endmodule
