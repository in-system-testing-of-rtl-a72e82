// ram_bist: the RAM test configuration.
//
// N_GROUP groups, each made of one MATS generator, two LUT-RAMs that it
// drives, and a local ORA that compares the two RAM outputs during the read
// cycles. The RAM test result `fail` is the OR of all local ORA flip-flops;
// `ora_q` gives each flip-flop for read-back, which locates the failing pair.
// `done` is high once every generator has finished its sequence.
// RAM 2g and 2g+1 form group g (their fault-injection indices).
// The group structure and the OR of the local ORAs follow the source design;
// the group count is a parameter here (in the device it follows from the
// number of SLICEMs).
module ram_bist
  import bist_pkg::*;
#(
  parameter int unsigned N_GROUP = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ce,
  input  ram_mode_e          mode,
  input  fault_t             fault,
  output logic [N_GROUP-1:0] ora_q,
  output logic               fail,
  output logic               done
);
  logic [N_GROUP-1:0] g_done;

  for (genvar g = 0; g < N_GROUP; g++) begin : g_grp
    logic       we, rd;
    logic [5:0] wa;
    logic [4:0] ra;
    logic [1:0] di, exp_unused;
    logic [1:0] d0, d1;

    mats_tpg u_tpg (
      .clk, .rst, .ce, .mode,
      .we, .wa, .ra, .di, .rd,
      .exp (exp_unused),
      .done(g_done[g])
    );
    lutram #(.INDEX(2*g)) u_ram0 (
      .clk, .mode, .fault, .we, .wa, .ra, .di, .dout(d0)
    );
    lutram #(.INDEX(2*g+1)) u_ram1 (
      .clk, .mode, .fault, .we, .wa, .ra, .di, .dout(d1)
    );
    local_ora #(.WIDTH(2)) u_ora (
      .clk, .rst, .en(rd), .a(d0), .b(d1), .fail(ora_q[g])
    );
  end

  assign fail = |ora_q;
  assign done = &g_done;
endmodule
