// clb_bist_top: built-in self-test of the configurable logic blocks of a
// 7-series-style FPGA, modelled as one design.
//
// The real test consists of 30 configurations that a host loads one after
// another through the configuration port: 12 LUT configurations, 13 data-path
// configurations, 3 RAM configurations and 2 shift-register configurations.
// This top holds the test structure of every family on a test area of the
// modelled fabric; `cfg` (the loaded configuration) selects the family and
// its variant, and `rst` high stands for "configuration being loaded".
//   MODE_LUT: a 6-bit counter TPG drives an ILA of N_BUT LUT BUTs; an ORA
//             compares the ILA output with the vector (identity/complement).
//   MODE_DP : a 4-bit counter TPG, holding each vector N_SLICE + 2 cycles,
//             drives an ILA of N_SLICE SLICEs set to Table-I row cfg.dp_row;
//             an ORA compares the last SLICE's outputs with the vector.
//   MODE_RAM: N_RAM_GROUP groups of MATS generator, two LUT-RAMs, local ORA.
//   MODE_SRL: two rings of N_SRL shift-register LUTs compared at bit 0.
// The BIST controller starts the active structure when the configuration is
// released, stops its TPG on the first mismatch, and writes PASS (1) or FAIL
// (0) to `status_done`, the status bit the host reads back. All flip-flops
// of the structures are brought out for read-back; the ILA and shift-register
// fault locators, which the host would run on the read-back data, are
// included so that a test can check the located fault directly. The same ILA
// locator, applied to the data-path FFQ read-back, gives the first SLICE
// holding a wrong value.
// `fault` emulates a permanent fault (a corrupted configuration bit or a
// stuck net) inside the structure that is active.
// Timing: one clock domain, the clock derived from the configuration logic.
// A LUT run takes 64 cycles, a data-path run 16 x (N_SLICE + 2), a RAM run
// 4 x 64 or 4 x 32, a shift-register run 64 x N_SRL.
// The four families and their structures follow the source design; the sizes
// of the test area are parameters here (the source covers a whole device).
module clb_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N_BUT       = 32,
  parameter int unsigned N_SLICE     = 16,
  parameter int unsigned N_RAM_GROUP = 4,
  parameter int unsigned N_SRL       = 8
) (
  input  logic                        clk,
  input  logic                        rst,
  input  bist_cfg_t                   cfg,
  input  fault_t                      fault,
  // result
  output logic                        status_done,
  output logic                        finished,
  output logic                        pass,
  output logic                        fail,
  // read-back of the structures' flip-flops
  output logic [N_BUT-1:0][5:0]       lut_ff,      // bus order: bit k = output bit k
  output logic [5:0]                  lut_vec,     // frozen LUT TPG vector
  output logic [N_SLICE-1:0][3:0]     dp_q,
  output logic [N_SLICE-1:0][3:0]     dp_q5,
  output logic [3:0]                  dp_vec,
  output logic [N_RAM_GROUP-1:0]      ram_ora_q,
  output logic [N_SRL-1:0][31:0]      srl_bits_a,
  output logic [N_SRL-1:0][31:0]      srl_bits_b,
  // fault isolation
  output logic                        lut_loc_found,
  output logic [15:0]                 lut_loc_unit,
  output logic                        lut_loc_in_pred,
  output logic                        lut_loc_at_input,
  output logic                        dp_loc_found,
  output logic [15:0]                 dp_loc_first,   // first SLICE with a wrong FFQ
  output logic                        srl_loc_found_a,
  output logic                        srl_loc_found_b,
  output logic [15:0]                 srl_loc_srl_a,
  output logic [15:0]                 srl_loc_srl_b,
  output logic [15:0]                 srl_loc_cell_a,
  output logic [15:0]                 srl_loc_cell_b
);
  localparam int unsigned DP_HOLD = N_SLICE + 2;

  logic tpg_ce, running;
  logic mismatch, fail_any, seq_done;

  // Per-family resets: only the loaded family runs.
  logic rst_lut, rst_dp, rst_ram, rst_srl;
  assign rst_lut = rst || cfg.mode != MODE_LUT;
  assign rst_dp  = rst || cfg.mode != MODE_DP;
  assign rst_ram = rst || cfg.mode != MODE_RAM;
  assign rst_srl = rst || cfg.mode != MODE_SRL;

  // ------------------------------------------------------------ LUT family
  logic       lut_sample, lut_last, lut_mis, lut_fail;
  logic [5:0] lut_out;
  logic [N_BUT-1:0][5:0] lut_ff_phys;
  logic       lut_invert;

  ila_tpg #(.WIDTH(6), .HOLD(1)) u_lut_tpg (
    .clk, .rst(rst_lut), .ce(tpg_ce && cfg.mode == MODE_LUT),
    .vec(lut_vec), .sample(lut_sample), .last(lut_last)
  );

  lut_ila #(.N_BUT(N_BUT)) u_lut_ila (
    .clk, .rst(rst_lut), .fn(cfg.lut_fn), .rot(cfg.lut_rot), .fault,
    .tpg_vec(lut_vec), .ila_out(lut_out), .ff_q(lut_ff_phys)
  );

  assign lut_invert = (cfg.lut_fn == FN_COMPLEMENT) && (N_BUT % 2 == 1);

  ila_ora #(.WIDTH(6)) u_lut_ora (
    .clk, .rst(rst_lut), .sample(lut_sample && running), .invert(lut_invert),
    .mask('1), .tpg_vec(lut_vec), .ila_out(lut_out),
    .mismatch(lut_mis), .fail(lut_fail)
  );

  // Read-back in output-bus order.
  always_comb begin
    for (int i = 0; i < int'(N_BUT); i++)
      for (int unsigned k = 0; k < 6; k++)
        lut_ff[i][k] = lut_ff_phys[i][lut_of_bit(k, 32'(cfg.lut_rot))];
  end

  logic [15:0] lut_loc_nwrong, lut_loc_first;

  ila_fault_locator #(.N_UNIT(N_BUT), .W(6)) u_lut_loc (
    .ff(lut_ff), .vec(lut_vec), .complement(cfg.lut_fn == FN_COMPLEMENT),
    .found(lut_loc_found), .first_unit(lut_loc_first), .n_wrong(lut_loc_nwrong),
    .in_pred(lut_loc_in_pred), .at_input(lut_loc_at_input), .fault_unit(lut_loc_unit)
  );

  // ------------------------------------------------------- data-path family
  dp_cfg_t    dp_cfg;
  logic       dp_sample, dp_last, dp_mis, dp_fail;
  logic [3:0] dp_o, dp_qo;
  logic       dp_cy;
  logic [8:0] dp_mask;

  // The 13 data-path configurations, each computed at elaboration; codes 0,
  // 14 and 15 fall back to row 1.
  dp_cfg_t dp_table [16];

  for (genvar r = 0; r < 16; r++) begin : g_dp_row
    localparam dp_cfg_t ROW = dp_row_cfg((r >= 1 && r <= 13) ? r : 1);
    assign dp_table[r] = ROW;
  end

  assign dp_cfg = dp_table[cfg.dp_row];

  ila_tpg #(.WIDTH(4), .HOLD(DP_HOLD)) u_dp_tpg (
    .clk, .rst(rst_dp), .ce(tpg_ce && cfg.mode == MODE_DP),
    .vec(dp_vec), .sample(dp_sample), .last(dp_last)
  );

  dp_ila #(.N_SLICE(N_SLICE)) u_dp_ila (
    .clk, .rst(rst_dp), .ce(1'b1), .cfg(dp_cfg), .fault, .tpg_vec(dp_vec),
    .out_o(dp_o), .out_q(dp_qo), .out_cy(dp_cy), .q_all(dp_q), .q5_all(dp_q5)
  );

  always_comb begin
    case (dp_cfg.link)
      LINK_LUT:  dp_mask = 9'h0FF;
      LINK_O_AX: dp_mask = 9'h00F;
      LINK_F_AX: dp_mask = 9'h0F0;
      default:   dp_mask = 9'h100;
    endcase
  end

  ila_ora #(.WIDTH(9)) u_dp_ora (
    .clk, .rst(rst_dp), .sample(dp_sample && running), .invert(1'b0),
    .mask(dp_mask), .tpg_vec({dp_vec[0], dp_vec, dp_vec}),
    .ila_out({dp_cy, dp_qo, dp_o}), .mismatch(dp_mis), .fail(dp_fail)
  );

  // Data-path read-back: the first SLICE whose FFQ flip-flops differ from the
  // frozen vector. Meaningful for rows whose F bus carries the vector (LUT
  // and F-to-X connectivity); the fault lies in that SLICE or the one before.
  logic [15:0] dp_loc_nwrong_unused, dp_loc_unit_unused;
  logic        dp_loc_pred_unused, dp_loc_input_unused;

  ila_fault_locator #(.N_UNIT(N_SLICE), .W(4)) u_dp_loc (
    .ff(dp_q), .vec(dp_vec), .complement(1'b0),
    .found(dp_loc_found), .first_unit(dp_loc_first), .n_wrong(dp_loc_nwrong_unused),
    .in_pred(dp_loc_pred_unused), .at_input(dp_loc_input_unused), .fault_unit(dp_loc_unit_unused)
  );

  // ------------------------------------------------------------- RAM family
  logic ram_fail, ram_done;

  ram_bist #(.N_GROUP(N_RAM_GROUP)) u_ram (
    .clk, .rst(rst_ram), .ce(tpg_ce && cfg.mode == MODE_RAM), .mode(cfg.ram_mode),
    .fault, .ora_q(ram_ora_q), .fail(ram_fail), .done(ram_done)
  );

  // -------------------------------------------------- shift-register family
  logic srl_mis, srl_fail, srl_done;

  srl_bist #(.N_SRL(N_SRL)) u_srl (
    .clk, .rst(rst_srl), .ce(tpg_ce && cfg.mode == MODE_SRL), .mode16(cfg.srl16),
    .fault, .bits_a(srl_bits_a), .bits_b(srl_bits_b),
    .mismatch(srl_mis), .fail(srl_fail), .done(srl_done)
  );

  srl_fault_locator #(.N_SRL(N_SRL)) u_srl_loc_a (
    .bits(srl_bits_a), .mode16(cfg.srl16),
    .found(srl_loc_found_a), .run_cell(srl_loc_cell_a), .srl_idx(srl_loc_srl_a)
  );
  srl_fault_locator #(.N_SRL(N_SRL)) u_srl_loc_b (
    .bits(srl_bits_b), .mode16(cfg.srl16),
    .found(srl_loc_found_b), .run_cell(srl_loc_cell_b), .srl_idx(srl_loc_srl_b)
  );

  // ------------------------------------------------------------ controller
  always_comb begin
    case (cfg.mode)
      MODE_LUT: begin mismatch = lut_mis; fail_any = lut_fail; seq_done = lut_last; end
      MODE_DP:  begin mismatch = dp_mis;  fail_any = dp_fail;  seq_done = dp_last;  end
      MODE_RAM: begin mismatch = 1'b0;    fail_any = ram_fail; seq_done = ram_done; end
      default:  begin mismatch = srl_mis && running; fail_any = srl_fail; seq_done = srl_done; end
    endcase
  end

  bist_controller u_ctrl (
    .clk, .rst, .start(1'b1), .mismatch, .fail(fail_any), .seq_done,
    .tpg_ce, .running, .finished, .pass, .fail_out(fail), .status_done
  );
endmodule
