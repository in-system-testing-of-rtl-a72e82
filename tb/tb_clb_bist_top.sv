// tb_clb_bist_top: end-to-end test of the CLB BIST at the design's default
// size. It loads all 30 test configurations (12 LUT, 13 data-path, 3 RAM,
// 2 shift-register) on a fault-free fabric and expects PASS in the status bit
// after the number of cycles each family needs. Then it loads configurations
// with an emulated permanent fault and expects FAIL, a TPG frozen on the
// failing pattern, and the fault located from the read-back data: the faulty
// BUT for the LUT family, the local ORA of the faulty RAM pair, the SRL that
// holds the stuck cell. Every mechanism of the design is counted and must
// occur at least once.
module tb_clb_bist_top;
  import bist_pkg::*;
  localparam int N_BUT = 32, N_SLICE = 16, N_RAM_GROUP = 4, N_SRL = 8;

  logic clk = 0, rst;
  bist_cfg_t cfg;
  fault_t fault;
  logic status_done, finished, pass, fail;
  logic [N_BUT-1:0][5:0] lut_ff;
  logic [5:0] lut_vec;
  logic [N_SLICE-1:0][3:0] dp_q, dp_q5;
  logic [3:0] dp_vec;
  logic [N_RAM_GROUP-1:0] ram_ora_q;
  logic [N_SRL-1:0][31:0] srl_bits_a, srl_bits_b;
  logic lut_loc_found, lut_loc_in_pred, lut_loc_at_input, srl_loc_found_a, srl_loc_found_b, dp_loc_found;
  logic [15:0] dp_loc_first, lut_loc_unit, srl_loc_srl_a, srl_loc_srl_b, srl_loc_cell_a, srl_loc_cell_b;
  int checks = 0, failures = 0;

  clb_bist_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism counters
  typedef enum int {
    M_IDENTITY, M_COMPLEMENT, M_ROT_NONZERO, M_DP_LINK_LUT, M_DP_LINK_O_AX, M_DP_LINK_F_AX,
    M_DP_CARRY, M_CLK_INV, M_WIDE_MUX, M_RAM_DP, M_RAM_SP2, M_RAM_SP1, M_SRL32, M_SRL16,
    M_PASS, M_FAIL, M_TPG_STOP, M_LOC_DP, M_LOC_LUT, M_LOC_RAM, M_LOC_SRL, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  // Load a configuration, release it and wait for the result.
  task automatic run(input bist_cfg_t c, input fault_t f, output int cycles);
    cfg = c; fault = f;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cycles = 0;
    while (!finished && cycles < 10000) begin @(posedge clk); #1 cycles++; end
    if (status_done) mech[M_PASS]++;
    if (fail) mech[M_FAIL]++;
  endtask

  function automatic logic d_link_lut(int row);
    dp_cfg_t d;
    d = dp_row_cfg(row);
    return d.link == LINK_LUT;
  endfunction

  function automatic bist_cfg_t mk(test_mode_e m);
    bist_cfg_t c;
    c = '0;
    c.mode = m;
    c.dp_row = 4'd1;
    return c;
  endfunction

  initial begin
    bist_cfg_t c;
    int cyc;
    for (int i = 0; i < M_COUNT; i++) mech[i] = 0;

    // ---------------- fault-free: all 30 configurations
    for (int fn = 0; fn < 2; fn++)
      for (int r = 0; r < 6; r++) begin
        c = mk(MODE_LUT); c.lut_fn = lut_fn_e'(fn); c.lut_rot = 3'(r);
        run(c, '0, cyc);
        check(pass && status_done && cyc == 64 + 1, $sformatf("LUT fn=%0d rot=%0d cycles=%0d", fn, r, cyc));
        if (fn == 0) mech[M_IDENTITY]++; else mech[M_COMPLEMENT]++;
        if (r != 0) mech[M_ROT_NONZERO]++;
      end
    for (int row = 1; row <= 13; row++) begin
      dp_cfg_t d;
      c = mk(MODE_DP); c.dp_row = 4'(row);
      d = dp_row_cfg(row);
      run(c, '0, cyc);
      check(pass && status_done && cyc == 16 * (N_SLICE + 2) + 1, $sformatf("DP row %0d cycles=%0d", row, cyc));
      case (d.link)
        LINK_LUT:  mech[M_DP_LINK_LUT]++;
        LINK_O_AX: mech[M_DP_LINK_O_AX]++;
        LINK_F_AX: mech[M_DP_LINK_F_AX]++;
        default:   mech[M_DP_CARRY]++;
      endcase
      if (d.clk_inv) mech[M_CLK_INV]++;
      if (d.out_sel == 3) mech[M_WIDE_MUX]++;
    end
    for (int m = 0; m < 3; m++) begin
      int words;
      c = mk(MODE_RAM); c.ram_mode = ram_mode_e'(m);
      words = (c.ram_mode == RAM_64X1_SP) ? 64 : 32;
      run(c, '0, cyc);
      check(pass && status_done && ram_ora_q == 0 && cyc == 4 * words + 2, $sformatf("RAM mode %0d cycles=%0d", m, cyc));
      case (c.ram_mode)
        RAM_32X2_DP: mech[M_RAM_DP]++;
        RAM_32X2_SP: mech[M_RAM_SP2]++;
        default:     mech[M_RAM_SP1]++;
      endcase
    end
    for (int m = 0; m < 2; m++) begin
      c = mk(MODE_SRL); c.srl16 = 1'(m);
      run(c, '0, cyc);
      check(pass && status_done && cyc == 2 * 32 * N_SRL + 2, $sformatf("SRL mode %0d cycles=%0d", m, cyc));
      if (m) mech[M_SRL16]++; else mech[M_SRL32]++;
    end

    // ---------------- LUT faults: detection, frozen TPG, isolation
    for (int k = 0; k < 8; k++) begin
      int u, j, r, loc, fn;
      logic good;
      u = $urandom % N_BUT; j = $urandom % 6; r = $urandom % 6; loc = $urandom % 64; fn = k % 2;
      good = 1'((loc >> ((j + r) % 6)) & 1) ^ 1'(fn);
      c = mk(MODE_LUT); c.lut_fn = lut_fn_e'(fn); c.lut_rot = 3'(r);
      run(c, '{en: 1'b1, unit: 16'(u), sub: 3'(j), idx: 6'(loc), value: ~good}, cyc);
      check(fail && !status_done, $sformatf("LUT fault %0d detected", k));
      // BUT u sees the vector complemented u times
      check(lut_vec == (6'(loc) ^ {6{fn == 1 && u % 2 == 1}}),
            $sformatf("TPG frozen on the failing vector (%0d, cell %0d)", lut_vec, loc));
      if (lut_vec == (6'(loc) ^ {6{fn == 1 && u % 2 == 1}})) mech[M_TPG_STOP]++;
      repeat (2) @(posedge clk);
      #1 check(lut_loc_found && !lut_loc_in_pred && lut_loc_unit == 16'(u),
               $sformatf("LUT fault located in BUT %0d (got %0d)", u, lut_loc_unit));
      if (lut_loc_found && lut_loc_unit == 16'(u)) mech[M_LOC_LUT]++;
    end

    // ---------------- data-path faults
    for (int k = 0; k < 4; k++) begin
      int row, s; dp_site_e site; logic v;
      case (k)
        0: begin row = 3;  site = SITE_OUT; v = 1; end
        1: begin row = 8;  site = SITE_FFD; v = 0; end
        2: begin row = 11; site = SITE_CY;  v = 0; end
        default: begin row = 13; site = SITE_F7; v = 1; end
      endcase
      s = $urandom % (N_SLICE - 1);
      c = mk(MODE_DP); c.dp_row = 4'(row);
      run(c, '{en: 1'b1, unit: 16'(s), sub: 3'($urandom % 4), idx: 6'(site), value: v}, cyc);
      check(fail && !status_done, $sformatf("DP fault in row %0d slice %0d detected", row, s));
      if (d_link_lut(row)) begin
        // let the frozen vector settle through the array, then read back
        repeat (N_SLICE + 2) @(posedge clk);
        #1 check(dp_loc_found && (dp_loc_first == 16'(s) || dp_loc_first == 16'(s + 1)),
                 $sformatf("DP fault in slice %0d, first wrong SLICE %0d", s, dp_loc_first));
        if (dp_loc_found && (dp_loc_first == 16'(s) || dp_loc_first == 16'(s + 1))) mech[M_LOC_DP]++;
      end
    end

    // ---------------- RAM faults: local ORA points at the pair
    for (int k = 0; k < 3; k++) begin
      int r;
      r = $urandom % (2 * N_RAM_GROUP);
      c = mk(MODE_RAM); c.ram_mode = ram_mode_e'(k);
      run(c, '{en: 1'b1, unit: 16'(r), sub: 3'd0, idx: 6'($urandom % 32), value: 1'(k % 2)}, cyc);
      check(fail && !status_done && ram_ora_q == N_RAM_GROUP'(1 << (r / 2)),
            $sformatf("RAM %0d fault, ORA flags %b", r, ram_ora_q));
      if (ram_ora_q == N_RAM_GROUP'(1 << (r / 2))) mech[M_LOC_RAM]++;
    end

    // ---------------- shift-register faults: located from the read-back
    for (int k = 0; k < 4; k++) begin
      int s, b, len, fpos, ringb;
      len = (k % 2) ? 16 : 32;
      s = $urandom % N_SRL; b = $urandom % len; ringb = k / 2;
      fpos = s * len + b;
      c = mk(MODE_SRL); c.srl16 = 1'(k % 2);
      run(c, '{en: 1'b1, unit: 16'(ringb * 256 + s), sub: 3'd0, idx: 6'(b), value: 1'($urandom)}, cyc);
      check(fail && !status_done, $sformatf("SRL fault %0d detected", k));
      if (ringb == 1)
        check(srl_loc_found_b && (srl_loc_cell_b == 16'(fpos) ||
              srl_loc_cell_b == 16'((fpos + N_SRL * len - 1) % (N_SRL * len))),
              $sformatf("SRL fault at %0d located at %0d", fpos, srl_loc_cell_b));
      else
        check(srl_loc_found_a && (srl_loc_cell_a == 16'(fpos) ||
              srl_loc_cell_a == 16'((fpos + N_SRL * len - 1) % (N_SRL * len))),
              $sformatf("SRL fault at %0d located at %0d", fpos, srl_loc_cell_a));
      if ((ringb == 1 && srl_loc_found_b) || (ringb == 0 && srl_loc_found_a)) mech[M_LOC_SRL]++;
    end

    for (int i = 0; i < M_COUNT; i++) begin
      mech_e m;
      m = mech_e'(i);
      $display("mechanism %s: %0d", m.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
