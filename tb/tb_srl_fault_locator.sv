// tb_srl_fault_locator: writes alternating ring contents by hand, then
// overwrites a run of cells from position f onwards with a constant (what a
// stuck cell at f leaves behind) and expects the locator to point at f, or
// at f - 1 when cell f - 1 already held the constant. Both ring lengths.
module tb_srl_fault_locator;
  localparam int N = 4;
  logic [N-1:0][31:0] bits;
  logic mode16, found;
  logic [15:0] run_cell, srl_idx;
  int checks = 0, failures = 0;

  srl_fault_locator #(.N_SRL(N)) dut (.bits, .mode16, .found, .run_cell, .srl_idx);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 80; t++) begin
      int len, l, f, runl, ph, expect_cell;
      logic v;
      mode16 = 1'(t % 2);
      len = mode16 ? 16 : 32; l = N * len;
      ph = $urandom % 2;
      bits = '0;
      for (int p = 0; p < l; p++) bits[p / len][p % len] = 1'((p + ph) % 2);
      #1 check(!found, "alternating ring: nothing found");
      f = $urandom % l; v = 1'($urandom); runl = 2 + $urandom % (l / 2);
      for (int k = 0; k < runl; k++) bits[((f + k) % l) / len][((f + k) % l) % len] = v;
      expect_cell = (1'((f - 1 + l + ph) % 2) == v) ? (f + l - 1) % l : f;
      #1;
      check(found && run_cell == 16'(expect_cell), $sformatf("t=%0d f=%0d got %0d", t, f, run_cell));
      check(srl_idx == 16'(expect_cell / len), "SRL index");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
