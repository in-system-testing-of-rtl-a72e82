// tb_ila_fault_locator: builds read-back patterns by hand. Fault-free
// patterns give no fault; one wrong bit in unit u points at u; several wrong
// bits in unit u (and all later units) point at u - 1, or at the array
// input when u = 0. Both functions are used.
module tb_ila_fault_locator;
  localparam int N = 8;
  logic [N-1:0][5:0] ff;
  logic [5:0] vec;
  logic complement, found, in_pred, at_input;
  logic [15:0] first_unit, n_wrong, fault_unit;
  int checks = 0, failures = 0;

  ila_fault_locator #(.N_UNIT(N), .W(6)) dut (.ff, .vec, .complement, .found, .first_unit, .n_wrong,
                                              .in_pred, .at_input, .fault_unit);

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

  function automatic logic [5:0] good(int i);
    return vec ^ {6{complement && (i % 2 == 0)}};
  endfunction

  initial begin
    for (int t = 0; t < 60; t++) begin
      int u, nb;
      logic [5:0] err;
      vec = 6'($urandom); complement = 1'($urandom);
      for (int i = 0; i < N; i++) ff[i] = good(i);
      #1 check(!found, "fault-free");
      u = $urandom % N;
      nb = (t % 2) ? 1 : 2 + $urandom % 3;
      err = '0;
      for (int k = 0; k < nb; k++) err[k] = 1'b1;
      err = (err << ($urandom % (7 - nb))) & 6'h3F;
      for (int i = u; i < N; i++) ff[i] = good(i) ^ err;
      #1;
      check(found && first_unit == 16'(u) && n_wrong == 16'(nb), $sformatf("first unit t=%0d", t));
      if (nb == 1) check(!in_pred && fault_unit == 16'(u), "single bit: this unit");
      else if (u == 0) check(in_pred && at_input, "several bits in unit 0: input");
      else check(in_pred && !at_input && fault_unit == 16'(u - 1), "several bits: predecessor");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
