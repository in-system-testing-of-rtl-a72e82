// tb_ila_tpg: a 4-bit TPG holding each vector 3 cycles must step through all
// 16 vectors in 48 enabled cycles, raise `sample` in the last cycle of each
// hold and `last` only on the final vector, and freeze while CE is low.
module tb_ila_tpg;
  logic clk = 0, rst, ce;
  logic [3:0] vec;
  logic sample, last;
  int checks = 0, failures = 0;
  int cyc;

  ila_tpg #(.WIDTH(4), .HOLD(3)) dut (.clk, .rst, .ce, .vec, .sample, .last);

  always #5 clk = ~clk;

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
    rst = 1; ce = 0;
    @(posedge clk); #1 rst = 0; ce = 1;
    for (cyc = 0; cyc < 48; cyc++) begin
      check(vec == 4'(cyc / 3), $sformatf("vec at cycle %0d = %0d", cyc, vec));
      check(sample == (cyc % 3 == 2), "sample timing");
      check(last == (cyc == 47), "last timing");
      @(posedge clk); #1;
    end
    check(vec == 0, "wraps after 48 cycles");
    // freeze
    @(posedge clk); #1;
    ce = 0;
    begin
      logic [3:0] held;
      held = vec;
      repeat (5) @(posedge clk);
      #1 check(vec == held, "held while CE low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
