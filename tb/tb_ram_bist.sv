// tb_ram_bist: three groups. Fault-free, each RAM mode must finish in
// 4 x WORDS cycles with no local ORA set. With a stuck cell in RAM 3
// (group 1), only group 1's local ORA may be set.
module tb_ram_bist;
  import bist_pkg::*;
  localparam int G = 3;
  logic clk = 0, rst, ce;
  ram_mode_e mode;
  fault_t fault;
  logic [G-1:0] ora_q;
  logic fail, done;
  int checks = 0, failures = 0;

  ram_bist #(.N_GROUP(G)) dut (.clk, .rst, .ce, .mode, .fault, .ora_q, .fail, .done);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(output int cycles);
    rst = 1; ce = 0;
    @(posedge clk); #1 rst = 0; ce = 1;
    cycles = 0;
    while (!done && cycles < 1000) begin @(posedge clk); #1 cycles++; end
    @(posedge clk); #1;
  endtask

  initial begin
    int cyc;
    fault = '0;
    for (int m = 0; m < 3; m++) begin
      mode = ram_mode_e'(m);
      run(cyc);
      check(cyc == 4 * ((mode == RAM_64X1_SP) ? 64 : 32), $sformatf("mode %0d cycles %0d", m, cyc));
      check(!fail && ora_q == 0, "fault-free pass");
    end
    for (int m = 0; m < 3; m++) begin
      mode = ram_mode_e'(m);
      fault = '{en: 1'b1, unit: 16'd3, sub: 3'd0, idx: 6'd17, value: 1'(m % 2)};
      run(cyc);
      check(fail && ora_q == 3'b010, $sformatf("mode %0d fault located ora=%b", m, ora_q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
