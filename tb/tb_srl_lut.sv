// tb_srl_lut: random serial data through the shift register in both lengths,
// compared with a reference queue: the cascade output must be the input of
// 32 (or 16) enabled clocks before. Load and CE are checked, and a stuck cell.
module tb_srl_lut;
  import bist_pkg::*;
  logic clk = 0, ce, load, mode16, d, mc;
  logic [31:0] load_val, bits;
  fault_t fault;
  int checks = 0, failures = 0;

  srl_lut #(.INDEX(7)) dut (.clk, .ce, .load, .load_val, .mode16, .fault, .d, .mc, .bits);

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

  initial begin
    fault = '0;
    for (int m = 0; m < 2; m++) begin
      logic q [$];
      int len;
      mode16 = 1'(m); len = m ? 16 : 32;
      load_val = $urandom; load = 1; ce = 0; d = 0;
      @(posedge clk); #1 load = 0;
      check(bits == load_val, "load");
      q = {};
      for (int i = len - 1; i >= 0; i--) q.push_back(load_val[i]);
      for (int k = 0; k < 200; k++) begin
        d = 1'($urandom); ce = ($urandom % 4 != 0);
        #1 check(mc == q[0], $sformatf("mc m=%0d k=%0d", m, k));
        if (ce) begin void'(q.pop_front()); q.push_back(d); end
        @(posedge clk); #1;
      end
    end
    mode16 = 0; load_val = 32'h0; load = 1;
    @(posedge clk); #1 load = 0;
    fault = '{en: 1'b1, unit: 16'd7, sub: 3'd0, idx: 6'd31, value: 1'b1};
    #1 check(mc == 1'b1, "stuck last cell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
