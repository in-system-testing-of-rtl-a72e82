// tb_srl_bist: two rings of three SRLs. Fault-free in both lengths, the run
// must end after 2 x 32 x 3 cycles with no mismatch, and the rings must still
// alternate. With a stuck cell in ring B the XOR must report a mismatch
// within one revolution.
module tb_srl_bist;
  import bist_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst, ce, mode16;
  fault_t fault;
  logic [N-1:0][31:0] ba, bb;
  logic mismatch, fail, done;
  int checks = 0, failures = 0;

  srl_bist #(.N_SRL(N)) dut (.clk, .rst, .ce, .mode16, .fault, .bits_a(ba), .bits_b(bb), .mismatch, .fail, .done);

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
      int cyc;
      mode16 = 1'(m);
      rst = 1; ce = 0;
      @(posedge clk); #1 rst = 0; ce = 1;
      cyc = 0;
      while (!done && cyc < 1000) begin @(posedge clk); #1 cyc++; end
      check(cyc == 2 * 32 * N, $sformatf("run length %0d", cyc));
      check(!fail, "fault-free");
      for (int i = 0; i < N; i++)
        check((m ? ba[i][15:0] : ba[i]) == (m ? {8{2'b01}} : {16{2'b01}}) ||
              (m ? ba[i][15:0] : ba[i]) == (m ? {8{2'b10}} : {16{2'b10}}), "still alternating");
    end
    mode16 = 0;
    fault = '{en: 1'b1, unit: 16'd257, sub: 3'd0, idx: 6'd9, value: 1'b0};
    rst = 1; ce = 0;
    @(posedge clk); #1 rst = 0; ce = 1;
    begin
      int cyc;
      cyc = 0;
      while (!mismatch && cyc < 1000) begin @(posedge clk); #1 cyc++; end
      check(mismatch && cyc <= 32 * N, $sformatf("stuck cell seen after %0d cycles", cyc));
      @(posedge clk); #1 check(fail, "fail registered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
