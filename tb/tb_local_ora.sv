// tb_local_ora: equal inputs keep the flag low, a difference while enabled
// sets it for good, a difference while disabled is ignored.
module tb_local_ora;
  logic clk = 0, rst, en;
  logic [1:0] a, b;
  logic fail;
  int checks = 0, failures = 0;

  local_ora #(.WIDTH(2)) dut (.clk, .rst, .en, .a, .b, .fail);

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
    rst = 1; en = 0; a = 0; b = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 50; i++) begin
      a = 2'($urandom); b = a; en = 1'($urandom);
      @(posedge clk); #1 check(!fail, "equal inputs");
    end
    a = 2'b01; b = 2'b11; en = 0;
    @(posedge clk); #1 check(!fail, "disabled compare");
    en = 1;
    @(posedge clk); #1 check(fail, "difference registered");
    b = a;
    repeat (3) @(posedge clk);
    #1 check(fail, "sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
