// tb_ila_ora: the ORA must flag a difference only on sampled cycles and only
// in masked bits, honour the complement input, and keep `fail` once set.
module tb_ila_ora;
  logic clk = 0, rst, sample, invert;
  logic [5:0] mask, tv, io;
  logic mismatch, fail;
  int checks = 0, failures = 0;

  ila_ora #(.WIDTH(6)) dut (.clk, .rst, .sample, .invert, .mask, .tpg_vec(tv), .ila_out(io), .mismatch, .fail);

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
    rst = 1; sample = 0; invert = 0; mask = '1; tv = 0; io = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 200; i++) begin
      logic [5:0] e;
      tv = 6'($urandom); invert = 1'($urandom); mask = 6'($urandom);
      e = tv ^ {6{invert}};
      io = ($urandom % 2) ? e : 6'($urandom);
      sample = 1; #1;
      check(mismatch == (((io ^ e) & mask) != 0), "mismatch value");
      sample = 0; #1;
      check(!mismatch, "no mismatch without sample");
    end
    check(!fail, "fail clear before any clocked mismatch");
    tv = 6'h15; io = 6'h15; invert = 0; mask = '1; sample = 1;
    @(posedge clk); #1 check(!fail, "match keeps fail low");
    io = 6'h14;
    @(posedge clk); #1 check(fail, "mismatch sets fail");
    io = 6'h15;
    @(posedge clk); #1 check(fail, "fail is sticky");
    tv = 6'h15; io = 6'h2A; invert = 1;
    rst = 1; @(posedge clk); #1 rst = 0;
    @(posedge clk); #1 check(!fail, "complement match");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
