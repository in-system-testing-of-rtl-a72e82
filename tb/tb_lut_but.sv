// tb_lut_but: checks one LUT BUT for both functions and all six rotations:
// the output bus must be the address (or its complement) for all 64
// addresses, and each flip-flop must hold the bit its LUT computes. Then a
// stuck LUT cell is injected and the output must differ exactly at that
// address, in the bit that LUT computes.
module tb_lut_but;
  import bist_pkg::*;
  logic clk = 0, rst;
  lut_fn_e fn;
  logic [2:0] rot;
  fault_t fault;
  logic [5:0] a, y, ff_q;
  int checks = 0, failures = 0;

  lut_but #(.INDEX(3)) dut (.clk, .rst, .fn, .rot, .fault, .a, .y, .ff_q);

  always #5 clk = ~clk;

  initial begin
    #200000;
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
    rst = 1; fn = FN_IDENTITY; rot = 0; a = 0;
    @(posedge clk); #1 rst = 0;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < 6; r++) begin
        fn = f ? FN_COMPLEMENT : FN_IDENTITY; rot = 3'(r);
        for (int i = 0; i < 64; i++) begin
          a = 6'(i);
          @(posedge clk); #1;
          check(y == (6'(i) ^ {6{f == 1}}), $sformatf("y f=%0d r=%0d a=%0d y=%h", f, r, i, y));
          for (int j = 0; j < 6; j++)
            check(ff_q[j] == (((i >> ((j + r) % 6)) & 1) ^ f), $sformatf("ff j=%0d r=%0d", j, r));
        end
      end
    end
    // stuck-at-1 in location 12 of LUT 2, identity, rotation 1: LUT 2 drives bit 3
    fn = FN_IDENTITY; rot = 3'd1;
    fault = '{en: 1'b1, unit: 16'd3, sub: 3'd2, idx: 6'd12, value: 1'b1};
    for (int i = 0; i < 64; i++) begin
      a = 6'(i); #1;
      if (i == 12) check(y == (6'd12 | 6'b001000), "fault visible at its address");
      else         check(y == 6'(i), "fault invisible elsewhere");
    end
    // a fault addressed to another BUT has no effect
    fault.unit = 16'd4;
    a = 6'd12; #1;
    check(y == 6'd12, "other BUT's fault ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
