// tb_lut_ila: an ILA of five BUTs. Fault-free, the output must equal the
// input for the identity function and its complement for the complement
// function (odd length), for every rotation and vector. With a stuck LUT cell
// in BUT 2 the output must be wrong exactly for the vector addressing that
// cell, and BUTs 0..1 must hold correct flip-flops while BUT 2 holds a wrong
// one.
module tb_lut_ila;
  import bist_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst;
  lut_fn_e fn;
  logic [2:0] rot;
  fault_t fault;
  logic [5:0] v, out;
  logic [N-1:0][5:0] ff_q;
  int checks = 0, failures = 0;

  lut_ila #(.N_BUT(N)) dut (.clk, .rst, .fn, .rot, .fault, .tpg_vec(v), .ila_out(out), .ff_q);

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
    fault = '0; rst = 1; fn = FN_IDENTITY; rot = 0; v = 0;
    @(posedge clk); #1 rst = 0;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < 6; r++) begin
        fn = f ? FN_COMPLEMENT : FN_IDENTITY; rot = 3'(r);
        for (int i = 0; i < 64; i++) begin
          v = 6'(i); #1;
          check(out == (6'(i) ^ {6{f == 1}}), $sformatf("out f=%0d r=%0d v=%0d", f, r, i));
        end
      end
    // stuck-at-0 at location 63 of LUT 0 in BUT 2 (rotation 0: bit 0)
    fn = FN_IDENTITY; rot = 0;
    fault = '{en: 1'b1, unit: 16'd2, sub: 3'd0, idx: 6'd63, value: 1'b0};
    for (int i = 0; i < 64; i++) begin
      v = 6'(i); #1;
      check(out == ((i == 63) ? 6'd62 : 6'(i)), $sformatf("faulty out v=%0d out=%0d", i, out));
    end
    v = 6'd63;
    @(posedge clk); #1;
    check(ff_q[0] == 6'd63 && ff_q[1] == 6'd63, "BUTs before the fault hold the vector");
    check(ff_q[2] == 6'd62, "faulty BUT holds one wrong bit");
    check(ff_q[4] == 6'd62, "error propagates to the last BUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
