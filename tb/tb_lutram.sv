// tb_lutram: random writes and reads in each of the three RAM modes, checked
// against a reference memory kept by the testbench; then a stuck cell must
// read as its stuck value.
module tb_lutram;
  import bist_pkg::*;
  logic clk = 0;
  ram_mode_e mode;
  fault_t fault;
  logic we;
  logic [5:0] wa;
  logic [4:0] ra;
  logic [1:0] di, dout;
  int checks = 0, failures = 0;

  lutram #(.INDEX(5)) dut (.clk, .mode, .fault, .we, .wa, .ra, .di, .dout);

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
    fault = '0; we = 0; wa = 0; ra = 0; di = 0;
    for (int m = 0; m < 3; m++) begin
      logic [1:0] ref_mem [64];
      int words;
      mode = ram_mode_e'(m);
      words = (mode == RAM_64X1_SP) ? 64 : 32;
      for (int i = 0; i < words; i++) begin
        @(negedge clk); we = 1; wa = 6'(i); di = 2'($urandom);
        if (mode == RAM_64X1_SP) di[1] = 0;
        ref_mem[i] = di;
        @(posedge clk); #1 we = 0;
      end
      for (int k = 0; k < 200; k++) begin
        int w, r;
        @(negedge clk);
        w = $urandom % words; r = $urandom % words;
        wa = 6'(w); ra = 5'(r);
        we = ($urandom % 3 == 0); di = 2'($urandom);
        if (mode == RAM_64X1_SP) di[1] = 0;
        #1;
        if (mode == RAM_32X2_DP) check(dout == ref_mem[r], $sformatf("dp read m=%0d", m));
        else                     check(dout == ref_mem[w], $sformatf("sp read m=%0d", m));
        if (we) ref_mem[w] = di;
        @(posedge clk); #1;
        we = 0;
      end
    end
    // stuck-at-1 in cell 40 (32x2 SP: bit 1 of word 8)
    mode = RAM_32X2_SP;
    @(negedge clk); we = 1; wa = 6'd8; di = 2'b00;
    @(posedge clk); #1 we = 0;
    fault = '{en: 1'b1, unit: 16'd5, sub: 3'd0, idx: 6'd40, value: 1'b1};
    #1 check(dout == 2'b10, "stuck cell reads 1");
    fault.unit = 16'd6;
    #1 check(dout == 2'b00, "other RAM's fault ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
