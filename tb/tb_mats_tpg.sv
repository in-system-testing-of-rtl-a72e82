// tb_mats_tpg: the generator's operations are recorded and compared with the
// MATS sequence built independently here: w0 over all words, then (r0, w1)
// per word, then r1 over all words; 4 x WORDS cycles, then `done`. A pause of
// CE must not lose an operation.
module tb_mats_tpg;
  import bist_pkg::*;
  logic clk = 0, rst, ce;
  ram_mode_e mode;
  logic we, rd, done;
  logic [5:0] wa;
  logic [4:0] ra;
  logic [1:0] di, exp_d;
  int checks = 0, failures = 0;

  mats_tpg dut (.clk, .rst, .ce, .mode, .we, .wa, .ra, .di, .rd, .exp(exp_d), .done);

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
    for (int m = 0; m < 3; m++) begin
      int words, n, cyc;
      // expected operations: {is_write, addr, data}
      logic [8:0] expq [$];
      mode = ram_mode_e'(m);
      words = (mode == RAM_64X1_SP) ? 64 : 32;
      expq = {};
      for (int a = 0; a < words; a++) expq.push_back({1'b1, 6'(a), 2'b00});
      for (int a = 0; a < words; a++) begin
        expq.push_back({1'b0, 6'(a), 2'b00});
        expq.push_back({1'b1, 6'(a), 2'b11});
      end
      for (int a = 0; a < words; a++)
        expq.push_back({1'b0, 6'(a), (mode == RAM_64X1_SP) ? 2'b01 : 2'b11});
      rst = 1; ce = 0;
      @(posedge clk); #1 rst = 0;
      n = 0; cyc = 0;
      while (!done && cyc < 1000) begin
        ce = !(cyc % 17 == 5);  // occasional pause
        #1;
        if (ce) begin
          logic [8:0] got;
          got = {we, wa, we ? di : exp_d};
          check(we ^ rd, "one operation per enabled cycle");
          check(n < expq.size() && got == expq[n], $sformatf("op %0d m=%0d got %h", n, m, got));
          check(ra == wa[4:0], "read address follows");
          n++;
        end else begin
          check(!we && !rd, "idle while paused");
        end
        @(posedge clk); #1;
        cyc++;
      end
      check(n == 4 * words, $sformatf("operation count %0d", n));
      check(done, "done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
