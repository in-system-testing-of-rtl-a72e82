// tb_bist_controller: a passing run must end one cycle after seq_done with
// status_done = 1; a mismatch must drop the TPG enable in the same cycle and
// end the run with status_done = 0; nothing runs before start.
module tb_bist_controller;
  logic clk = 0, rst, start, mismatch, fail, seq_done;
  logic tpg_ce, running, finished, pass, fail_out, status_done;
  int checks = 0, failures = 0;

  bist_controller dut (.clk, .rst, .start, .mismatch, .fail, .seq_done, .tpg_ce, .running, .finished,
                       .pass, .fail_out, .status_done);

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
    rst = 1; start = 0; mismatch = 0; fail = 0; seq_done = 0;
    @(posedge clk); #1 rst = 0;
    repeat (3) @(posedge clk);
    #1 check(!running && !tpg_ce, "waits for start");
    start = 1;
    @(posedge clk); #1 check(running && tpg_ce, "running");
    repeat (10) begin @(posedge clk); #1 check(tpg_ce && !finished, "still running"); end
    seq_done = 1;
    @(posedge clk); #1 seq_done = 0;
    check(finished && pass && status_done && !fail_out && !tpg_ce, "pass result");
    // failing run
    rst = 1; @(posedge clk); #1 rst = 0;
    @(posedge clk); #1 check(running, "second run");
    repeat (4) @(posedge clk);
    #1 mismatch = 1;
    #1 check(!tpg_ce, "TPG stopped in the mismatch cycle");
    @(posedge clk); #1 mismatch = 0; fail = 1;
    #1;
    check(finished && !pass && fail_out && !status_done && !tpg_ce, $sformatf("fail result %b%b%b%b%b", finished, pass, fail_out, status_done, tpg_ce));
    repeat (3) @(posedge clk);
    #1 check(finished && !status_done, "result holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
