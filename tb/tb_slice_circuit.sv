// tb_slice_circuit: drives one logic circuit with random multiplexer
// settings, LUT contents and inputs and compares AO, the carry output and the
// flip-flop contents with a reference written from the multiplexer tables.
// Both clock polarities are covered, and a stuck OUT-MUX output is injected.
module tb_slice_circuit;
  import bist_pkg::*;
  logic clk = 0, rst, ce;
  dp_cfg_t cfg;
  fault_t fault;
  logic [5:0] a;
  logic x, chain_in, nb_o6;
  logic o6, cy, o, q, q5;
  int checks = 0, failures = 0;

  slice_circuit #(.SLICE(1), .CIRCUIT(2)) dut (.clk, .rst, .ce, .cfg, .fault, .a, .x, .chain_in, .nb_o6,
                                               .o6, .cy, .o, .q, .q5);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Reference of the combinational part.
  logic r6, r5, rci, rcy, rxor, rf7, ro, rd, rd5;
  always_comb begin
    logic [63:0] t;
    t   = cfg.init[2];
    r6  = t[a];
    r5  = t[{1'b0, a[4:0]}];
    rci = cfg.cin_sel ? chain_in : (cfg.pre_sel == 0 ? x : cfg.pre_sel == 1 ? 1'b0 : 1'b1);
    rcy = r6 ? rci : (cfg.m1 ? r5 : x);
    rxor = r6 ^ rci;
    rf7 = x ? nb_o6 : r6;
    ro  = cfg.out_sel == 0 ? r6 : cfg.out_sel == 1 ? r5 : cfg.out_sel == 2 ? rxor :
          cfg.out_sel == 3 ? rf7 : cfg.out_sel == 4 ? rcy : q5;
    rd  = cfg.ff_sel == 0 ? r6 : cfg.ff_sel == 1 ? r5 : cfg.ff_sel == 2 ? x :
          cfg.ff_sel == 3 ? rxor : cfg.ff_sel == 4 ? rcy : rf7;
    rd5 = cfg.m5 ? x : r5;
  end

  initial begin
    fault = '0; ce = 1; rst = 1; cfg = '0; a = 0; x = 0; chain_in = 0; nb_o6 = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 400; i++) begin
      logic ed, ed5;
      cfg = dp_row_cfg(1 + (i % 13));
      if (i >= 200) begin
        cfg.out_sel = 3'($urandom % 6); cfg.ff_sel = 3'($urandom % 6);
        cfg.m1 = 1'($urandom); cfg.m5 = 1'($urandom); cfg.cin_sel = 1'($urandom);
        cfg.pre_sel = 2'($urandom % 3);
        cfg.init[2] = {$urandom, $urandom};
      end
      a = 6'($urandom); x = 1'($urandom); chain_in = 1'($urandom); nb_o6 = 1'($urandom);
      #1;
      check(o6 == r6 && cy == rcy && o == ro, $sformatf("comb i=%0d", i));
      ed = rd; ed5 = rd5;
      // capture on the selected clock edge
      if (cfg.clk_inv) @(negedge clk); else @(posedge clk);
      #1;
      check(q == ed && q5 == ed5, $sformatf("ff i=%0d inv=%0d", i, cfg.clk_inv));
    end
    // stuck-at on AO
    cfg = dp_row_cfg(1);
    fault = '{en: 1'b1, unit: 16'd1, sub: 3'd2, idx: 6'(SITE_OUT), value: 1'b1};
    a = 6'b100000; #1;
    check(o == 1'b1 && o6 == 1'b0, "stuck AO");
    fault.sub = 3'd1; #1;
    check(o == 1'b0, "fault on another circuit ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
