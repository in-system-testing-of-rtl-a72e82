// tb_slice_dp: for every Table I row, a SLICE fed with a vector on the inputs
// the row uses must, after two clocks, give that vector on the buses the row
// links to the next SLICE (the SLICE is an identity). For row 11 the carry
// chain must pass CIN to COUT.
module tb_slice_dp;
  import bist_pkg::*;
  logic clk = 0, rst;
  dp_cfg_t cfg;
  fault_t fault;
  logic [3:0] ab, cd, x, o, q, q5;
  logic cin, cout;
  int checks = 0, failures = 0;

  slice_dp #(.SLICE(0)) dut (.clk, .rst, .ce(1'b1), .cfg, .fault, .ab_addr(ab), .cd_addr(cd), .x, .cin,
                             .o, .q, .q5, .cout);

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

  initial begin
    fault = '0; rst = 1; cfg = dp_row_cfg(1); ab = 0; cd = 0; x = 0; cin = 0;
    @(posedge clk); #1 rst = 0;
    for (int row = 1; row <= 13; row++) begin
      cfg = dp_row_cfg(row);
      for (int v = 0; v < 16; v++) begin
        ab = 4'(v); cd = 4'(v); cin = v[0];
        x = (cfg.link inside {LINK_O_AX, LINK_F_AX}) ? 4'(v) : {4{cfg.x_val}};
        repeat (2) @(posedge clk);
        #1;
        case (cfg.link)
          LINK_LUT:  check(o == 4'(v) && q == 4'(v), $sformatf("row %0d v %0d o=%h q=%h", row, v, o, q));
          LINK_O_AX: check(o == 4'(v), $sformatf("row %0d v %0d o=%h", row, v, o));
          LINK_F_AX: check(q == 4'(v), $sformatf("row %0d v %0d q=%h", row, v, q));
          default:   check(cout == v[0], $sformatf("row %0d v %0d cout=%b", row, v, cout));
        endcase
      end
    end
    // stuck-at-0 carry output of circuit B in row 11 breaks the chain
    cfg = dp_row_cfg(11);
    fault = '{en: 1'b1, unit: 16'd0, sub: 3'd1, idx: 6'(SITE_CY), value: 1'b0};
    cin = 1; #1;
    check(cout == 1'b0, "stuck carry blocks the chain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
