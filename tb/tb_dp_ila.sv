// tb_dp_ila: an ILA of four SLICEs run through all 13 rows with every 4-bit
// vector held for six cycles; the last SLICE must return the vector on the
// linked buses. Then, for several rows, one stuck net in SLICE 1 must make
// some vector come out wrong.
module tb_dp_ila;
  import bist_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst;
  dp_cfg_t cfg;
  fault_t fault;
  logic [3:0] v, oo, oq;
  logic ocy;
  logic [N-1:0][3:0] q_all, q5_all;
  int checks = 0, failures = 0;

  dp_ila #(.N_SLICE(N)) dut (.clk, .rst, .ce(1'b1), .cfg, .fault, .tpg_vec(v), .out_o(oo), .out_q(oq),
                             .out_cy(ocy), .q_all, .q5_all);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic ok(dp_cfg_t c, logic [3:0] vv);
    case (c.link)
      LINK_LUT:  return oo == vv && oq == vv;
      LINK_O_AX: return oo == vv;
      LINK_F_AX: return oq == vv;
      default:   return ocy == vv[0];
    endcase
  endfunction

  initial begin
    fault = '0; rst = 1; cfg = dp_row_cfg(1); v = 0;
    @(posedge clk); #1 rst = 0;
    for (int row = 1; row <= 13; row++) begin
      cfg = dp_row_cfg(row);
      for (int i = 0; i < 16; i++) begin
        v = 4'(i);
        repeat (N + 2) @(posedge clk);
        #1 check(ok(cfg, v), $sformatf("row %0d v %0d o=%h q=%h", row, i, oo, oq));
      end
    end
    // faults: (row, site, value)
    for (int k = 0; k < 5; k++) begin
      int row; dp_site_e s; logic val; int bad;
      case (k)
        0: begin row = 1;  s = SITE_O6;   val = 1; end
        1: begin row = 3;  s = SITE_OUT;  val = 1; end
        2: begin row = 7;  s = SITE_XOR;  val = 0; end
        3: begin row = 6;  s = SITE_5FFD; val = 1; end
        default: begin row = 11; s = SITE_CY; val = 0; end
      endcase
      cfg = dp_row_cfg(row);
      fault = '{en: 1'b1, unit: 16'd1, sub: 3'd0, idx: 6'(s), value: val};
      bad = 0;
      for (int i = 0; i < 16; i++) begin
        v = 4'(i);
        repeat (N + 2) @(posedge clk);
        #1 if (!ok(cfg, v)) bad++;
      end
      check(bad > 0, $sformatf("fault %0d in row %0d detected", k, row));
      fault = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
