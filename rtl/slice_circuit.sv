// slice_circuit: one of the four identical logic circuits (A, B, C, D) of a
// SLICE, as used by the data-path test configurations.
//
// Contents: a 6-input LUT (O6, O5); the carry element (carry multiplexer
// selected by O6 between the carry-in and the DI input chosen by M1-MUX, and
// the XOR of O6 with the carry-in); the carry-in chosen by CIN-MUX between the
// PRE-MUX (AX or a constant) and the carry chain; the wide multiplexer F7
// selected by AX between this circuit's O6 and the neighbouring circuit's O6;
// the 6-input OUT-MUX driving AO and the 6-input FF-MUX driving flip-flop
// FFQ (output AF); the 5FF flip-flop fed by M5-MUX; and CLK-MUX, which clocks
// both flip-flops on the rising or on the falling clock edge.
// Multiplexer numbering (inputs 0..5):
//   OUT-MUX: O6, O5, XOR, F7, CY, 5FF    FF-MUX: O6, O5, AX, XOR, CY, F7
//   M1-MUX:  AX, O5                      M5-MUX: O5, AX
//   PRE-MUX: AX, 0, 1                    CIN-MUX: PRE-MUX, carry chain
// The set of elements and the multiplexer names follow the source design's
// drawing of the circuit and its table of settings; which signal sits on
// which numbered input is this model's reading, chosen to agree with every
// row of that table. The flip-flops load every cycle while `ce` is high and
// clear on `rst`; set/reset options of the real flip-flops are not modelled.
// Fault injection: when fault.unit == SLICE and fault.sub == CIRCUIT, the
// net named by fault.idx (a dp_site_e) is stuck at fault.value.
module slice_circuit
  import bist_pkg::*;
#(
  parameter int unsigned SLICE   = 0,
  parameter int unsigned CIRCUIT = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  dp_cfg_t     cfg,
  input  fault_t      fault,
  input  logic [5:0]  a,        // LUT address
  input  logic        x,        // AX
  input  logic        chain_in, // carry from the previous circuit or CIN
  input  logic        nb_o6,    // O6 of the neighbouring circuit (wide mux)
  output logic        o6,
  output logic        cy,       // carry out, to the next circuit or COUT
  output logic        o,        // AO
  output logic        q,        // AF (FFQ)
  output logic        q5        // 5FF
);
  logic       hit;
  logic       o6_raw, o5_raw, o5;
  logic       carry_in, pre, di, xr, f7;
  logic       out_m, ffd, ffd5;
  logic       fclk;

  assign hit = fault.en && fault.unit == 16'(SLICE) && fault.sub == 3'(CIRCUIT);

  function automatic logic inj(logic v, logic h, logic [5:0] idx, dp_site_e s, logic sv);
    return (h && idx == 6'(s)) ? sv : v;
  endfunction

  lut6 u_lut (.init(cfg.init[CIRCUIT]), .a(a), .o6(o6_raw), .o5(o5_raw));

  always_comb begin
    o6 = inj(o6_raw, hit, fault.idx, SITE_O6, fault.value);
    o5 = inj(o5_raw, hit, fault.idx, SITE_O5, fault.value);

    case (cfg.pre_sel)
      2'd0:    pre = x;
      2'd1:    pre = 1'b0;
      default: pre = 1'b1;
    endcase
    carry_in = cfg.cin_sel ? chain_in : pre;
    di       = cfg.m1 ? o5 : x;
    cy       = inj(o6 ? carry_in : di, hit, fault.idx, SITE_CY, fault.value);
    xr       = inj(o6 ^ carry_in, hit, fault.idx, SITE_XOR, fault.value);
    f7       = inj(x ? nb_o6 : o6, hit, fault.idx, SITE_F7, fault.value);

    case (cfg.out_sel)
      3'd0:    out_m = o6;
      3'd1:    out_m = o5;
      3'd2:    out_m = xr;
      3'd3:    out_m = f7;
      3'd4:    out_m = cy;
      default: out_m = q5;
    endcase
    o = inj(out_m, hit, fault.idx, SITE_OUT, fault.value);

    case (cfg.ff_sel)
      3'd0:    ffd = o6;
      3'd1:    ffd = o5;
      3'd2:    ffd = x;
      3'd3:    ffd = xr;
      3'd4:    ffd = cy;
      default: ffd = f7;
    endcase
    ffd  = inj(ffd, hit, fault.idx, SITE_FFD, fault.value);
    ffd5 = inj(cfg.m5 ? x : o5, hit, fault.idx, SITE_5FFD, fault.value);
  end

  // CLK-MUX: clock or inverted clock.
  assign fclk = clk ^ cfg.clk_inv;

  always_ff @(posedge fclk) begin
    if (rst) begin
      q  <= 1'b0;
      q5 <= 1'b0;
    end else if (ce) begin
      q  <= ffd;
      q5 <= ffd5;
    end
  end
endmodule
