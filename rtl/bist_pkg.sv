// bist_pkg: types, constants and configuration generators shared by the CLB
// built-in self-test (BIST) of a 7-series-style FPGA fabric model.
//
// The BIST tests the configurable logic blocks (CLBs) of an FPGA by loading
// a series of test configurations. Each configuration belongs to one of four
// families: LUT memory testing, SLICE data-path testing, LUT-RAM testing and
// shift-register testing. This package holds the descriptors of one such
// configuration (what the "bitstream" sets), the fault-injection descriptor
// used to emulate a corrupted configuration bit or a stuck-at net, and the
// functions that compute LUT contents for each configuration.
//
// Following the source design: BUTs of six LUTs, identity and complement
// functions, six rotations of the LUTs in a BUT (12 LUT configurations), the
// 13 data-path rows with their multiplexer settings and inter-SLICE
// connectivity, three RAM modes and two shift-register modes.
// This model's own choices: the numbering of the multiplexer inputs that are
// not printed by name, the value chosen for a multiplexer the row leaves
// unused, and the LUT contents of each data-path row (computed here so that
// every SLICE passes its input to its output).
package bist_pkg;

  localparam int unsigned LUT_IN       = 6;  // LUT address width
  localparam int unsigned LUTS_PER_BUT = 6;  // LUTs grouped into one LUT BUT
  localparam int unsigned CIRCUITS     = 4;  // logic circuits A..D per SLICE
  localparam int unsigned DP_ROWS      = 13; // data-path configurations
  localparam int unsigned LUT_CONFIGS  = 12; // 6 rotations x {identity, complement}

  // Which family of test configuration is loaded.
  typedef enum logic [1:0] {
    MODE_LUT = 2'd0,
    MODE_DP  = 2'd1,
    MODE_RAM = 2'd2,
    MODE_SRL = 2'd3
  } test_mode_e;

  // Function implemented by every LUT BUT.
  typedef enum logic {
    FN_IDENTITY   = 1'b0,
    FN_COMPLEMENT = 1'b1
  } lut_fn_e;

  // LUT-RAM modes.
  typedef enum logic [1:0] {
    RAM_32X2_DP = 2'd0,
    RAM_32X2_SP = 2'd1,
    RAM_64X1_SP = 2'd2
  } ram_mode_e;

  // Connectivity between successive SLICEs (Table I, last column).
  typedef enum logic [1:0] {
    LINK_LUT   = 2'd0, // {DO..AO} -> A/B LUT address, {DF..AF} -> C/D LUT address
    LINK_O_AX  = 2'd1, // {DO..AO} -> {DX..AX}
    LINK_F_AX  = 2'd2, // {DF..AF} -> {DX..AX}
    LINK_CARRY = 2'd3  // COUT -> CIN
  } dp_link_e;

  // Fault sites inside one data-path logic circuit.
  typedef enum logic [2:0] {
    SITE_O6   = 3'd0,
    SITE_O5   = 3'd1,
    SITE_XOR  = 3'd2,
    SITE_CY   = 3'd3,
    SITE_F7   = 3'd4,
    SITE_OUT  = 3'd5, // OUT-MUX output (AO)
    SITE_FFD  = 3'd6, // FF-MUX output (D of FFQ)
    SITE_5FFD = 3'd7  // M5-MUX output (D of 5FF)
  } dp_site_e;

  // Emulated permanent fault. unit/sub/idx are interpreted by the structure
  // that is tested:
  //   LUT ILA : unit = BUT, sub = LUT in the BUT, idx = LUT memory location
  //   data path: unit = SLICE, sub = circuit (0=A..3=D), idx = dp_site_e
  //   RAM      : unit = RAM instance, idx = memory bit
  //   SRL      : unit = ring (0/1) * 256 + LUT in ring, idx = bit of the SRL
  typedef struct packed {
    logic        en;
    logic [15:0] unit;
    logic [2:0]  sub;
    logic [5:0]  idx;
    logic        value;   // stuck-at value
  } fault_t;

  localparam fault_t NO_FAULT = '0;

  // Settings of one data-path configuration (one row of Table I).
  typedef struct packed {
    logic                   clk_inv;  // CLK-MUX: 0 = CLK, 1 = inverted CLK
    logic [2:0]             out_sel;  // OUT-MUX input
    logic [2:0]             ff_sel;   // FF-MUX input
    logic                   m1;       // M1-MUX (carry DI): 0 = AX, 1 = O5
    logic                   m5;       // M5-MUX (5FF D):    0 = O5, 1 = AX
    logic                   cin_sel;  // CIN-MUX: 0 = PRE-MUX, 1 = carry chain
    logic [1:0]             pre_sel;  // PRE-MUX: 0 = AX, 1 = const 0, 2 = const 1
    dp_link_e               link;     // inter-SLICE connectivity
    logic                   x_tie;    // AX..DX tied to a constant
    logic                   x_val;    // value of the tie
    logic [CIRCUITS-1:0][63:0] init;  // LUT contents of circuits A..D
  } dp_cfg_t;

  // Complete description of the loaded test configuration.
  typedef struct packed {
    test_mode_e  mode;
    lut_fn_e     lut_fn;     // LUT family: identity or complement
    logic [2:0]  lut_rot;    // LUT family: rotation 0..5 of the LUTs in a BUT
    logic [3:0]  dp_row;     // data-path family: Table I row 1..13
    ram_mode_e   ram_mode;   // RAM family
    logic        srl16;      // SRL family: 0 = 32-bit, 1 = 16-bit
  } bist_cfg_t;

  // ---------------------------------------------------------------------
  // LUT family: contents of a LUT that drives bit `out_bit` of the BUT
  // output bus. Location a holds a[out_bit] (identity) or its complement.
  function automatic logic [63:0] ila_lut_init(int unsigned out_bit, lut_fn_e fn);
    logic [63:0] v;
    for (int unsigned a = 0; a < 64; a++) begin
      v[a] = a[out_bit] ^ (fn == FN_COMPLEMENT);
    end
    return v;
  endfunction

  // Physical LUT j of a BUT implements output bit (j + rot) mod 6.
  function automatic int unsigned lut_bit_of(int unsigned j, int unsigned rot);
    return (j + rot) % LUTS_PER_BUT;
  endfunction

  // Inverse: the physical LUT that drives output bit k under rotation rot.
  function automatic int unsigned lut_of_bit(int unsigned k, int unsigned rot);
    return (k + LUTS_PER_BUT - (rot % LUTS_PER_BUT)) % LUTS_PER_BUT;
  endfunction

  // ---------------------------------------------------------------------
  // Data-path family. A data-path LUT uses both outputs: address pin A6 is
  // tied to 1, so O6 reads INIT[63:32] and O5 reads INIT[31:0], each at
  // address A[4:0]. Each output is given as one of these kinds of function of
  // the address.
  typedef enum logic [1:0] {
    LF_ZERO = 2'd0,
    LF_ONE  = 2'd1,
    LF_BIT  = 2'd2,  // A[bit]
    LF_NBIT = 2'd3   // ~A[bit]
  } lf_kind_e;

  function automatic logic lf_eval(lf_kind_e k, int unsigned b, logic [4:0] a);
    case (k)
      LF_ZERO: return 1'b0;
      LF_ONE:  return 1'b1;
      LF_BIT:  return a[b];
      default: return ~a[b];
    endcase
  endfunction

  function automatic logic [63:0] dp_lut_init(lf_kind_e k6, int unsigned b6,
                                              lf_kind_e k5, int unsigned b5);
    logic [63:0] v;
    for (int unsigned a = 0; a < 32; a++) begin
      v[32 + a] = lf_eval(k6, b6, a[4:0]);
      v[a]      = lf_eval(k5, b5, a[4:0]);
    end
    return v;
  endfunction

  // Settings of Table I row `row` (1..13). Entries the table marks as
  // unused get the value that keeps the SLICE an identity function.
  function automatic dp_cfg_t dp_row_cfg(int unsigned row);
    dp_cfg_t c;
    lf_kind_e k6, k5;
    c = '0;
    c.pre_sel = 2'd1;
    k6 = LF_BIT;
    k5 = LF_BIT;
    case (row)
      1:  begin c.out_sel = 3'd0; c.ff_sel = 3'd0; c.link = LINK_LUT; c.x_tie = 1'b1; end
      2:  begin c.clk_inv = 1'b1; c.out_sel = 3'd1; c.ff_sel = 3'd1; c.m1 = 1'b1;
                k6 = LF_ZERO; c.link = LINK_LUT; c.x_tie = 1'b1; end
      3:  begin c.out_sel = 3'd4; c.ff_sel = 3'd4; c.m1 = 1'b1;
                k6 = LF_ZERO; c.link = LINK_LUT; c.x_tie = 1'b1; end
      4:  begin c.clk_inv = 1'b1; c.out_sel = 3'd4; c.ff_sel = 3'd4; c.m1 = 1'b0;
                c.cin_sel = 1'b0; c.pre_sel = 2'd2; k6 = LF_BIT;
                c.link = LINK_LUT; c.x_tie = 1'b1; end
      5:  begin c.out_sel = 3'd4; c.ff_sel = 3'd4; c.m1 = 1'b1;
                c.cin_sel = 1'b0; c.pre_sel = 2'd1; k6 = LF_NBIT;
                c.link = LINK_LUT; c.x_tie = 1'b1; end
      6:  begin c.clk_inv = 1'b1; c.out_sel = 3'd5; c.ff_sel = 3'd2; c.m5 = 1'b1;
                c.link = LINK_O_AX; end
      7:  begin c.out_sel = 3'd2; c.ff_sel = 3'd3; c.m1 = 1'b0; c.cin_sel = 1'b0;
                c.pre_sel = 2'd0; k6 = LF_ZERO; c.link = LINK_O_AX; end
      8:  begin c.clk_inv = 1'b1; c.out_sel = 3'd2; c.ff_sel = 3'd3; c.m1 = 1'b0;
                c.cin_sel = 1'b0; c.pre_sel = 2'd0; k6 = LF_ZERO; c.link = LINK_F_AX; end
      9:  begin c.out_sel = 3'd5; c.ff_sel = 3'd1; c.m5 = 1'b0; c.link = LINK_O_AX; end
      10: begin c.out_sel = 3'd5; c.ff_sel = 3'd2; c.m5 = 1'b1; c.link = LINK_F_AX; end
      11: begin c.out_sel = 3'd4; c.ff_sel = 3'd4; c.m1 = 1'b1; c.cin_sel = 1'b1;
                k6 = LF_ONE; c.link = LINK_CARRY; c.x_tie = 1'b1; end
      12: begin c.out_sel = 3'd3; c.ff_sel = 3'd5; c.link = LINK_LUT;
                c.x_tie = 1'b1; c.x_val = 1'b0; end
      default: begin // row 13
                c.clk_inv = 1'b1; c.out_sel = 3'd3; c.ff_sel = 3'd5; c.link = LINK_LUT;
                c.x_tie = 1'b1; c.x_val = 1'b1; end
    endcase
    for (int unsigned k = 0; k < CIRCUITS; k++) begin
      // With LUT connectivity circuit k carries address bit k; otherwise the
      // circuit's own X input is on address bit 0.
      int unsigned b;
      b = (c.link == LINK_LUT) ? k : 0;
      // Row 13 selects the neighbour's O6 through the wide mux, so each LUT
      // computes its neighbour's bit.
      if (row == 13) c.init[k] = dp_lut_init(k6, k ^ 1, k5, b);
      else           c.init[k] = dp_lut_init(k6, b, k5, b);
    end
    return c;
  endfunction

  // Width of the vector a data-path row carries between SLICEs.
  function automatic int unsigned dp_link_width(dp_link_e l);
    return (l == LINK_CARRY) ? 1 : CIRCUITS;
  endfunction

endpackage
