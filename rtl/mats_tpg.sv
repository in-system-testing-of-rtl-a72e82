// mats_tpg: test pattern generator for the LUT-RAMs, running the MATS march
// test (Modified Algorithmic Test Sequence).
//
// MATS = { any(w0); any(r0, w1); any(r1) }: write 0 to every word, then for
// every word read (expect 0) and write 1, then read every word (expect 1).
// Addresses run upwards. Each read and each write takes one clock, so one run
// lasts 4 x WORDS cycles; WORDS is 64 in the 64x1 mode and 32 in the 32x2
// modes. The generator drives the write address, the read address (equal to
// it, for the dual-port mode), the data and the write enable; `rd` marks the
// read cycles, when the RAM outputs are compared; `exp` is the value a
// fault-free RAM returns then. `done` rises after the last read and stays
// high. The sequence pauses while `ce` is low.
// Running MATS from distributed generators built in SLICEs follows the source
// design; the cycle-level sequencing is this model's own.
module mats_tpg
  import bist_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  ram_mode_e  mode,
  output logic       we,
  output logic [5:0] wa,
  output logic [4:0] ra,
  output logic [1:0] di,
  output logic       rd,
  output logic [1:0] exp,
  output logic       done
);
  typedef enum logic [2:0] {
    S_W0   = 3'd0,
    S_R0   = 3'd1,
    S_W1   = 3'd2,
    S_R1   = 3'd3,
    S_DONE = 3'd4
  } state_e;

  state_e     state;
  logic [5:0] addr;
  logic       last_addr;

  assign last_addr = (mode == RAM_64X1_SP) ? (addr == 6'd63) : (addr == 6'd31);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_W0;
      addr  <= '0;
    end else if (ce) begin
      case (state)
        S_W0: begin
          addr <= last_addr ? '0 : addr + 1'b1;
          if (last_addr) state <= S_R0;
        end
        S_R0: state <= S_W1;
        S_W1: begin
          addr  <= last_addr ? '0 : addr + 1'b1;
          state <= last_addr ? S_R1 : S_R0;
        end
        S_R1: begin
          addr <= last_addr ? '0 : addr + 1'b1;
          if (last_addr) state <= S_DONE;
        end
        default: state <= S_DONE;
      endcase
    end
  end

  always_comb begin
    wa   = addr;
    ra   = addr[4:0];
    we   = ce && (state == S_W0 || state == S_W1);
    di   = (state == S_W1) ? 2'b11 : 2'b00;
    rd   = ce && (state == S_R0 || state == S_R1);
    exp  = (state == S_R1) ? ((mode == RAM_64X1_SP) ? 2'b01 : 2'b11) : 2'b00;
    done = (state == S_DONE);
  end
endmodule
