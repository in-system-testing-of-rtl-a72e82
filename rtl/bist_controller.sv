// bist_controller: runs one loaded test configuration and reports its result.
//
// After the configuration is loaded (reset released) and `start` is high the
// controller enables the test pattern generator. The TPG clock enable drops
// in the very cycle a mismatch is seen (`mismatch`, combinational), and stays
// low once the sticky `fail` is set, so the array is frozen in the failing
// state for read-back. The run ends when the sequence is complete
// (`seq_done`) or on a failure. Then `finished` rises and the result is
// written to the status bit: `status_done` goes to 1 for PASS and stays 0 for
// FAIL; `pass` and `fail_out` give the same result as separate signals.
// The clock is the one derived from the configuration logic; no user pin is
// used.
// Stopping the TPG through its clock enable and reporting through the DONE
// status bit follow the source design; the encoding PASS = 1 and the state
// machine are this model's own.
module bist_controller (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic mismatch,   // combinational compare result of this cycle
  input  logic fail,       // sticky ORA result
  input  logic seq_done,   // the sequence has applied its last pattern
  output logic tpg_ce,
  output logic running,
  output logic finished,
  output logic pass,
  output logic fail_out,
  output logic status_done
);
  typedef enum logic [1:0] {
    C_IDLE = 2'd0,
    C_RUN  = 2'd1,
    C_END  = 2'd2
  } cstate_e;

  cstate_e state;

  assign running  = (state == C_RUN);
  assign tpg_ce   = running && !mismatch && !fail;
  assign finished = (state == C_END);
  assign fail_out = finished && fail;
  assign pass     = finished && !fail;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= C_IDLE;
      status_done <= 1'b0;
    end else begin
      case (state)
        C_IDLE: if (start) state <= C_RUN;
        C_RUN: begin
          if (mismatch || fail) begin
            state <= C_END;
          end else if (seq_done) begin
            state       <= C_END;
            status_done <= 1'b1;
          end
        end
        default: state <= C_END;
      endcase
    end
  end
endmodule
