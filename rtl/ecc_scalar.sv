// ecc_scalar: main state machine of the IP.
//
// On start it runs, on ecc_curve, the curve-constant routine when the
// curve (p, a or b) was written since the last run (state CST), then the
// [k]P routine (state KP), and ends with a one-cycle done pulse and the
// infinity flag of the result. busy is high from start to done. The
// architecture gives this block the role of main state machine; the
// two-routine sequence and the skip of the constant routine are this
// design's choice.
module ecc_scalar
  import ecc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               curve_changed,   // p, a or b rewritten
  output logic               busy,
  output logic               done,
  output logic               inf,             // result is the point at infinity
  output logic               ev_cst_run,      // curve-constant routine started
  // ecc_curve
  output logic               crv_start,
  output logic [IRAM_AW-1:0] crv_entry,
  input  logic               crv_done,
  input  logic               crv_zflag
);
  typedef enum logic [1:0] {IDLE, CST, KP} state_e;
  state_e state;
  logic   cst_valid;   // constants computed for the current curve

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; cst_valid <= 1'b0; crv_start <= 1'b0; crv_entry <= '0;
      done <= 1'b0; inf <= 1'b0; ev_cst_run <= 1'b0;
    end else begin
      crv_start  <= 1'b0;
      done       <= 1'b0;
      ev_cst_run <= 1'b0;
      if (curve_changed) cst_valid <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          crv_start <= 1'b1;
          if (!cst_valid || curve_changed) begin
            crv_entry <= ENTRY_CST; ev_cst_run <= 1'b1; state <= CST;
          end else begin
            crv_entry <= ENTRY_KP; state <= KP;
          end
        end
        CST: if (crv_done) begin
          cst_valid <= 1'b1;
          crv_start <= 1'b1; crv_entry <= ENTRY_KP; state <= KP;
        end
        KP: if (crv_done) begin
          done <= 1'b1; inf <= crv_zflag; state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
endmodule
