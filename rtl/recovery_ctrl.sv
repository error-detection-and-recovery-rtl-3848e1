// recovery_ctrl: error recovery policy at commit, for the three techniques
// LDCR, LDAR and EDAR (selected at run time by mode).
//
// Every cycle the oldest instruction pair may be presented (cm_check) with
// the result of corroborating its original and replica results
// (cm_mismatch) and its PC. The controller answers with cm_ok (commit it) or
// starts a recovery:
//   LDCR  mismatch -> reload the checkpoint (RELOAD_CYCLES), re-execute.
//   LDAR  mismatch -> re-execute from this instruction and remember its PC;
//                     if the same instruction errs again the error is passive:
//                     correct from the checkpoint (FIX_CYCLES), re-execute.
//                     If it commits cleanly the error was active.
//   EDAR  mismatch -> the error is active (passive ones are caught eagerly):
//                     re-execute.
// Eagerly detected errors that local repair could not fix (eager_fail) stall
// the pipeline (state DRAIN) until the instruction that saw them is the
// oldest (drain_done); then the checkpoint is restored and execution
// restarts. A mismatch of an older instruction while draining squashes it
// and simply re-executes. A deadlock report (dl_detect) and an active error
// found before commit (reexec_req, e.g. load/store queue) re-execute.
// "Re-execute" is a one-cycle flush pulse; the caller restarts fetch at the
// oldest instruction. A checkpoint restore pulses restore_start and lasts at
// least the configured cycles and until restore_done has been seen.
// The statistics counters count each recovery kind.
module recovery_ctrl
  import stp_pkg::*;
#(
  parameter int PC_W          = 32,
  parameter int RELOAD_CYCLES = LDCR_RELOAD_CYCLES,
  parameter int FIX_CYCLES    = PASSIVE_FIX_CYCLES,
  parameter int STAT_W        = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  recov_mode_e       mode,
  input  logic              cm_check,
  input  logic              cm_mismatch,
  input  logic [PC_W-1:0]   cm_pc,
  input  logic              eager_fail,
  input  logic              drain_done,
  input  logic              dl_detect,
  input  logic              reexec_req,
  input  logic              restore_done,
  output logic              cm_ok,
  output logic              flush,
  output logic              restore_start,
  output logic              busy,
  output logic              draining,
  output logic [STAT_W-1:0] n_reexec,
  output logic [STAT_W-1:0] n_restore,
  output logic [STAT_W-1:0] n_passive,
  output logic [STAT_W-1:0] n_deadlock
);

  typedef enum logic [1:0] {S_IDLE, S_DRAIN, S_RESTORE, S_FLUSH} state_e;
  state_e state;

  localparam int TW = $clog2(RELOAD_CYCLES + 2);
  logic [TW-1:0]   timer, target;
  logic            rs_seen;
  logic            err_valid;
  logic [PC_W-1:0] err_pc;

  assign busy     = (state == S_RESTORE) || (state == S_FLUSH);
  assign draining = (state == S_DRAIN);
  assign cm_ok    = cm_check && !cm_mismatch && (state == S_IDLE || state == S_DRAIN)
                    && !dl_detect && !reexec_req;
  assign flush    = (state == S_FLUSH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      timer         <= '0;
      target        <= '0;
      rs_seen       <= 1'b0;
      restore_start <= 1'b0;
      err_valid     <= 1'b0;
      err_pc        <= '0;
      n_reexec      <= '0;
      n_restore     <= '0;
      n_passive     <= '0;
      n_deadlock    <= '0;
    end else begin
      restore_start <= 1'b0;
      case (state)
        S_IDLE, S_DRAIN: begin
          if (dl_detect) begin
            n_deadlock <= n_deadlock + 1'b1;
            n_reexec   <= n_reexec + 1'b1;
            state      <= S_FLUSH;
          end else if (reexec_req) begin
            n_reexec <= n_reexec + 1'b1;
            state    <= S_FLUSH;
          end else if (cm_check && cm_mismatch) begin
            unique case (mode)
              MODE_LDCR: begin
                target        <= TW'(RELOAD_CYCLES);
                timer         <= '0;
                rs_seen       <= 1'b0;
                restore_start <= 1'b1;
                n_restore     <= n_restore + 1'b1;
                state         <= S_RESTORE;
              end
              MODE_LDAR: begin
                if (err_valid && err_pc == cm_pc) begin
                  err_valid     <= 1'b0;
                  target        <= TW'(FIX_CYCLES);
                  timer         <= '0;
                  rs_seen       <= 1'b0;
                  restore_start <= 1'b1;
                  n_restore     <= n_restore + 1'b1;
                  n_passive     <= n_passive + 1'b1;
                  state         <= S_RESTORE;
                end else begin
                  err_valid <= 1'b1;
                  err_pc    <= cm_pc;
                  n_reexec  <= n_reexec + 1'b1;
                  state     <= S_FLUSH;
                end
              end
              default: begin
                n_reexec <= n_reexec + 1'b1;
                state    <= S_FLUSH;
              end
            endcase
          end else if (state == S_DRAIN && drain_done) begin
            target        <= TW'(FIX_CYCLES);
            timer         <= '0;
            rs_seen       <= 1'b0;
            restore_start <= 1'b1;
            n_restore     <= n_restore + 1'b1;
            n_passive     <= n_passive + 1'b1;
            state         <= S_RESTORE;
          end else if (state == S_IDLE && eager_fail) begin
            state <= S_DRAIN;
          end
          if (cm_ok && err_valid && cm_pc == err_pc) err_valid <= 1'b0;
        end
        S_RESTORE: begin
          if (timer < target) timer <= timer + 1'b1;
          if (restore_done) rs_seen <= 1'b1;
          if (timer + 1'b1 >= target && (rs_seen || restore_done)) state <= S_FLUSH;
        end
        default: state <= S_IDLE;   // S_FLUSH lasts one cycle
      endcase
    end
  end

endmodule
