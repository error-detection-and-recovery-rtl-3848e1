// reliable_stp: error detection and recovery logic of a single-threaded
// processor that runs every instruction twice (original and replica thread)
// in the same out-of-order core.
//
// What is inside (fetch to commit):
//   pc_gen_dup          two PC generators compared every cycle; a mismatch
//                       re-initiates fetch.
//   replication_checker copies the fetched word into the two threads and
//                       checks both copies against the cache's error code.
//   err_rename          Efficient Register Renaming: one map table, replica
//                       register = original register + NPART; map entries and
//                       the ROB index table carry error codes (eager repair).
//   rob                 one entry per instruction pair, coded rename fields.
//   err_regfile         two-partition register file with codes and status
//                       bits; eager detection and twin repair on reads.
//   lsq_pair            paired load/store slots, one memory access per pair.
//   branch_reuse_buffer stored branch outcomes reused while re-executing.
//   dl_monitor          shared cycle counters that catch deadlocks.
//   ckpt_rf             checkpoint of committed register values.
//   recovery_ctrl       LDCR / LDAR / EDAR policy (mode input).
// What is outside, reached through ports: the instruction cache (returns a
// word and its error code in the fetch cycle), the branch predictor, the
// decoder, the issue queues and functional units, and data memory. The
// outside core reads operands through rd_*, writes both copies' results
// through wb_o_*/wb_r_* (ROB index + full register address), resolves
// branches through br_* and generates addresses through ag_*.
//
// Commit: when the ROB head pair has written back, the two twin registers are
// corroborated (values and codes). A difference is an error for the
// recovery controller, except that in EDAR a difference the stored codes can
// resolve is corrected in place. A corrupt ROB entry is also an error.
// Recovery flushes the whole machine and restarts fetch at the oldest
// instruction; the branch reuse buffer then replays stored outcomes: when a
// dispatched branch's prediction disagrees with a stored outcome, the front
// end is redirected at dispatch (fe_flush).
// A branch misprediction (br_mispred) squashes the younger ROB entries by
// walking back the rename state, and drops wrong-path load/store slots. A
// store commits only after its address and data pairs have been checked.
// Dispatch (ds_ready) stalls while the ROB, LSQ or branch reuse buffer is
// full, during a walk-back or a recovery; fe_stall is the decoder's
// back-pressure into PC generation. The branch prediction is checked
// against the predictor's parity (bp_code); a failing prediction is dropped
// and fetch waits until that instruction has been evaluated (ev_bp_err).
// The eager checks are active in every mode; mode only selects the
// commit-time policy. Widths: one instruction fetched, renamed and committed
// per cycle, this design's choice. inj_* ports flip
// bits in storage structures to model transient errors; tie them to zero in
// normal use.
module reliable_stp
  import stp_pkg::*;
#(
  parameter int DATA_W    = 32,
  parameter int PC_W      = 32,
  parameter int INSN_W    = 64,
  parameter int NARCH     = 32,
  parameter int NPART     = 64,
  parameter int ROB_DEPTH = 64,
  parameter int BRB_DEPTH = 16,
  parameter int BRB_CNT_W = 4,
  parameter int LSQ_DEPTH = 16,
  parameter int NRD       = 2,
  parameter int DL_SET    = 4,
  parameter int DL_THRESH = 1024,
  localparam int AW       = $clog2(NARCH),
  localparam int PRW      = $clog2(NPART),
  localparam int PW       = PRW + 1,
  localparam int RW       = $clog2(ROB_DEPTH),
  localparam int BW       = clog2_min1(BRB_DEPTH),
  localparam int BPC      = edc_width(PC_W + 1, MAXERR_BPRED),
  localparam int LW       = $clog2(LSQ_DEPTH),
  localparam int ICW      = edc_width(INSN_W, 3)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  recov_mode_e       mode,
  // instruction cache and branch predictor (fetch cycle)
  output logic              ic_req,
  output logic [PC_W-1:0]   ic_pc,
  input  logic [INSN_W-1:0] ic_insn,
  input  logic [ICW-1:0]    ic_code,
  input  logic              fe_stall,      // decoder cannot take more: hold the PC
  input  logic              bp_taken,
  input  logic [PC_W-1:0]   bp_target,
  input  logic [BPC-1:0]    bp_code,       // predictor's stored code of {bp_taken, bp_target}
  // checked instruction pair to the decoder
  output logic              dec_valid,
  output logic [PC_W-1:0]   dec_pc,
  output logic [INSN_W-1:0] dec_insn_orig,
  output logic [INSN_W-1:0] dec_insn_rep,
  output logic              fe_flush,      // drop everything between fetch and dispatch
  output logic              core_flush,    // recovery: drop everything in flight
  // decoded instruction to dispatch
  input  logic              ds_valid,
  input  logic [PC_W-1:0]   ds_pc,
  input  logic [AW-1:0]     ds_src1,
  input  logic [AW-1:0]     ds_src2,
  input  logic              ds_has_dst,
  input  logic [AW-1:0]     ds_dst,
  input  logic              ds_is_branch,
  input  logic              ds_pred_taken,
  input  logic [PC_W-1:0]   ds_pred_target,
  input  logic              ds_is_mem,
  input  logic              ds_is_store,
  output logic              ds_ready,
  // renamed instruction pair to the issue queues
  output logic              iss_valid,
  output logic [RW-1:0]     iss_rob,
  output logic [PRW-1:0]    iss_psrc1,
  output logic [PRW-1:0]    iss_psrc2,
  output logic [PRW-1:0]    iss_pdst,
  output logic [LW-1:0]     iss_lsq,
  output logic              iss_brb_in_buf,
  output logic [BW-1:0]     iss_brb_idx,
  output logic [BRB_CNT_W-1:0] iss_brb_ord,
  output logic              iss_pred_taken,
  output logic [PC_W-1:0]   iss_pred_target,
  // operand reads (full register address: partition bit + index)
  input  logic [PW-1:0]     rd_addr [NRD],
  input  logic [RW-1:0]     rd_rob  [NRD],
  input  logic [NRD-1:0]    rd_en,
  output logic [DATA_W-1:0] rd_data [NRD],
  output logic [NRD-1:0]    rd_wait,
  // result writeback, one port per thread
  input  logic              wb_o_valid,
  input  logic              wb_o_we,
  input  logic [RW-1:0]     wb_o_rob,
  input  logic [PW-1:0]     wb_o_addr,
  input  logic [DATA_W-1:0] wb_o_data,
  input  logic              wb_r_valid,
  input  logic              wb_r_we,
  input  logic [RW-1:0]     wb_r_rob,
  input  logic [PW-1:0]     wb_r_addr,
  input  logic [DATA_W-1:0] wb_r_data,
  // branch resolution (original copy)
  input  logic              br_valid,
  input  logic [RW-1:0]     br_rob,
  input  logic              br_in_buf,
  input  logic [BW-1:0]     br_idx,
  input  logic [BRB_CNT_W-1:0] br_ord,
  input  logic              br_mispred,
  input  logic              br_taken,
  input  logic [PC_W-1:0]   br_target,
  input  logic [PC_W-1:0]   br_next_pc,
  // address generation
  input  logic              ag_valid,
  input  logic              ag_copy,
  input  logic [LW-1:0]     ag_idx,
  input  logic [PC_W-1:0]   ag_addr,
  input  logic [DATA_W-1:0] ag_data,
  // data memory
  output logic              mem_rd,
  output logic              mem_wr,
  output logic [PC_W-1:0]   mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  output logic              ld_done,
  output logic [RW-1:0]     ld_rob,
  output logic [DATA_W-1:0] ld_data,
  // commit
  output logic              cm_valid,
  output logic [PC_W-1:0]   cm_pc,
  output logic              cm_has_dst,
  output logic [AW-1:0]     cm_dst,
  output logic [DATA_W-1:0] cm_data,
  // events and statistics
  output logic              ev_pc_err,
  output logic              ev_bp_err,     // prediction failed its code: fetch held
  output logic              ev_repl_fix,
  output logic              ev_refetch,
  output logic              ev_map_fix,
  output logic              ev_rf_fix,
  output logic              ev_cm_fix,
  output logic              ev_lsq_fix,
  output logic              ev_reuse,
  output logic              ev_walk,
  output logic              ev_restore,
  output logic [15:0]       n_reexec,
  output logic [15:0]       n_restore,
  output logic [15:0]       n_passive,
  output logic [15:0]       n_deadlock,
  // transient-error injection
  input  logic [PC_W-1:0]   inj_pc_a,
  input  logic [PC_W-1:0]   inj_pc_b,
  input  logic [INSN_W-1:0] inj_repl_orig,
  input  logic [INSN_W-1:0] inj_repl_rep,
  input  logic              inj_map_valid,
  input  logic              inj_rit_valid,
  input  logic [AW-1:0]     inj_arch,
  input  logic [PRW-1:0]    inj_map_mask,
  input  logic [RW:0]       inj_rit_mask,
  input  logic              inj_rf_valid,
  input  logic [PW-1:0]     inj_rf_addr,
  input  logic [DATA_W-1:0] inj_rf_mask,
  input  logic              inj_rob_valid,
  input  logic [RW-1:0]     inj_rob_idx,
  input  logic [PRW-1:0]    inj_rob_mask,
  input  logic              inj_lsq_valid,
  input  logic [LW-1:0]     inj_lsq_idx,
  input  logic [PC_W-1:0]   inj_lsq_mask
);

  // ------------------------------------------------------------------
  // recovery control signals
  logic rec_flush, rec_busy, rec_drain, rec_restore_start, rec_cm_ok;
  logic eager_fail, drain_done, dl_detect, restore_done;
  logic [PC_W-1:0] restart_pc;
  logic ds_go, ds_fire;
  logic [RW-1:0] rob_tail;

  // ------------------------------------------------------------------
  // fetch
  logic fe_redirect;
  logic [PC_W-1:0] fe_redirect_pc;
  logic repl_refetch;
  logic [PC_W-1:0] repl_refetch_pc;
  logic reuse_redirect;
  logic [PC_W-1:0] reuse_pc;
  logic br_redirect;
  logic fetch_valid;
  logic [PC_W-1:0] fetch_pc;

  assign br_redirect = br_valid && br_mispred;

  always_comb begin
    fe_redirect    = 1'b1;
    fe_redirect_pc = restart_pc;
    if (rec_flush)           fe_redirect_pc = restart_pc;
    else if (br_redirect)    fe_redirect_pc = br_next_pc;
    else if (reuse_redirect) fe_redirect_pc = reuse_pc;
    else if (repl_refetch)   fe_redirect_pc = repl_refetch_pc;
    else                     fe_redirect    = 1'b0;
  end
  assign fe_flush   = fe_redirect;
  assign core_flush = rec_flush;

  // Eager check of the branch prediction against the predictor's stored
  // code. A prediction that fails it is not used (fall through) and fetch
  // is held after this instruction until it has been evaluated: released
  // when the branch resolves, when it turns out not to be a branch at
  // dispatch, or by any redirect.
  logic [BPC-1:0]  bp_regen;
  logic            bp_hold, bp_hold_disp;
  logic [PC_W-1:0] bp_hold_pc;
  logic [RW-1:0]   bp_hold_rob;
  edc_encode #(.DATA_W(PC_W + 1), .MAX_ERR(MAXERR_BPRED)) u_bpcode (
    .data({bp_taken, bp_target}), .code(bp_regen));
  assign ev_bp_err = fetch_valid && !fe_redirect && (bp_regen != bp_code);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bp_hold      <= 1'b0;
      bp_hold_disp <= 1'b0;
      bp_hold_pc   <= '0;
      bp_hold_rob  <= '0;
    end else if (fe_redirect) begin
      bp_hold      <= 1'b0;
      bp_hold_disp <= 1'b0;
    end else if (ev_bp_err) begin
      bp_hold      <= 1'b1;
      bp_hold_disp <= 1'b0;
      bp_hold_pc   <= fetch_pc;
    end else if (bp_hold) begin
      if (ds_fire && ds_pc == bp_hold_pc) begin
        if (ds_is_branch) begin
          bp_hold_disp <= 1'b1;
          bp_hold_rob  <= rob_tail;
        end else begin
          bp_hold      <= 1'b0;
        end
      end
      if (bp_hold_disp && br_valid && br_rob == bp_hold_rob) begin
        bp_hold      <= 1'b0;
        bp_hold_disp <= 1'b0;
      end
    end
  end

  pc_gen_dup #(.PC_W(PC_W), .INSN_BYTES(INSN_W / 8)) u_pc (
    .clk, .rst_n,
    .stall       (fe_stall || bp_hold),
    .redirect    (fe_redirect),
    .redirect_pc (fe_redirect_pc),
    .pred_taken  (bp_taken && !ev_bp_err),
    .pred_target (bp_target),
    .flip_a      (inj_pc_a),
    .flip_b      (inj_pc_b),
    .fetch_valid (fetch_valid),
    .fetch_pc    (fetch_pc),
    .pc_error    (ev_pc_err)
  );
  assign ic_req = fetch_valid;
  assign ic_pc  = fetch_pc;

  replication_checker #(.INSN_W(INSN_W), .PC_W(PC_W), .MAX_ERR(3)) u_repl (
    .clk, .rst_n,
    .flush         (fe_redirect),
    .in_valid      (fetch_valid),
    .in_pc         (fetch_pc),
    .in_insn       (ic_insn),
    .in_code       (ic_code),
    .flip_orig     (inj_repl_orig),
    .flip_rep      (inj_repl_rep),
    .out_valid     (dec_valid),
    .out_pc        (dec_pc),
    .out_insn_orig (dec_insn_orig),
    .out_insn_rep  (dec_insn_rep),
    .out_corrected (ev_repl_fix),
    .refetch       (repl_refetch),
    .refetch_pc    (repl_refetch_pc)
  );
  assign ev_refetch = repl_refetch;

  // ------------------------------------------------------------------
  // rename, ROB, branch reuse buffer, LSQ
  logic ren_ready, map_fail;
  logic [PRW-1:0] ren_pdst, ren_prev_pdst;
  logic [RW-1:0]  ren_prev_rob, q_idx;
  logic ren_prev_committed;
  logic [PRW-1:0] q_pdst;
  logic q_ok;
  logic rob_full, rob_empty, rob_busy;
  logic brb_stall, brb_in_buf, reuse_hit, reuse_taken;
  logic [BW-1:0] brb_idx;
  logic [BRB_CNT_W-1:0] brb_ord;
  logic [PC_W-1:0] reuse_target;
  logic lsq_full;
  logic [LW-1:0] lsq_idx;

  // hazards other than rename itself
  assign ds_go = ds_valid && !rob_full && !rob_busy && !rec_busy && !rec_drain &&
                 !rec_flush && !br_redirect &&
                 !(ds_is_mem && lsq_full) && !(ds_is_branch && brb_stall);
  assign ds_fire  = ds_go && ren_ready;
  assign ds_ready = ds_fire;

  // commit-side signals used by rename
  logic cm_fire;
  logic hd_ready, hd_has_dst, hd_is_branch, hd_brb_in_buf, hd_code_err;
  logic [RW-1:0]  hd_idx;
  logic [PC_W-1:0] hd_pc;
  logic [AW-1:0]  hd_dst;
  logic [PRW-1:0] hd_pdst, hd_prev_pdst;
  logic wk_valid, wk_has_dst, wk_prev_committed;
  logic [AW-1:0]  wk_dst;
  logic [PRW-1:0] wk_pdst, wk_prev_pdst;
  logic [RW-1:0]  wk_prev_rob;
  logic [AW-1:0]  rt_arch;
  logic [PRW-1:0] rt_preg;
  logic [ROB_DEPTH-1:0] rob_valid;

  err_rename #(.NARCH(NARCH), .NPART(NPART), .ROB_DEPTH(ROB_DEPTH)) u_ren (
    .clk, .rst_n,
    .flush              (rec_flush),
    .ren_valid          (ds_go),
    .ren_src1           (ds_src1),
    .ren_src2           (ds_src2),
    .ren_has_dst        (ds_has_dst),
    .ren_dst            (ds_dst),
    .ren_rob_idx        (rob_tail),
    .ren_ready          (ren_ready),
    .ren_psrc1          (iss_psrc1),
    .ren_psrc2          (iss_psrc2),
    .ren_pdst           (ren_pdst),
    .ren_prev_pdst      (ren_prev_pdst),
    .ren_prev_rob       (ren_prev_rob),
    .ren_prev_committed (ren_prev_committed),
    .no_free            (),
    .map_fix            (ev_map_fix),
    .map_fail           (map_fail),
    .q_idx              (q_idx),
    .q_pdst             (q_pdst),
    .q_ok               (q_ok),
    .cm_valid           (cm_fire),
    .cm_has_dst         (hd_has_dst),
    .cm_dst             (hd_dst),
    .cm_pdst            (hd_pdst),
    .cm_prev_pdst       (hd_prev_pdst),
    .cm_rob_idx         (hd_idx),
    .wk_valid           (wk_valid),
    .wk_has_dst         (wk_has_dst),
    .wk_dst             (wk_dst),
    .wk_pdst            (wk_pdst),
    .wk_prev_pdst       (wk_prev_pdst),
    .wk_prev_rob        (wk_prev_rob),
    .wk_prev_committed  (wk_prev_committed),
    .rt_arch            (rt_arch),
    .rt_preg            (rt_preg),
    .inj_map_valid      (inj_map_valid),
    .inj_rit_valid      (inj_rit_valid),
    .inj_arch           (inj_arch),
    .inj_map_mask       (inj_map_mask),
    .inj_rit_mask       (inj_rit_mask)
  );
  assign ev_walk = wk_valid;

  rob #(.DEPTH(ROB_DEPTH), .NARCH(NARCH), .NPART(NPART), .PC_W(PC_W)) u_rob (
    .clk, .rst_n,
    .flush             (rec_flush),
    .al_valid          (ds_fire),
    .al_pc             (ds_pc),
    .al_has_dst        (ds_has_dst),
    .al_dst            (ds_dst),
    .al_pdst           (ren_pdst),
    .al_prev_pdst      (ren_prev_pdst),
    .al_prev_rob       (ren_prev_rob),
    .al_prev_committed (ren_prev_committed),
    .al_is_branch      (ds_is_branch),
    .al_brb_in_buf     (brb_in_buf),
    .al_idx            (rob_tail),
    .full              (rob_full),
    .empty             (rob_empty),
    .wb_o_valid        (wb_o_valid),
    .wb_o_idx          (wb_o_rob),
    .wb_r_valid        (wb_r_valid),
    .wb_r_idx          (wb_r_rob),
    .q_idx             (q_idx),
    .q_pdst            (q_pdst),
    .q_ok              (q_ok),
    .hd_ready          (hd_ready),
    .hd_idx            (hd_idx),
    .hd_pc             (hd_pc),
    .hd_has_dst        (hd_has_dst),
    .hd_dst            (hd_dst),
    .hd_pdst           (hd_pdst),
    .hd_prev_pdst      (hd_prev_pdst),
    .hd_is_branch      (hd_is_branch),
    .hd_brb_in_buf     (hd_brb_in_buf),
    .hd_code_err       (hd_code_err),
    .cm_pop            (cm_fire),
    .squash_valid      (br_redirect && !rec_flush),
    .squash_idx        (br_rob),
    .wk_valid          (wk_valid),
    .wk_has_dst        (wk_has_dst),
    .wk_dst            (wk_dst),
    .wk_pdst           (wk_pdst),
    .wk_prev_pdst      (wk_prev_pdst),
    .wk_prev_rob       (wk_prev_rob),
    .wk_prev_committed (wk_prev_committed),
    .busy              (rob_busy),
    .entry_valid       (rob_valid),
    .inj_valid         (inj_rob_valid),
    .inj_idx           (inj_rob_idx),
    .inj_mask          (inj_rob_mask)
  );

  branch_reuse_buffer #(.DEPTH(BRB_DEPTH), .PC_W(PC_W), .CNT_W(BRB_CNT_W)) u_brb (
    .clk, .rst_n,
    .alloc_valid   (ds_fire && ds_is_branch),
    .alloc_stall   (brb_stall),
    .alloc_in_buf  (brb_in_buf),
    .alloc_idx     (brb_idx),
    .alloc_ord     (brb_ord),
    .reuse_hit     (reuse_hit),
    .reuse_taken   (reuse_taken),
    .reuse_target  (reuse_target),
    .eval_valid    (br_valid),
    .eval_in_buf   (br_in_buf),
    .eval_idx      (br_idx),
    .eval_mispred  (br_mispred),
    .eval_taken    (br_taken),
    .eval_target   (br_target),
    .squash_valid  (br_redirect && !rec_flush),
    .squash_in_buf (br_in_buf),
    .squash_idx    (br_idx),
    .squash_ord    (br_ord),
    .commit_valid  (cm_fire && hd_is_branch),
    .commit_in_buf (hd_brb_in_buf),
    .replay_start  (rec_flush),
    .replaying     (),
    .full          (),
    .count         (),
    .ovf_count     ()
  );

  // branch reuse: a stored outcome overrides the carried prediction
  logic reuse_differs;
  assign reuse_differs = reuse_hit && (reuse_taken != ds_pred_taken ||
                         (reuse_taken && reuse_target != ds_pred_target));
  assign reuse_redirect = ds_fire && ds_is_branch && reuse_differs;
  assign reuse_pc       = reuse_taken ? reuse_target : ds_pc + PC_W'(INSN_W / 8);
  assign ev_reuse       = reuse_redirect;

  assign iss_valid       = ds_fire;
  assign iss_rob         = rob_tail;
  assign iss_pdst        = ren_pdst;
  assign iss_lsq         = lsq_idx;
  assign iss_brb_in_buf  = brb_in_buf;
  assign iss_brb_idx     = brb_idx;
  assign iss_brb_ord     = brb_ord;
  assign iss_pred_taken  = (ds_is_branch && reuse_hit) ? reuse_taken : ds_pred_taken;
  assign iss_pred_target = (ds_is_branch && reuse_hit) ? reuse_target : ds_pred_target;

  logic lsq_fail, st_commit, hd_store_ready, lsq_hd_store;
  logic [RW-1:0] lsq_hd_tag;
  lsq_pair #(.DEPTH(LSQ_DEPTH), .ADDR_W(PC_W), .DATA_W(DATA_W), .TAG_W(RW)) u_lsq (
    .clk, .rst_n,
    .flush          (rec_flush),
    .sq_valid       (br_redirect),
    .sq_tag         (br_rob),
    .rob_head       (hd_idx),
    .al_valid       (ds_fire && ds_is_mem),
    .al_is_store    (ds_is_store),
    .al_tag         (rob_tail),
    .al_idx         (lsq_idx),
    .full           (lsq_full),
    .ag_valid       (ag_valid),
    .ag_copy        (ag_copy),
    .ag_idx         (ag_idx),
    .ag_addr        (ag_addr),
    .ag_data        (ag_data),
    .st_commit      (st_commit),
    .mem_rd         (mem_rd),
    .mem_wr         (mem_wr),
    .mem_addr       (mem_addr),
    .mem_wdata      (mem_wdata),
    .mem_rdata      (mem_rdata),
    .ld_done        (ld_done),
    .ld_tag         (ld_rob),
    .ld_data        (ld_data),
    .st_done        (),
    .hd_store_ready (hd_store_ready),
    .hd_is_store    (lsq_hd_store),
    .hd_tag         (lsq_hd_tag),
    .chk_fail       (lsq_fail),
    .chk_fixed      (ev_lsq_fix),
    .inj_valid      (inj_lsq_valid),
    .inj_idx        (inj_lsq_idx),
    .inj_mask       (inj_lsq_mask)
  );
  assign st_commit = cm_fire && hd_store_ready && lsq_hd_tag == hd_idx;

  // ------------------------------------------------------------------
  // register file and commit
  logic [NRD-1:0] rd_err, rd_fix, rd_wait_i, rd_fail;
  logic [DATA_W-1:0] cv_o, cv_r, cv_out;
  logic [edc_width(DATA_W, MAXERR_ORIG_RF)-1:0] cc_o, cc_r;
  logic cm_rf_ready, cv_ok, cv_fix, cv_bad;
  logic rs_valid;
  logic [DATA_W-1:0] rs_data;
  logic free_valid;
  logic [PRW-1:0] free_preg;

  // deallocation: previous mapping at commit, squashed mapping on walk-back
  assign free_valid = (cm_fire && hd_has_dst) || (wk_valid && wk_has_dst);
  assign free_preg  = wk_valid ? wk_pdst : hd_prev_pdst;

  err_regfile #(.DATA_W(DATA_W), .NPART(NPART), .NRD(NRD)) u_rf (
    .clk, .rst_n,
    .wr_o_valid (wb_o_valid && wb_o_we),
    .wr_o_addr  (wb_o_addr),
    .wr_o_data  (wb_o_data),
    .wr_r_valid (wb_r_valid && wb_r_we),
    .wr_r_addr  (wb_r_addr),
    .wr_r_data  (wb_r_data),
    .rs_valid   (rs_valid),
    .rs_preg    (rt_preg),
    .rs_data    (rs_data),
    .free_valid (free_valid),
    .free_preg  (free_preg),
    .rd_addr    (rd_addr),
    .rd_data    (rd_data),
    .rd_err     (rd_err),
    .rd_fix     (rd_fix),
    .rd_wait    (rd_wait_i),
    .rd_fail    (rd_fail),
    .cm_preg    (hd_pdst),
    .cm_val_o   (cv_o),
    .cm_code_o  (cc_o),
    .cm_val_r   (cv_r),
    .cm_code_r  (cc_r),
    .cm_ready   (cm_rf_ready),
    .inj_valid  (inj_rf_valid),
    .inj_addr   (inj_rf_addr),
    .inj_mask   (inj_rf_mask)
  );
  assign rd_wait   = rd_wait_i & rd_en;
  assign ev_rf_fix = |(rd_fix & rd_en);

  ea_checker #(.DATA_W(DATA_W), .MAX_ERR(MAXERR_ORIG_RF)) u_cmchk (
    .val_a (cv_o), .code_a (cc_o), .val_b (cv_r), .code_b (cc_r),
    .val_out (cv_out), .ok (cv_ok), .corrected (cv_fix), .reexec (cv_bad));

  logic cm_check, cm_mismatch;
  // a store commits only once its address and data pairs have been checked
  assign cm_check    = hd_ready && !rec_busy && !rec_flush && (!hd_has_dst || cm_rf_ready) &&
                       !(lsq_hd_store && lsq_hd_tag == hd_idx && !hd_store_ready);
  assign cm_mismatch = hd_code_err ||
                       (hd_has_dst && !cv_ok && !(mode == MODE_EDAR && cv_fix));
  assign cm_fire     = rec_cm_ok;
  assign ev_cm_fix   = cm_fire && hd_has_dst && cv_fix;
  assign cm_valid    = cm_fire;
  assign cm_pc       = hd_pc;
  assign cm_has_dst  = hd_has_dst;
  assign cm_dst      = hd_dst;
  assign cm_data     = cv_out;

  ckpt_rf #(.DATA_W(DATA_W), .NARCH(NARCH)) u_ckpt (
    .clk, .rst_n,
    .cm_valid      (cm_fire && hd_has_dst),
    .cm_arch       (hd_dst),
    .cm_data       (cv_out),
    .restore_start (rec_restore_start),
    .rs_valid      (rs_valid),
    .rs_arch       (rt_arch),
    .rs_data       (rs_data),
    .restore_done  (restore_done),
    .busy          ()
  );
  assign ev_restore = rs_valid;

  // ------------------------------------------------------------------
  // eager failures: remember which instruction saw it
  logic ef_pending, ef_in_rob;
  logic [RW-1:0] ef_rob;
  logic rd_fail_any;
  logic [RW-1:0] rd_fail_rob;
  always_comb begin
    rd_fail_any = 1'b0;
    rd_fail_rob = '0;
    for (int i = NRD - 1; i >= 0; i--)
      if (rd_fail[i] && rd_en[i]) begin
        rd_fail_any = 1'b1;
        rd_fail_rob = rd_rob[i];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ef_pending <= 1'b0;
      ef_in_rob  <= 1'b0;
      ef_rob     <= '0;
      restart_pc <= PC_W'(32'h0040_0000);
    end else begin
      if (rec_flush) begin
        ef_pending <= 1'b0;
      end else if (!ef_pending && (rd_fail_any || map_fail)) begin
        ef_pending <= 1'b1;
        ef_in_rob  <= rd_fail_any;
        ef_rob     <= rd_fail_rob;
      end
      // restart point: oldest instruction, or the stalled one at rename
      if (!rec_busy && !rec_flush) restart_pc <= rob_empty ? ds_pc : hd_pc;
    end
  end
  assign eager_fail = ef_pending;
  assign drain_done = rob_empty || (ef_in_rob && hd_idx == ef_rob);

  dl_monitor #(.ROB_DEPTH(ROB_DEPTH), .SET_SIZE(DL_SET), .THRESH(DL_THRESH)) u_dl (
    .clk, .rst_n,
    .clear       (rec_flush),
    .alloc_valid (ds_fire),
    .alloc_idx   (rob_tail),
    .entry_valid (rob_valid),
    .dl_detect   (dl_detect),
    .dl_set      ()
  );

  recovery_ctrl #(.PC_W(PC_W)) u_rec (
    .clk, .rst_n,
    .mode          (mode),
    .cm_check      (cm_check),
    .cm_mismatch   (cm_mismatch),
    .cm_pc         (hd_pc),
    .eager_fail    (eager_fail),
    .drain_done    (drain_done),
    .dl_detect     (dl_detect),
    .reexec_req    (lsq_fail),
    .restore_done  (restore_done),
    .cm_ok         (rec_cm_ok),
    .flush         (rec_flush),
    .restore_start (rec_restore_start),
    .busy          (rec_busy),
    .draining      (rec_drain),
    .n_reexec      (n_reexec),
    .n_restore     (n_restore),
    .n_passive     (n_passive),
    .n_deadlock    (n_deadlock)
  );

endmodule
