// branch_reuse_buffer: circular FIFO of branch evaluations used to speed up
// re-execution after an error.
//
// Each entry holds a valid bit, an evaluated bit, the branch outcome
// (taken) and the target address. Branches take the entry at the tail when
// they are dispatched (valid set, evaluated cleared) and carry its index;
// they free the entry at the head when they commit. A branch that evaluates
// as mispredicted writes its real outcome and target into its entry; a
// correctly predicted branch writes nothing. A misprediction squashes all
// younger entries (tail moves to just after the mispredicted one).
//
// Overflow: when the buffer is full, further branches are only counted in a
// small counter (CNT_W bits); such a branch records in_buf=0 and its ordinal
// in the counter, and commit/squash of it decrements/trims the counter
// instead of freeing an entry. Once the counter is non-zero new branches keep
// being counted until it drains, so buffered branches always stay older than
// counted ones (this ordering rule is this design's own). A full counter
// raises alloc_stall.
//
// Recovery (re-execution from the oldest instruction): replay_start points a
// replay pointer at the head. Each branch dispatched while replaying reuses
// the next entry instead of allocating one; if that entry is evaluated, its
// stored outcome and target override the predictor (reuse_hit). A
// misprediction during replay squashes the following entries and ends
// the replay, since execution now follows a different path. Replay also ends
// when the pointer reaches the tail. Counted branches are all flushed at
// replay_start. All updates take effect at the clock edge; alloc outputs are
// combinational.
module branch_reuse_buffer
  import stp_pkg::*;
#(
  parameter int DEPTH = 16,
  parameter int PC_W  = 32,
  parameter int CNT_W = 4,
  localparam int IDX_W = clog2_min1(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // dispatch of a branch
  input  logic             alloc_valid,
  output logic             alloc_stall,
  output logic             alloc_in_buf,
  output logic [IDX_W-1:0] alloc_idx,
  output logic [CNT_W-1:0] alloc_ord,
  output logic             reuse_hit,
  output logic             reuse_taken,
  output logic [PC_W-1:0]  reuse_target,
  // branch evaluation
  input  logic             eval_valid,
  input  logic             eval_in_buf,
  input  logic [IDX_W-1:0] eval_idx,
  input  logic             eval_mispred,
  input  logic             eval_taken,
  input  logic [PC_W-1:0]  eval_target,
  // squash of everything younger than a mispredicted branch
  input  logic             squash_valid,
  input  logic             squash_in_buf,
  input  logic [IDX_W-1:0] squash_idx,
  input  logic [CNT_W-1:0] squash_ord,
  // commit of the oldest branch
  input  logic             commit_valid,
  input  logic             commit_in_buf,
  // recovery: start re-execution from the oldest branch
  input  logic             replay_start,
  output logic             replaying,
  output logic             full,
  output logic [IDX_W:0]   count,
  output logic [CNT_W-1:0] ovf_count
);

  logic [DEPTH-1:0] e_valid, e_eval, e_taken;
  logic [PC_W-1:0]  e_target [DEPTH];
  logic [IDX_W-1:0] head, tail, rptr;

  function automatic logic [IDX_W-1:0] inc(input logic [IDX_W-1:0] i);
    return (int'(i) == DEPTH - 1) ? '0 : i + 1'b1;
  endfunction

  // number of entries from head up to and including idx
  function automatic logic [IDX_W:0] upto(input logic [IDX_W-1:0] h, input logic [IDX_W-1:0] i);
    int d;
    d = int'(i) - int'(h);
    if (d < 0) d += DEPTH;
    return (IDX_W+1)'(d + 1);
  endfunction

  assign full        = (int'(count) == DEPTH);
  assign alloc_stall = !replaying && (&ovf_count);

  always_comb begin
    alloc_in_buf = 1'b0;
    alloc_idx    = tail;
    alloc_ord    = ovf_count + 1'b1;
    reuse_hit    = 1'b0;
    reuse_taken  = 1'b0;
    reuse_target = '0;
    if (replaying) begin
      alloc_in_buf = 1'b1;
      alloc_idx    = rptr;
      reuse_hit    = e_valid[rptr] && e_eval[rptr];
      reuse_taken  = e_taken[rptr];
      reuse_target = e_target[rptr];
    end else if (!full && ovf_count == '0) begin
      alloc_in_buf = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid   <= '0;
      e_eval    <= '0;
      e_taken   <= '0;
      head      <= '0;
      tail      <= '0;
      rptr      <= '0;
      count     <= '0;
      ovf_count <= '0;
      replaying <= 1'b0;
      for (int i = 0; i < DEPTH; i++) e_target[i] <= '0;
    end else begin
      logic [IDX_W:0]   n_count;
      logic [CNT_W-1:0] n_ovf;
      n_count = count;
      n_ovf   = ovf_count;

      // commit frees the head entry or one counted branch
      if (commit_valid) begin
        if (commit_in_buf) begin
          e_valid[head] <= 1'b0;
          head          <= inc(head);
          n_count       = n_count - 1'b1;
        end else if (n_ovf != '0) begin
          n_ovf = n_ovf - 1'b1;
        end
      end

      // evaluation: only mispredictions are recorded
      if (eval_valid && eval_in_buf && eval_mispred) begin
        e_eval[eval_idx]   <= 1'b1;
        e_taken[eval_idx]  <= eval_taken;
        e_target[eval_idx] <= eval_target;
      end

      if (replay_start) begin
        rptr      <= head;
        replaying <= (n_count != '0);
        n_ovf     = '0;
      end else if (squash_valid) begin
        if (squash_in_buf) begin
          // keep entries up to squash_idx, invalidate the rest
          for (int i = 0; i < DEPTH; i++) begin
            logic [IDX_W:0] pos;
            pos = upto(head, IDX_W'(i));
            if (pos > upto(head, squash_idx) && pos <= count) e_valid[i] <= 1'b0;
          end
          n_count   = upto(head, squash_idx) - (IDX_W+1)'(commit_valid && commit_in_buf);
          tail      <= inc(squash_idx);
          n_ovf     = '0;
          replaying <= 1'b0;
        end else begin
          n_ovf = squash_ord;
        end
      end else if (alloc_valid && !alloc_stall) begin
        if (replaying) begin
          rptr <= inc(rptr);
          if (inc(rptr) == tail) replaying <= 1'b0;
        end else if (alloc_in_buf) begin
          e_valid[tail]  <= 1'b1;
          e_eval[tail]   <= 1'b0;
          e_taken[tail]  <= 1'b0;
          tail           <= inc(tail);
          n_count        = n_count + 1'b1;
        end else begin
          n_ovf = n_ovf + 1'b1;
        end
      end

      count     <= n_count;
      ovf_count <= n_ovf;
    end
  end

endmodule
