// rob: reorder buffer with one entry per original/replica instruction pair.
//
// Thanks to Efficient Register Renaming both copies of an instruction share
// one rename mapping, so they share one ROB entry; the entry is ready to
// commit when both copies have written back (done_o and done_r). Each entry
// records the destination architectural register, the current mapping
// (pdst), the previous mapping (prev_pdst) and the previous mapping ROB index
// (prev_rob, with a flag saying that instruction had already committed).
// An error code (MAX_ERR = 3) is generated over these rename fields when the
// entry is written and checked when they are read, at commit (hd_code_err)
// and on the query port used to repair the rename map table (q_ok).
//
// Branch misprediction: squash_valid/squash_idx keep entries up to and
// including squash_idx; the younger ones are walked back one per cycle from
// the tail (wk_* outputs, busy high) so the rename logic can restore the map
// and the ROB index table. A walked entry's prev_committed flag is
// re-evaluated: the previous writer counts as committed if it has left the
// ROB window. flush clears everything (recovery restart). The walk-back
// does not check the code of the walked entry. A corrupt previous mapping
// is therefore not repaired through its previous-mapping ROB index. Only
// the commit and query checks above use the code.
// alloc and commit: one entry per cycle each, and depth 64: both are this
// design's choices, the document does not fix them.
module rob
  import stp_pkg::*;
#(
  parameter int DEPTH  = 64,
  parameter int NARCH  = 32,
  parameter int NPART  = 64,
  parameter int PC_W   = 32,
  localparam int IDX_W = $clog2(DEPTH),
  localparam int AW    = $clog2(NARCH),
  localparam int PRW   = $clog2(NPART),
  localparam int MW    = 2 * PRW + IDX_W + 1,            // protected rename fields
  localparam int CODE_W = edc_width(MW, MAXERR_ROB)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  // allocation
  input  logic             al_valid,
  input  logic [PC_W-1:0]  al_pc,
  input  logic             al_has_dst,
  input  logic [AW-1:0]    al_dst,
  input  logic [PRW-1:0]   al_pdst,
  input  logic [PRW-1:0]   al_prev_pdst,
  input  logic [IDX_W-1:0] al_prev_rob,
  input  logic             al_prev_committed,
  input  logic             al_is_branch,
  input  logic             al_brb_in_buf,
  output logic [IDX_W-1:0] al_idx,
  output logic             full,
  output logic             empty,
  // writeback of each copy
  input  logic             wb_o_valid,
  input  logic [IDX_W-1:0] wb_o_idx,
  input  logic             wb_r_valid,
  input  logic [IDX_W-1:0] wb_r_idx,
  // query port (rename-map repair)
  input  logic [IDX_W-1:0] q_idx,
  output logic [PRW-1:0]   q_pdst,
  output logic             q_ok,
  // head / commit
  output logic             hd_ready,
  output logic [IDX_W-1:0] hd_idx,
  output logic [PC_W-1:0]  hd_pc,
  output logic             hd_has_dst,
  output logic [AW-1:0]    hd_dst,
  output logic [PRW-1:0]   hd_pdst,
  output logic [PRW-1:0]   hd_prev_pdst,
  output logic             hd_is_branch,
  output logic             hd_brb_in_buf,
  output logic             hd_code_err,
  input  logic             cm_pop,
  // misprediction squash and walk-back
  input  logic             squash_valid,
  input  logic [IDX_W-1:0] squash_idx,
  output logic             wk_valid,
  output logic             wk_has_dst,
  output logic [AW-1:0]    wk_dst,
  output logic [PRW-1:0]   wk_pdst,
  output logic [PRW-1:0]   wk_prev_pdst,
  output logic [IDX_W-1:0] wk_prev_rob,
  output logic             wk_prev_committed,
  output logic             busy,
  output logic [DEPTH-1:0] entry_valid,
  // upset injection into the stored current mapping
  input  logic             inj_valid,
  input  logic [IDX_W-1:0] inj_idx,
  input  logic [PRW-1:0]   inj_mask
);

  typedef struct packed {
    logic [PRW-1:0]   pdst;
    logic [PRW-1:0]   prev_pdst;
    logic [IDX_W-1:0] prev_rob;
    logic             prev_committed;
  } ren_fields_t;

  ren_fields_t      f      [DEPTH];
  logic [CODE_W-1:0] fcode [DEPTH];
  logic [PC_W-1:0]  pc     [DEPTH];
  logic [AW-1:0]    dst    [DEPTH];
  logic [DEPTH-1:0] has_dst, done_o, done_r, is_br, brb_in;
  logic [IDX_W-1:0] head, tail, stop;
  logic [IDX_W:0]   count;

  assign full        = (int'(count) == DEPTH);
  assign empty       = (count == '0);
  assign al_idx      = tail;

  ren_fields_t al_f;
  assign al_f = '{pdst: al_pdst, prev_pdst: al_prev_pdst, prev_rob: al_prev_rob,
                  prev_committed: al_prev_committed};
  logic [CODE_W-1:0] al_code, hd_regen, q_regen;
  edc_encode #(.DATA_W(MW), .MAX_ERR(MAXERR_ROB)) u_enc_al (.data(al_f),        .code(al_code));
  edc_encode #(.DATA_W(MW), .MAX_ERR(MAXERR_ROB)) u_enc_hd (.data(f[head]),     .code(hd_regen));
  edc_encode #(.DATA_W(MW), .MAX_ERR(MAXERR_ROB)) u_enc_q  (.data(f[q_idx]),    .code(q_regen));

  assign hd_ready      = entry_valid[head] && done_o[head] && done_r[head] && !busy;
  assign hd_idx        = head;
  assign hd_pc         = pc[head];
  assign hd_has_dst    = has_dst[head];
  assign hd_dst        = dst[head];
  assign hd_pdst       = f[head].pdst;
  assign hd_prev_pdst  = f[head].prev_pdst;
  assign hd_is_branch  = is_br[head];
  assign hd_brb_in_buf = brb_in[head];
  assign hd_code_err   = (hd_regen != fcode[head]);

  assign q_pdst = f[q_idx].pdst;
  assign q_ok   = entry_valid[q_idx] && (q_regen == fcode[q_idx]);

  // walk-back of the youngest entry
  logic [IDX_W-1:0] last;
  assign last = tail - 1'b1;

  function automatic logic [IDX_W-1:0] ring_dist(input logic [IDX_W-1:0] from, input logic [IDX_W-1:0] to);
    return to - from;   // modulo DEPTH (DEPTH is a power of two)
  endfunction

  assign wk_valid          = busy;
  assign wk_has_dst        = has_dst[last];
  assign wk_dst            = dst[last];
  assign wk_pdst           = f[last].pdst;
  assign wk_prev_pdst      = f[last].prev_pdst;
  assign wk_prev_rob       = f[last].prev_rob;
  assign wk_prev_committed = f[last].prev_committed ||
                             !(entry_valid[f[last].prev_rob] &&
                               ring_dist(head, f[last].prev_rob) < ring_dist(head, last));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; count <= '0; busy <= 1'b0; stop <= '0;
      entry_valid <= '0; has_dst <= '0; done_o <= '0; done_r <= '0;
      is_br <= '0; brb_in <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        f[i] <= '0; fcode[i] <= '0; pc[i] <= '0; dst[i] <= '0;
      end
    end else if (flush) begin
      head <= '0; tail <= '0; count <= '0; busy <= 1'b0;
      entry_valid <= '0;
    end else begin
      logic [IDX_W:0] n_count;
      n_count = count;
      if (wb_o_valid) done_o[wb_o_idx] <= 1'b1;
      if (wb_r_valid) done_r[wb_r_idx] <= 1'b1;
      if (inj_valid) f[inj_idx].pdst <= f[inj_idx].pdst ^ inj_mask;

      if (cm_pop && hd_ready) begin
        entry_valid[head] <= 1'b0;
        head              <= head + 1'b1;
        n_count           = n_count - 1'b1;
      end

      if (squash_valid && !busy) begin
        if (squash_idx + 1'b1 != tail) begin
          busy <= 1'b1;
          stop <= squash_idx;
        end
      end else if (busy) begin
        entry_valid[last] <= 1'b0;
        tail              <= last;
        n_count           = n_count - 1'b1;
        if (last - 1'b1 == stop) busy <= 1'b0;
      end else if (al_valid && !full) begin
        entry_valid[tail] <= 1'b1;
        has_dst[tail]     <= al_has_dst;
        dst[tail]         <= al_dst;
        f[tail]           <= al_f;
        fcode[tail]       <= al_code;
        pc[tail]          <= al_pc;
        done_o[tail]      <= 1'b0;
        done_r[tail]      <= 1'b0;
        is_br[tail]       <= al_is_branch;
        brb_in[tail]      <= al_brb_in_buf;
        tail              <= tail + 1'b1;
        n_count           = n_count + 1'b1;
      end
      count <= n_count;
    end
  end

endmodule
