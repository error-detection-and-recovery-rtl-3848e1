// err_rename: Efficient Register Renaming with an error-coded map table and
// the ROB index table used to repair it (eager detection, EDAR).
//
// Renaming. One rename map table serves both threads: the original copy of
// an instruction gets physical register p of partition 0 and its replica
// gets the twin p+NPART in partition 1, so the replica's mapping is derived,
// not stored. Free registers are taken from a bitmap of partition 0 (lowest
// free first); freeing p frees both twins. Renaming stalls when no register
// is free. One instruction is renamed per cycle (assumed width).
//
// Local checkpointing. Every map entry stores an error code (MAX_ERR = 3)
// that is checked whenever the entry is read. Next to each map entry the
// ROB index table records the ROB index of the last instruction that wrote
// the entry plus a committed bit, under its own code. A map entry that fails
// its check is repaired in one stall cycle: if the committed bit is set the
// committed map (rmap, the checkpointed mapping) holds the right value;
// otherwise the current mapping is read from that ROB entry through the
// query port. If the ROB index table entry or the ROB entry is itself
// corrupt, map_fail is raised and renaming stalls until recovery restores
// the map from the committed map (flush).
//
// Commit writes the committed map, frees the previous mapping and sets the
// committed bit if the committing instruction is still the last writer.
// Misprediction walk-back restores map entries and ROB index table entries
// from the previous mapping / previous ROB index kept in the ROB. flush
// (which must not coincide with a commit) copies the committed map into the map table, marks every ROB index table
// entry committed and rebuilds the free list.
module err_rename
  import stp_pkg::*;
#(
  parameter int NARCH     = 32,
  parameter int NPART     = 64,
  parameter int ROB_DEPTH = 64,
  localparam int AW       = $clog2(NARCH),
  localparam int PRW      = $clog2(NPART),
  localparam int IDX_W    = $clog2(ROB_DEPTH),
  localparam int MCW      = edc_width(PRW, MAXERR_MAP),
  localparam int RCW      = edc_width(IDX_W + 1, MAXERR_ROB_INDEX)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  // rename request (fires when ren_valid && ren_ready)
  input  logic             ren_valid,
  input  logic [AW-1:0]    ren_src1,
  input  logic [AW-1:0]    ren_src2,
  input  logic             ren_has_dst,
  input  logic [AW-1:0]    ren_dst,
  input  logic [IDX_W-1:0] ren_rob_idx,
  output logic             ren_ready,
  output logic [PRW-1:0]   ren_psrc1,
  output logic [PRW-1:0]   ren_psrc2,
  output logic [PRW-1:0]   ren_pdst,
  output logic [PRW-1:0]   ren_prev_pdst,
  output logic [IDX_W-1:0] ren_prev_rob,
  output logic             ren_prev_committed,
  output logic             no_free,
  output logic             map_fix,     // a map entry was repaired this cycle
  output logic             map_fail,    // corrupt beyond local repair
  // ROB query port for repair
  output logic [IDX_W-1:0] q_idx,
  input  logic [PRW-1:0]   q_pdst,
  input  logic             q_ok,
  // commit
  input  logic             cm_valid,
  input  logic             cm_has_dst,
  input  logic [AW-1:0]    cm_dst,
  input  logic [PRW-1:0]   cm_pdst,
  input  logic [PRW-1:0]   cm_prev_pdst,
  input  logic [IDX_W-1:0] cm_rob_idx,
  // misprediction walk-back
  input  logic             wk_valid,
  input  logic             wk_has_dst,
  input  logic [AW-1:0]    wk_dst,
  input  logic [PRW-1:0]   wk_pdst,
  input  logic [PRW-1:0]   wk_prev_pdst,
  input  logic [IDX_W-1:0] wk_prev_rob,
  input  logic             wk_prev_committed,
  // committed map read (checkpoint restore)
  input  logic [AW-1:0]    rt_arch,
  output logic [PRW-1:0]   rt_preg,
  // upset injection
  input  logic             inj_map_valid,
  input  logic             inj_rit_valid,
  input  logic [AW-1:0]    inj_arch,
  input  logic [PRW-1:0]   inj_map_mask,
  input  logic [IDX_W:0]   inj_rit_mask
);

  typedef struct packed {
    logic [IDX_W-1:0] rob;
    logic             committed;
  } rit_t;

  logic [PRW-1:0] map   [NARCH];
  logic [MCW-1:0] mcode [NARCH];
  rit_t           rit   [NARCH];
  logic [RCW-1:0] rcode [NARCH];
  logic [PRW-1:0] rmap  [NARCH];
  logic [NPART-1:0] free_map;

  assign rt_preg = rmap[rt_arch];

  // ---- map reads and their checks
  logic [MCW-1:0] regen_s1, regen_s2, regen_d;
  edc_encode #(.DATA_W(PRW), .MAX_ERR(MAXERR_MAP)) u_chk_s1 (.data(map[ren_src1]), .code(regen_s1));
  edc_encode #(.DATA_W(PRW), .MAX_ERR(MAXERR_MAP)) u_chk_s2 (.data(map[ren_src2]), .code(regen_s2));
  edc_encode #(.DATA_W(PRW), .MAX_ERR(MAXERR_MAP)) u_chk_d  (.data(map[ren_dst]),  .code(regen_d));

  logic bad_s1, bad_s2, bad_d, any_bad;
  assign bad_s1  = (regen_s1 != mcode[ren_src1]);
  assign bad_s2  = (regen_s2 != mcode[ren_src2]);
  assign bad_d   = ren_has_dst && (regen_d != mcode[ren_dst]);
  assign any_bad = ren_valid && (bad_s1 || bad_s2 || bad_d);

  logic [AW-1:0] fix_arch;
  always_comb begin
    if (bad_s1)      fix_arch = ren_src1;
    else if (bad_s2) fix_arch = ren_src2;
    else             fix_arch = ren_dst;
  end

  logic [RCW-1:0] regen_rit;
  edc_encode #(.DATA_W(IDX_W + 1), .MAX_ERR(MAXERR_ROB_INDEX)) u_chk_rit (.data(rit[fix_arch]), .code(regen_rit));

  logic           rit_ok;
  logic [PRW-1:0] fix_val;
  assign rit_ok = (regen_rit == rcode[fix_arch]);
  assign q_idx  = rit[fix_arch].rob;

  always_comb begin
    map_fix  = 1'b0;
    map_fail = 1'b0;
    fix_val  = rmap[fix_arch];
    if (any_bad && !flush && !wk_valid) begin
      if (!rit_ok)                          map_fail = 1'b1;
      else if (rit[fix_arch].committed)     map_fix  = 1'b1;
      else if (q_ok) begin
        map_fix = 1'b1;
        fix_val = q_pdst;
      end else                              map_fail = 1'b1;
    end
  end

  // ---- free register choice
  logic [PRW-1:0] free_idx;
  always_comb begin
    free_idx = '0;
    for (int i = NPART - 1; i >= 0; i--) if (free_map[i]) free_idx = PRW'(i);
  end
  assign no_free = (free_map == '0);

  assign ren_ready          = !any_bad && !wk_valid && !flush && (!ren_has_dst || !no_free);
  assign ren_psrc1          = map[ren_src1];
  assign ren_psrc2          = map[ren_src2];
  assign ren_pdst           = free_idx;
  assign ren_prev_pdst      = map[ren_dst];
  assign ren_prev_rob       = rit[ren_dst].rob;
  assign ren_prev_committed = rit[ren_dst].committed;

  logic fire;
  assign fire = ren_valid && ren_ready && ren_has_dst;

  // ---- codes for the values written this cycle
  rit_t           ren_rit_new, cm_rit_new, wk_rit_new;
  logic [MCW-1:0] code_new, code_fix, code_wk;
  logic [RCW-1:0] rcode_new, rcode_cm, rcode_wk;
  assign ren_rit_new = '{rob: ren_rob_idx, committed: 1'b0};
  assign cm_rit_new  = '{rob: rit[cm_dst].rob, committed: 1'b1};
  assign wk_rit_new  = '{rob: wk_prev_rob, committed: wk_prev_committed};
  edc_encode #(.DATA_W(PRW), .MAX_ERR(MAXERR_MAP)) u_enc_new (.data(free_idx),     .code(code_new));
  edc_encode #(.DATA_W(PRW), .MAX_ERR(MAXERR_MAP)) u_enc_fix (.data(fix_val),      .code(code_fix));
  edc_encode #(.DATA_W(PRW), .MAX_ERR(MAXERR_MAP)) u_enc_wk  (.data(wk_prev_pdst), .code(code_wk));
  edc_encode #(.DATA_W(IDX_W + 1), .MAX_ERR(MAXERR_ROB_INDEX)) u_enc_rn (.data(ren_rit_new), .code(rcode_new));
  edc_encode #(.DATA_W(IDX_W + 1), .MAX_ERR(MAXERR_ROB_INDEX)) u_enc_rc (.data(cm_rit_new),  .code(rcode_cm));
  edc_encode #(.DATA_W(IDX_W + 1), .MAX_ERR(MAXERR_ROB_INDEX)) u_enc_rw (.data(wk_rit_new),  .code(rcode_wk));

  // codes of the reset / flush state: map[a] = rmap[a], committed ROB index 0
  logic [MCW-1:0] rst_mcode [NARCH];
  logic [MCW-1:0] rm_mcode  [NARCH];
  logic [RCW-1:0] rst_rcode;
  rit_t           rst_rit;
  assign rst_rit = '{rob: '0, committed: 1'b1};
  edc_encode #(.DATA_W(IDX_W + 1), .MAX_ERR(MAXERR_ROB_INDEX)) u_enc_rr (.data(rst_rit), .code(rst_rcode));
  for (genvar a = 0; a < NARCH; a++) begin : g_codes
    edc_encode #(.DATA_W(PRW), .MAX_ERR(MAXERR_MAP)) u_rst (.data(PRW'(a)), .code(rst_mcode[a]));
    edc_encode #(.DATA_W(PRW), .MAX_ERR(MAXERR_MAP)) u_rm  (.data(rmap[a]), .code(rm_mcode[a]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NARCH; a++) begin
        map[a]   <= PRW'(a);
        mcode[a] <= rst_mcode[a];
        rmap[a]  <= PRW'(a);
        rit[a]   <= rst_rit;
        rcode[a] <= rst_rcode;
      end
      for (int p = 0; p < NPART; p++) free_map[p] <= (p >= NARCH);
    end else if (flush) begin
      logic [NPART-1:0] used;
      used = '0;
      for (int a = 0; a < NARCH; a++) used[rmap[a]] = 1'b1;
      for (int a = 0; a < NARCH; a++) begin
        map[a]   <= rmap[a];
        mcode[a] <= rm_mcode[a];
        rit[a]   <= rst_rit;
        rcode[a] <= rst_rcode;
      end
      free_map <= ~used;
    end else begin
      logic [NPART-1:0] n_free;
      n_free = free_map;
      // commit
      if (cm_valid && cm_has_dst) begin
        rmap[cm_dst]         <= cm_pdst;
        n_free[cm_prev_pdst] = 1'b1;
        if (rit[cm_dst].rob == cm_rob_idx && !rit[cm_dst].committed) begin
          rit[cm_dst]   <= cm_rit_new;
          rcode[cm_dst] <= rcode_cm;
        end
      end
      // walk-back of a squashed instruction
      if (wk_valid && wk_has_dst) begin
        map[wk_dst]     <= wk_prev_pdst;
        mcode[wk_dst]   <= code_wk;
        rit[wk_dst]     <= wk_rit_new;
        rcode[wk_dst]   <= rcode_wk;
        n_free[wk_pdst] = 1'b1;
      end
      // local repair of a corrupt map entry
      if (map_fix) begin
        map[fix_arch]   <= fix_val;
        mcode[fix_arch] <= code_fix;
      end
      // new mapping
      if (fire) begin
        map[ren_dst]      <= free_idx;
        mcode[ren_dst]    <= code_new;
        rit[ren_dst]      <= ren_rit_new;
        rcode[ren_dst]    <= rcode_new;
        n_free[free_idx]  = 1'b0;
      end
      // upsets
      if (inj_map_valid) map[inj_arch] <= map[inj_arch] ^ inj_map_mask;
      if (inj_rit_valid) rit[inj_arch] <= rit[inj_arch] ^ inj_rit_mask;
      free_map <= n_free;
    end
  end

endmodule
