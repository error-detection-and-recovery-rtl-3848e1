// lsq_pair: load/store queue for the redundant threads.
//
// The original and the replica copy of a load or store occupy two
// consecutive slots (one pair entry here). Each copy writes its effective
// address (and, for stores, its data) with an error code generated on
// write. Because the caches and memory are trusted, only one memory access is
// made per pair:
//   * a load is issued only once both copies' addresses are present; the two
//     addresses are corroborated (ea_checker: equal -> use; differ but codes
//     equal -> the code picks the good copy; otherwise re-execute) and the
//     single loaded value is returned for both destination registers;
//   * a store is written to memory when it commits, after its address and
//     data pairs are corroborated the same way.
// An unresolvable pair raises chk_fail (re-execute) and stays at the head.
// ld_data is the memory's read data itself: the single load result goes to
// both copies' registers, so it passes through without further logic.
// The queue is in order: only the head pair accesses memory, which keeps
// memory ordering trivially correct (no store-to-load forwarding). The
// ordering policy, the memory handshake (single-cycle read data) and the
// depth are this design's own choices. inj_* XOR a stored address copy.
// A branch misprediction squashes the wrong-path slots: sq_valid with the
// branch's ROB index sq_tag and the ROB head rob_head drops every slot whose
// tag is younger than the branch (the tail moves back; slots are in order).
module lsq_pair
  import stp_pkg::*;
#(
  parameter int DEPTH   = 16,
  parameter int ADDR_W  = 32,
  parameter int DATA_W  = 32,
  parameter int TAG_W   = 6,
  parameter int MAX_ERR = 3,
  localparam int IDX_W  = $clog2(DEPTH),
  localparam int ACW    = edc_width(ADDR_W, MAX_ERR),
  localparam int DCW    = edc_width(DATA_W, MAX_ERR)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              sq_valid,
  input  logic [TAG_W-1:0]  sq_tag,
  input  logic [TAG_W-1:0]  rob_head,
  // allocation of a pair (at dispatch)
  input  logic              al_valid,
  input  logic              al_is_store,
  input  logic [TAG_W-1:0]  al_tag,
  output logic [IDX_W-1:0]  al_idx,
  output logic              full,
  // address generation by either copy (copy 0 original, 1 replica)
  input  logic              ag_valid,
  input  logic              ag_copy,
  input  logic [IDX_W-1:0]  ag_idx,
  input  logic [ADDR_W-1:0] ag_addr,
  input  logic [DATA_W-1:0] ag_data,
  // store commit
  input  logic              st_commit,
  // memory port
  output logic              mem_rd,
  output logic              mem_wr,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  // load result for both copies
  output logic              ld_done,
  output logic [TAG_W-1:0]  ld_tag,
  output logic [DATA_W-1:0] ld_data,
  output logic              st_done,
  output logic              hd_store_ready,   // head store checked, waiting for commit
  output logic              hd_is_store,      // head slot holds a store
  output logic [TAG_W-1:0]  hd_tag,
  output logic              chk_fail,
  output logic              chk_fixed,
  // upset injection into the stored original address
  input  logic              inj_valid,
  input  logic [IDX_W-1:0]  inj_idx,
  input  logic [ADDR_W-1:0] inj_mask
);

  logic [DEPTH-1:0]  v, st, a_ok [2];
  logic [TAG_W-1:0]  tag  [DEPTH];
  logic [ADDR_W-1:0] addr [2][DEPTH];
  logic [ACW-1:0]    acode[2][DEPTH];
  logic [DATA_W-1:0] data [2][DEPTH];
  logic [DCW-1:0]    dcode[2][DEPTH];
  logic [IDX_W-1:0]  head, tail;
  logic [IDX_W:0]    count;

  assign full   = (int'(count) == DEPTH);
  assign al_idx = tail;

  logic [ACW-1:0] ag_acode;
  logic [DCW-1:0] ag_dcode;
  edc_encode #(.DATA_W(ADDR_W), .MAX_ERR(MAX_ERR)) u_enc_a (.data(ag_addr), .code(ag_acode));
  edc_encode #(.DATA_W(DATA_W), .MAX_ERR(MAX_ERR)) u_enc_d (.data(ag_data), .code(ag_dcode));

  // corroboration of the head pair
  logic [ADDR_W-1:0] c_addr;
  logic [DATA_W-1:0] c_data;
  logic a_good, a_fix, a_bad, d_good, d_fix, d_bad;
  ea_checker #(.DATA_W(ADDR_W), .MAX_ERR(MAX_ERR)) u_chk_a (
    .val_a(addr[0][head]), .code_a(acode[0][head]),
    .val_b(addr[1][head]), .code_b(acode[1][head]),
    .val_out(c_addr), .ok(a_good), .corrected(a_fix), .reexec(a_bad));
  ea_checker #(.DATA_W(DATA_W), .MAX_ERR(MAX_ERR)) u_chk_d (
    .val_a(data[0][head]), .code_a(dcode[0][head]),
    .val_b(data[1][head]), .code_b(dcode[1][head]),
    .val_out(c_data), .ok(d_good), .corrected(d_fix), .reexec(d_bad));

  logic both, pass;
  assign both  = v[head] && a_ok[0][head] && a_ok[1][head];
  assign pass  = !a_bad && (!st[head] || !d_bad);
  assign hd_tag = tag[head];
  assign hd_is_store = v[head] && st[head];

  always_comb begin
    mem_rd         = 1'b0;
    mem_wr         = 1'b0;
    mem_addr       = c_addr;
    mem_wdata      = c_data;
    ld_done        = 1'b0;
    st_done        = 1'b0;
    ld_tag         = tag[head];
    ld_data        = mem_rdata;
    chk_fail       = 1'b0;
    chk_fixed      = 1'b0;
    hd_store_ready = 1'b0;
    if (both && !flush && !sq_valid) begin
      if (!pass) chk_fail = 1'b1;
      else if (!st[head]) begin
        mem_rd    = 1'b1;
        ld_done   = 1'b1;
        chk_fixed = a_fix;
      end else begin
        hd_store_ready = 1'b1;
        if (st_commit) begin
          mem_wr    = 1'b1;
          st_done   = 1'b1;
          chk_fixed = a_fix || d_fix;
        end
      end
    end
  end

  // squash point: first slot (in order from the head) younger than the branch
  logic [IDX_W:0] keep;
  always_comb begin
    logic [TAG_W-1:0] br_age;
    logic             found;
    br_age = sq_tag - rob_head;
    keep   = count;
    found  = 1'b0;
    for (int k = 0; k < DEPTH; k++) begin
      logic [IDX_W-1:0] slot;
      slot = head + IDX_W'(k);
      if (!found && k < int'(count) && (tag[slot] - rob_head) > br_age) begin
        keep  = (IDX_W+1)'(k);
        found = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0; st <= '0; a_ok[0] <= '0; a_ok[1] <= '0;
      head <= '0; tail <= '0; count <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        tag[i] <= '0;
        for (int c = 0; c < 2; c++) begin
          addr[c][i] <= '0; acode[c][i] <= '0; data[c][i] <= '0; dcode[c][i] <= '0;
        end
      end
    end else if (flush) begin
      v <= '0; head <= '0; tail <= '0; count <= '0;
    end else begin
      logic [IDX_W:0] n_count;
      n_count = count;
      if (ld_done || st_done) begin
        v[head] <= 1'b0;
        head    <= head + 1'b1;
        n_count = n_count - 1'b1;
      end
      if (sq_valid) begin
        // the head does not access memory and nothing is allocated in a
        // squash cycle
        for (int k = 0; k < DEPTH; k++)
          if (k >= int'(keep) && k < int'(count)) v[IDX_W'(head + IDX_W'(k))] <= 1'b0;
        tail    <= head + IDX_W'(keep);
        n_count = keep;
      end else if (al_valid && !full) begin
        v[tail]       <= 1'b1;
        st[tail]      <= al_is_store;
        tag[tail]     <= al_tag;
        a_ok[0][tail] <= 1'b0;
        a_ok[1][tail] <= 1'b0;
        tail          <= tail + 1'b1;
        n_count       = n_count + 1'b1;
      end
      if (ag_valid) begin
        addr[ag_copy][ag_idx]  <= ag_addr;
        acode[ag_copy][ag_idx] <= ag_acode;
        data[ag_copy][ag_idx]  <= ag_data;
        dcode[ag_copy][ag_idx] <= ag_dcode;
        a_ok[ag_copy][ag_idx]  <= 1'b1;
      end
      if (inj_valid) addr[0][inj_idx] <= addr[0][inj_idx] ^ inj_mask;
      count <= n_count;
    end
  end

endmodule
