// tb_rob: allocation, two-copy writeback, in-order commit, the coded rename
// fields (query port and head check, with injected upsets), misprediction
// walk-back order and its prev_committed re-evaluation, and flush; then a
// long random phase checked every cycle against a queue model.
module tb_rob;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush, al_valid, al_has_dst, al_prev_committed, al_is_branch, al_brb_in_buf, full, empty;
  logic [31:0] al_pc, hd_pc;
  logic [2:0] al_dst, hd_dst, wk_dst;
  logic [3:0] al_pdst, al_prev_pdst, q_pdst, hd_pdst, hd_prev_pdst, wk_pdst, wk_prev_pdst, inj_mask;
  logic [2:0] al_prev_rob, al_idx, wb_o_idx, wb_r_idx, q_idx, hd_idx, squash_idx, wk_prev_rob, inj_idx;
  logic wb_o_valid, wb_r_valid, q_ok, hd_ready, hd_has_dst, hd_is_branch, hd_brb_in_buf, hd_code_err;
  logic cm_pop, squash_valid, wk_valid, wk_has_dst, wk_prev_committed, busy, inj_valid;
  logic [7:0] entry_valid;

  rob #(.DEPTH(8), .NARCH(8), .NPART(16)) dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask
  task automatic idle();
    flush = 0; al_valid = 0; al_has_dst = 1; al_prev_committed = 0; al_is_branch = 0; al_brb_in_buf = 0;
    al_pc = 0; al_dst = 0; al_pdst = 0; al_prev_pdst = 0; al_prev_rob = 0;
    wb_o_valid = 0; wb_r_valid = 0; wb_o_idx = 0; wb_r_idx = 0; q_idx = 0; cm_pop = 0;
    squash_valid = 0; squash_idx = 0; inj_valid = 0; inj_idx = 0; inj_mask = 0;
  endtask
  task automatic step(); @(posedge clk); #1; idle(); endtask
  // entry i: dst i, pdst 8+i, prev_pdst i, prev_rob i-1 (in window for i>0)
  task automatic alloc(input int i);
    al_valid = 1; al_pc = 32'h100 + 8 * i; al_dst = 3'(i); al_pdst = 4'(8 + i);
    al_prev_pdst = 4'(i); al_prev_rob = 3'(i - 1); al_prev_committed = (i == 0);
    al_is_branch = (i == 2); #1;
    chk(al_idx == 3'(i), "alloc idx");
    step();
  endtask

  initial begin
    idle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(empty, "empty at reset");
    for (int i = 0; i < 6; i++) alloc(i);
    chk(entry_valid == 8'b0011_1111, "6 valid");
    // head not ready until both copies are done
    wb_o_valid = 1; wb_o_idx = 0; step();
    #1 chk(!hd_ready, "one copy is not enough");
    wb_r_valid = 1; wb_r_idx = 0; step();
    chk(hd_ready && hd_pc == 32'h100 && hd_pdst == 8 && hd_prev_pdst == 0 && !hd_code_err, "head 0 ready");
    cm_pop = 1; step();
    chk(hd_idx == 1 && !hd_ready, "popped");
    // query port and an upset in entry 3
    q_idx = 3; #1; chk(q_ok && q_pdst == 11, "query clean");
    inj_valid = 1; inj_idx = 3; inj_mask = 4'h4; step();
    q_idx = 3; #1; chk(!q_ok, "query detects upset");
    // upset at the head shows at commit
    inj_valid = 1; inj_idx = 1; inj_mask = 4'h1; step();
    wb_o_valid = 1; wb_o_idx = 1; wb_r_valid = 1; wb_r_idx = 1; step();
    chk(hd_ready && hd_code_err, "head code error");
    cm_pop = 1; step();
    // squash after entry 2: walk 5, 4, 3
    squash_valid = 1; squash_idx = 2; step();
    for (int k = 5; k >= 3; k--) begin
      chk(busy && wk_valid && wk_dst == 3'(k) && wk_prev_pdst == 4'(k) && wk_prev_rob == 3'(k - 1), "walk order");
      // prev writer k-1 is still in the ROB (head is 2) for k-1 >= 2
      chk(wk_prev_committed == (k - 1 < 2), "prev committed flag");
      step();
    end
    chk(!busy && entry_valid == 8'b0000_0100, "only entry 2 left");
    // walk entry whose previous writer already left: allocate 3 again, commit 2, squash after 2? use flush
    flush = 1; step();
    chk(empty && entry_valid == 0, "flushed");
    // random phase against a queue model: allocation, writebacks, commits,
    // upsets of up to two bits per entry, squashes with their walk-back,
    // and the query port, all checked every cycle
    begin
      typedef struct {
        int idx; logic [31:0] pc; logic [2:0] dst; logic [3:0] pdst, diff, prev_pdst;
        logic [2:0] prev_rob; bit pc_flag, o, r, hd;
      } ent_t;
      ent_t m [$];
      int mtail, nsq, ncm, nwk;
      bit mbusy, mfull, mready;
      logic [2:0] mstop;
      mtail = 0; mbusy = 0; mstop = 0; nsq = 0; ncm = 0; nwk = 0;
      for (int c = 0; c < 4000; c++) begin
        logic [7:0] ev;
        ev = 0;
        foreach (m[i]) ev[m[i].idx] = 1;
        q_idx = 3'($urandom_range(7)); #1;
        chk(entry_valid == ev && empty == (m.size() == 0) && full == (m.size() == 8) && busy == mbusy,
            "random: occupancy");
        begin
          bit qv, qbad;
          qv = 0; qbad = 0;
          foreach (m[i]) if (m[i].idx == int'(q_idx)) begin qv = 1; qbad = m[i].diff != 0; end
          chk(q_ok == (qv && !qbad), "random: query check");
        end
        if (m.size() > 0) begin
          chk(hd_idx == 3'(m[0].idx) && hd_ready == (m[0].o && m[0].r && !mbusy), "random: head");
          chk(hd_pc == m[0].pc && hd_dst == m[0].dst && hd_pdst == (m[0].pdst ^ m[0].diff) &&
              hd_prev_pdst == m[0].prev_pdst && hd_code_err == (m[0].diff != 0), "random: head fields");
        end
        if (mbusy) begin
          bit pc_in;
          pc_in = 0;
          for (int i = 0; i < m.size() - 1; i++) if (m[i].idx == int'(m[$].prev_rob)) pc_in = 1;
          chk(wk_valid && wk_dst == m[$].dst && wk_pdst == (m[$].pdst ^ m[$].diff) &&
              wk_prev_pdst == m[$].prev_pdst && wk_prev_rob == m[$].prev_rob &&
              wk_prev_committed == (m[$].pc_flag || !pc_in), "random: walk entry");
        end
        // stimulus
        if (m.size() > 0 && $urandom_range(2) != 0) begin
          int i; i = $urandom_range(m.size() - 1);
          if ($urandom_range(1)) begin wb_o_valid = 1; wb_o_idx = 3'(m[i].idx); end
          else begin wb_r_valid = 1; wb_r_idx = 3'(m[i].idx); end
        end
        if (m.size() > 0 && $urandom_range(9) == 0) begin
          int i; i = $urandom_range(m.size() - 1);
          if ($countones(m[i].diff) < 2) begin
            inj_valid = 1; inj_idx = 3'(m[i].idx); inj_mask = 4'h1 << $urandom_range(3);
            if ((m[i].diff & inj_mask) != 0) inj_valid = 0;
          end
        end
        if (!mbusy && m.size() > 1 && $urandom_range(14) == 0) begin
          squash_valid = 1; squash_idx = 3'(m[$urandom_range(m.size() - 2)].idx);
        end else if ($urandom_range(2) == 0) cm_pop = 1;
        if (!mbusy && !squash_valid && $urandom_range(1)) begin
          al_valid = 1; al_pc = $urandom(); al_dst = 3'($urandom_range(7)); al_has_dst = 1;
          al_pdst = 4'($urandom_range(15)); al_prev_pdst = 4'($urandom_range(15));
          al_prev_rob = 3'($urandom_range(7)); al_prev_committed = 1'($urandom_range(1));
          if (!full) chk(al_idx == 3'(mtail), "random: alloc index");
        end
        // model update, same priority as the design (full and head
        // readiness are sampled before this cycle's commit and writebacks)
        mfull = m.size() == 8;
        mready = m.size() > 0 && m[0].o && m[0].r && !mbusy;
        if (wb_o_valid) foreach (m[i]) if (m[i].idx == int'(wb_o_idx)) m[i].o = 1;
        if (wb_r_valid) foreach (m[i]) if (m[i].idx == int'(wb_r_idx)) m[i].r = 1;
        if (inj_valid) foreach (m[i]) if (m[i].idx == int'(inj_idx)) m[i].diff ^= inj_mask;
        if (cm_pop && mready) begin void'(m.pop_front()); ncm++; end
        if (squash_valid) begin
          if (squash_idx + 3'd1 != 3'(mtail)) begin mbusy = 1; mstop = squash_idx; nsq++; end
        end else if (mbusy) begin
          void'(m.pop_back()); nwk++;
          mtail = (mtail + 7) % 8;
          if (3'(mtail - 1) == mstop) mbusy = 0;
        end else if (al_valid && !mfull) begin
          ent_t e;
          e.idx = mtail; e.pc = al_pc; e.dst = al_dst; e.pdst = al_pdst; e.diff = 0;
          e.prev_pdst = al_prev_pdst; e.prev_rob = al_prev_rob; e.pc_flag = al_prev_committed;
          e.o = 0; e.r = 0; e.hd = 0;
          m.push_back(e);
          mtail = (mtail + 1) % 8;
        end
        step();
      end
      chk(nsq > 20 && ncm > 200 && nwk > 20, "random: enough squashes, commits and walks");
      $display("random phase: %0d commits, %0d squashes, %0d walked entries", ncm, nsq, nwk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
