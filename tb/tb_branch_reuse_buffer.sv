// tb_branch_reuse_buffer: directed sequences with hand-worked expectations:
// allocation order, recording of mispredicted outcomes only, replay with
// override of stored outcomes, replay end at the tail, overflow counting
// when full (and counting until the counter drains), squash of buffered and
// counted branches, misprediction during replay, and counter saturation;
// then a random phase checked against a model of the buffer.
module tb_branch_reuse_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic alloc_valid, alloc_stall, alloc_in_buf, reuse_hit, reuse_taken;
  logic [3:0] alloc_idx, eval_idx, squash_idx;
  logic [3:0] alloc_ord, squash_ord;
  logic [31:0] reuse_target, eval_target;
  logic eval_valid, eval_in_buf, eval_mispred, eval_taken;
  logic squash_valid, squash_in_buf, commit_valid, commit_in_buf, replay_start;
  logic replaying, full;
  logic [4:0] count;
  logic [3:0] ovf_count;

  branch_reuse_buffer dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic idle();
    alloc_valid = 0; eval_valid = 0; squash_valid = 0; commit_valid = 0; replay_start = 0;
    eval_in_buf = 1; eval_mispred = 0; eval_taken = 0; eval_target = 0; eval_idx = 0;
    squash_in_buf = 1; squash_idx = 0; squash_ord = 0; commit_in_buf = 1;
  endtask

  task automatic step();
    @(posedge clk); #1; idle();
  endtask

  // allocate one branch and check the index/in_buf it gets
  task automatic alloc(input bit exp_in, input int exp_idx, input string what);
    alloc_valid = 1; #0;
    #1;
    chk(alloc_in_buf == exp_in && (!exp_in || alloc_idx == 4'(exp_idx)), what);
    step();
  endtask

  initial begin
    idle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // 1. three branches
    alloc(1, 0, "a0"); alloc(1, 1, "a1"); alloc(1, 2, "a2");
    chk(count == 3, "count 3");
    // evaluation: idx1 mispredicted (taken to 0x1230), idx0 correct
    eval_valid = 1; eval_idx = 1; eval_mispred = 1; eval_taken = 1; eval_target = 32'h1230; step();
    eval_valid = 1; eval_idx = 0; eval_mispred = 0; eval_taken = 1; eval_target = 32'h9990; step();
    // 2. replay
    replay_start = 1; step();
    chk(replaying, "replaying");
    alloc_valid = 1; #1; chk(alloc_idx == 0 && !reuse_hit, "replay 0 no hit"); step();
    alloc_valid = 1; #1; chk(alloc_idx == 1 && reuse_hit && reuse_taken && reuse_target == 32'h1230, "replay 1 hit"); step();
    alloc_valid = 1; #1; chk(alloc_idx == 2 && !reuse_hit, "replay 2 no hit"); step();
    chk(!replaying && count == 3, "replay ended at tail");
    // 3. commit all
    repeat (3) begin commit_valid = 1; step(); end
    chk(count == 0, "empty");
    // 4. fill: head is now 3
    for (int i = 0; i < 16; i++) alloc(1, (3 + i) % 16, "fill");
    chk(full, "full");
    alloc(0, 0, "ovf1"); chk(ovf_count == 1, "ovf 1");
    chk(alloc_ord == 2, "next ord 2");
    alloc(0, 0, "ovf2"); chk(ovf_count == 2, "ovf 2");
    // commit one buffered: not full but counter non-zero -> still counted
    commit_valid = 1; step();
    chk(!full && count == 15, "15 after commit");
    alloc(0, 0, "ovf3 keeps counting"); chk(ovf_count == 3, "ovf 3");
    // squash younger than counted branch with ordinal 1
    squash_valid = 1; squash_in_buf = 0; squash_ord = 1; step();
    chk(ovf_count == 1, "ovf trimmed to 1");
    // squash younger than buffered entry idx 6 (head is 4): keeps 4,5,6
    squash_valid = 1; squash_in_buf = 1; squash_idx = 6; step();
    chk(count == 3 && ovf_count == 0, "squash keeps 3");
    alloc(1, 7, "alloc after squash");
    // 5. misprediction during replay ends the replay
    replay_start = 1; step();
    chk(replaying, "replay 2 start");
    alloc_valid = 1; #1; chk(alloc_idx == 4, "replay from head"); step();
    squash_valid = 1; squash_in_buf = 1; squash_idx = 4; step();
    chk(!replaying && count == 1, "replay ended by squash");
    alloc(1, 5, "new alloc after replay");
    // 6. counter saturation stalls
    while (!full) alloc(1, alloc_idx, "refill");
    for (int i = 0; i < 15; i++) begin alloc_valid = 1; step(); end
    chk(ovf_count == 15 && alloc_stall, "saturated stall");
    // random phase: allocation, commit of the oldest branch, evaluations,
    // squashes of buffered and counted branches and complete replays,
    // one operation per cycle, checked against a model of the buffer
    replay_start = 1; step();
    while (replaying) begin alloc_valid = 1; step(); end
    while (count != 0) begin commit_valid = 1; step(); end
    begin
      typedef struct { int idx; bit ev, tk; logic [31:0] tg; } ent_t;
      ent_t q [$];
      int mtail, ovf, nrep, nhit;
      mtail = int'(alloc_idx); ovf = 0; nrep = 0; nhit = 0;
      for (int c = 0; c < 3000; c++) begin
        int op;
        #1;
        chk(int'(count) == q.size() && full == (q.size() == 16) && int'(ovf_count) == ovf && !replaying,
            "random: occupancy");
        op = $urandom_range(99);
        if (op < 40) begin
          bit ein;
          ein = q.size() < 16 && ovf == 0;
          alloc_valid = 1; #1;
          chk(alloc_stall == (ovf == 15) && alloc_in_buf == ein && (!ein || int'(alloc_idx) == mtail),
              "random: allocation");
          if (!alloc_stall) begin
            if (ein) begin
              ent_t e; e.idx = mtail; e.ev = 0; e.tk = 0; e.tg = 0;
              q.push_back(e); mtail = (mtail + 1) % 16;
            end else ovf++;
          end
          step();
        end else if (op < 70) begin
          if (q.size() > 0) begin commit_valid = 1; commit_in_buf = 1; void'(q.pop_front()); end
          else if (ovf > 0) begin commit_valid = 1; commit_in_buf = 0; ovf--; end
          step();
        end else if (op < 85) begin
          if (q.size() > 0) begin
            int k; k = $urandom_range(q.size() - 1);
            eval_valid = 1; eval_idx = 4'(q[k].idx); eval_mispred = 1'($urandom_range(1));
            eval_taken = 1'($urandom_range(1)); eval_target = $urandom();
            if (eval_mispred) begin q[k].ev = 1; q[k].tk = eval_taken; q[k].tg = eval_target; end
          end
          step();
        end else if (op < 92) begin
          if (ovf > 0 && $urandom_range(1)) begin
            squash_valid = 1; squash_in_buf = 0; squash_ord = 4'($urandom_range(ovf, 1));
            ovf = int'(squash_ord);
          end else if (q.size() > 0) begin
            int k; k = $urandom_range(q.size() - 1);
            squash_valid = 1; squash_in_buf = 1; squash_idx = 4'(q[k].idx);
            while (q.size() > k + 1) void'(q.pop_back());
            mtail = (q[k].idx + 1) % 16; ovf = 0;
          end
          step();
        end else begin
          // recovery: replay every buffered branch in order
          replay_start = 1; step();
          ovf = 0; nrep++;
          chk(replaying == (q.size() > 0), "random: replay start");
          foreach (q[i]) begin
            alloc_valid = 1; #1;
            chk(replaying && alloc_in_buf && int'(alloc_idx) == q[i].idx && reuse_hit == q[i].ev &&
                (!q[i].ev || (reuse_taken == q[i].tk && reuse_target == q[i].tg)), "random: replayed outcome");
            if (q[i].ev) nhit++;
            step();
          end
          #1; chk(!replaying, "random: replay ends at the tail");
        end
      end
      chk(nrep > 50 && nhit > 50, "random: enough replays and reused outcomes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
