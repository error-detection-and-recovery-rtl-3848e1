// tb_err_rename: ERR renaming with a small testbench ROB model. Checks the
// free-register choice, previous mapping and ROB index table outputs, local
// repair of a corrupt map entry from the ROB (last writer in flight) and
// from the committed map (last writer committed), map_fail when the ROB
// index table entry is corrupt too, flush restore, walk-back restore and the
// no-free-register stall, then a random phase of renames, commits and
// map upsets against a model of the speculative and committed maps.
module tb_err_rename;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush, ren_valid, ren_has_dst, ren_ready, ren_prev_committed, no_free, map_fix, map_fail;
  logic [2:0] ren_src1, ren_src2, ren_dst, cm_dst, wk_dst, rt_arch, inj_arch;
  logic [2:0] ren_rob_idx, ren_prev_rob, q_idx, cm_rob_idx, wk_prev_rob;
  logic [3:0] ren_psrc1, ren_psrc2, ren_pdst, ren_prev_pdst, q_pdst, cm_pdst, cm_prev_pdst;
  logic [3:0] wk_pdst, wk_prev_pdst, rt_preg, inj_map_mask;
  logic q_ok, cm_valid, cm_has_dst, wk_valid, wk_has_dst, wk_prev_committed;
  logic inj_map_valid, inj_rit_valid;
  logic [3:0] inj_rit_mask;

  // testbench ROB: current mapping per index
  logic [3:0] rob_map [8];
  logic [7:0] rob_v;
  assign q_pdst = rob_map[q_idx];
  assign q_ok   = rob_v[q_idx];

  err_rename #(.NARCH(8), .NPART(16), .ROB_DEPTH(8)) dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask
  task automatic idle();
    flush = 0; ren_valid = 0; ren_has_dst = 0; ren_src1 = 0; ren_src2 = 0; ren_dst = 0; ren_rob_idx = 0;
    cm_valid = 0; cm_has_dst = 0; cm_dst = 0; cm_pdst = 0; cm_prev_pdst = 0; cm_rob_idx = 0;
    wk_valid = 0; wk_has_dst = 0; wk_dst = 0; wk_pdst = 0; wk_prev_pdst = 0; wk_prev_rob = 0;
    wk_prev_committed = 0; rt_arch = 0; inj_map_valid = 0; inj_rit_valid = 0; inj_arch = 0;
    inj_map_mask = 0; inj_rit_mask = 0;
  endtask
  task automatic step(); @(posedge clk); #1; idle(); endtask
  task automatic ren(input int s1, input int s2, input int d, input int rob);
    ren_valid = 1; ren_has_dst = 1; ren_src1 = 3'(s1); ren_src2 = 3'(s2); ren_dst = 3'(d);
    ren_rob_idx = 3'(rob); #1;
  endtask

  initial begin
    idle(); rob_v = 0;
    for (int i = 0; i < 8; i++) rob_map[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // 1. first rename of r1
    ren(2, 3, 1, 0);
    chk(ren_ready && ren_pdst == 8 && ren_psrc1 == 2 && ren_psrc2 == 3, "rename 1");
    chk(ren_prev_pdst == 1 && ren_prev_committed, "prev mapping is committed arch");
    rob_map[0] = ren_pdst; rob_v[0] = 1; step();
    // 2. second rename of r1
    ren(1, 0, 1, 1);
    chk(ren_ready && ren_pdst == 9 && ren_psrc1 == 8 && ren_prev_pdst == 8, "rename 2");
    chk(ren_prev_rob == 0 && !ren_prev_committed, "prev rob 0 in flight");
    rob_map[1] = ren_pdst; rob_v[1] = 1; step();
    // 3. corrupt map[r1]: repaired from ROB entry 1
    inj_map_valid = 1; inj_arch = 1; inj_map_mask = 4'h3; step();
    ren(1, 0, 4, 2);
    chk(!ren_ready && map_fix && !map_fail && q_idx == 1, "repair from ROB");
    step();
    ren(1, 0, 4, 2);
    chk(ren_ready && ren_psrc1 == 9 && ren_pdst == 10, "repaired value used");
    rob_map[2] = ren_pdst; rob_v[2] = 1; step();
    // 4. commit rob 0 and rob 1
    cm_valid = 1; cm_has_dst = 1; cm_dst = 1; cm_pdst = 8; cm_prev_pdst = 1; cm_rob_idx = 0; step();
    rob_v[0] = 0;
    cm_valid = 1; cm_has_dst = 1; cm_dst = 1; cm_pdst = 9; cm_prev_pdst = 8; cm_rob_idx = 1; step();
    rob_v[1] = 0;
    rt_arch = 1; #1; chk(rt_preg == 9, "committed map");
    ren(1, 0, 1, 3); chk(ren_prev_committed && ren_prev_rob == 1, "committed bit set");
    idle();
    inj_map_valid = 1; inj_arch = 1; inj_map_mask = 4'h8; step();
    ren(0, 1, 5, 3);
    chk(map_fix && !ren_ready, "repair from committed map");
    step();
    ren(0, 1, 5, 3); chk(ren_ready && ren_psrc2 == 9, "repaired from committed map");
    idle(); step();
    // 5. corrupt map and ROB index table: fail
    inj_map_valid = 1; inj_rit_valid = 1; inj_arch = 4; inj_map_mask = 4'h1; inj_rit_mask = 4'h2; step();
    ren(4, 0, 6, 3); chk(map_fail && !ren_ready, "map fail");
    idle();
    // 6. flush restores from committed map
    flush = 1; step();
    ren(4, 1, 6, 0); chk(ren_ready && ren_psrc1 == 4 && ren_psrc2 == 9, "flush restore");
    chk(ren_pdst == 1, "freed register reused (lowest free)");
    step();
    // 7. walk-back of that rename
    wk_valid = 1; wk_has_dst = 1; wk_dst = 6; wk_pdst = 1; wk_prev_pdst = 6; wk_prev_rob = 0;
    wk_prev_committed = 1; step();
    ren(6, 6, 7, 1); chk(ren_psrc1 == 6 && ren_prev_committed && ren_pdst == 1, "walk restored");
    idle(); step();
    // 8. exhaust free list
    begin
      int n = 0;
      while (n < 20) begin
        ren(0, 0, 7, 0);
        if (!ren_ready) break;
        n++; step();
      end
      chk(no_free && n == 8, "no free after 8 renames");
    end
    // 9. random phase: renames, in-order commits and single-bit map upsets
    //    against a model of the speculative and committed maps
    idle(); flush = 1; rob_v = 0; step();
    begin
      logic [3:0] mm [8], rm [8];
      int q_d [$], q_p [$], q_pp [$], q_r [$];
      int robn;
      robn = 0;
      for (int a = 0; a < 8; a++) begin rt_arch = 3'(a); #1; rm[a] = rt_preg; mm[a] = rt_preg; end
      idle(); step();  // back to one time unit after a clock edge
      for (int c = 0; c < 1500; c++) begin
        int op;
        op = $urandom_range(9);
        if (op < 5 && q_d.size() < 7) begin
          int s1, s2, d, tries;
          bit live;
          s1 = $urandom_range(7); s2 = $urandom_range(7); d = $urandom_range(7);
          tries = 0;
          ren(s1, s2, d, robn);
          while (!ren_ready && map_fix && tries < 3) begin step(); ren(s1, s2, d, robn); tries++; end
          chk(!map_fail, "random: no map_fail on single upsets");
          if (ren_ready) begin
            chk(ren_psrc1 == mm[s1] && ren_psrc2 == mm[s2] && ren_prev_pdst == mm[d], "random: mappings");
            if (!(ren_psrc1 == mm[s1] && ren_psrc2 == mm[s2] && ren_prev_pdst == mm[d])) $display("  s1 %0d->%0d exp %0d s2 %0d->%0d exp %0d d %0d prev %0d exp %0d tries %0d", s1, ren_psrc1, mm[s1], s2, ren_psrc2, mm[s2], d, ren_prev_pdst, mm[d], tries);
            live = 0;
            for (int a = 0; a < 8; a++) if (ren_pdst == mm[a] || ren_pdst == rm[a]) live = 1;
            foreach (q_p[i]) if (ren_pdst == 4'(q_p[i]) || ren_pdst == 4'(q_pp[i])) live = 1;
            chk(!live, "random: new register is free");
            q_d.push_back(d); q_p.push_back(int'(ren_pdst)); q_pp.push_back(int'(mm[d])); q_r.push_back(robn);
            rob_map[robn] = ren_pdst; rob_v[robn] = 1;
            mm[d] = ren_pdst;
            if ($test$plusargs("dbg")) $display("  t=%0t ren r%0d r%0d -> r%0d p%0d rob %0d", $time, s1, s2, d, ren_pdst, robn);
            robn = (robn + 1) % 8;
          end else begin
            chk(no_free, "random: rename stalls only without free registers");
          end
          step();
        end else if (op < 9 && q_d.size() > 0) begin
          int d, pd, pp, r;
          d = q_d.pop_front(); pd = q_p.pop_front(); pp = q_pp.pop_front(); r = q_r.pop_front();
          cm_valid = 1; cm_has_dst = 1; cm_dst = 3'(d); cm_pdst = 4'(pd); cm_prev_pdst = 4'(pp);
          cm_rob_idx = 3'(r); step();
          rob_v[r] = 0;
          rm[d] = 4'(pd);
          if ($test$plusargs("dbg")) $display("  t=%0t commit r%0d p%0d", $time, d, pd);
          rt_arch = 3'(d); #1; chk(rt_preg == 4'(pd), "random: committed map"); idle(); step();
        end else begin
          inj_map_valid = 1; inj_arch = 3'($urandom_range(7)); inj_map_mask = 4'h1 << $urandom_range(3);
          if ($test$plusargs("dbg")) $display("  t=%0t upset r%0d mask %h", $time, inj_arch, inj_map_mask);
          step();
        end
      end
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
