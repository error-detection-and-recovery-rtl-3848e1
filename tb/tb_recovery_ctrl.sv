// tb_recovery_ctrl: the three policies and the eager/deadlock paths. A
// testbench checkpoint model answers restore_start with restore_done after
// RS_LAT cycles. Checks: LDCR reloads for 200 cycles then flushes (the
// flush pulse follows in the next cycle); LDAR
// re-executes first and restores (5 cycles) only when the same PC errs
// again, and forgets the PC after a clean commit; EDAR re-executes on a
// mismatch, drains on an eager failure (older instructions still commit),
// then restores; deadlock and reexec_req re-execute. A random phase then
// mixes all of these in random modes against a model of the policy.
module tb_recovery_ctrl;
  import stp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  recov_mode_e mode;
  logic cm_check, cm_mismatch, eager_fail, drain_done, dl_detect, reexec_req, restore_done;
  logic [31:0] cm_pc;
  logic cm_ok, flush, restore_start, busy, draining;
  logic [15:0] n_reexec, n_restore, n_passive, n_deadlock;
  localparam int RS_LAT = 1;
  int rs_cnt = -1;

  always @(posedge clk) begin
    restore_done <= 1'b0;
    if (restore_start) rs_cnt <= RS_LAT;
    else if (rs_cnt > 0) rs_cnt <= rs_cnt - 1;
    else if (rs_cnt == 0) begin restore_done <= 1'b1; rs_cnt <= -1; end
  end

  recovery_ctrl dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask
  task automatic idle();
    cm_check = 0; cm_mismatch = 0; cm_pc = 0; eager_fail = 0; drain_done = 0; dl_detect = 0; reexec_req = 0;
  endtask
  task automatic step(); @(posedge clk); #1; idle(); endtask
  // present an error at commit and count cycles until the flush pulse
  task automatic err_at(input logic [31:0] pc, output int cycles);
    cm_check = 1; cm_mismatch = 1; cm_pc = pc; #1;
    chk(!cm_ok, "no commit on mismatch");
    step();
    cycles = 1;
    while (!flush && cycles < 400) begin step(); cycles++; end
    step();
  endtask

  initial begin
    int c;
    idle(); restore_done = 0; mode = MODE_LDCR;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // clean commit
    cm_check = 1; cm_pc = 32'h10; #1; chk(cm_ok, "clean commit"); step();
    // LDCR
    err_at(32'h10, c);
    chk(c == 201 && n_restore == 1 && n_reexec == 0, "LDCR reload 200 cycles");
    // LDAR
    mode = MODE_LDAR;
    err_at(32'h20, c); chk(c == 1 && n_reexec == 1, "LDAR first error re-executes");
    err_at(32'h20, c); chk(c == 6 && n_passive == 1 && n_restore == 2, "LDAR repeated error is passive");
    err_at(32'h30, c); chk(c == 1, "LDAR new pc");
    cm_check = 1; cm_pc = 32'h30; #1; chk(cm_ok, "LDAR active error commits"); step();
    err_at(32'h30, c); chk(c == 1 && n_passive == 1, "LDAR forgot pc after clean commit");
    // EDAR
    mode = MODE_EDAR;
    err_at(32'h40, c); chk(c == 1 && n_restore == 2, "EDAR active error re-executes");
    eager_fail = 1; step();
    chk(draining, "draining");
    cm_check = 1; cm_pc = 32'h44; eager_fail = 1; #1; chk(cm_ok, "older instruction commits while draining"); step();
    drain_done = 1; eager_fail = 1; step();
    c = 1;
    while (!flush && c < 50) begin step(); c++; end
    chk(c == 6 && n_passive == 2, "eager failure restored after drain");
    step();
    // deadlock and reexec request
    dl_detect = 1; step(); chk(flush && n_deadlock == 1, "deadlock re-executes"); step();
    reexec_req = 1; #1; chk(!cm_ok, "no commit on reexec"); step(); chk(flush, "reexec_req re-executes");
    step();
    // random phase: 600 events in random modes (clean commits, commit
    // mismatches, deadlocks, re-execution requests, eager failures with a
    // drain that may be cut short by a mismatch), checked against a model of
    // the policy: recovery length and the four statistics counters
    begin
      int er, es, ep, ed;
      bit mv;
      logic [31:0] mpc, pc;
      er = n_reexec; es = n_restore; ep = n_passive; ed = n_deadlock; mv = 0; mpc = 0;
      for (int e = 0; e < 600; e++) begin
        int kind;
        if ($urandom_range(3) == 0) mode = recov_mode_e'($urandom_range(2));
        pc = 32'h10 + 4 * $urandom_range(2);
        kind = $urandom_range(5);
        // LDCR reloads are long; keep them rare
        if (kind == 1 && mode == MODE_LDCR && $urandom_range(3) != 0) kind = 0;
        case (kind)
          0: begin
            cm_check = 1; cm_pc = pc; #1; chk(cm_ok && !busy, "random: clean commit");
            if (mv && pc == mpc) mv = 0;
            step();
          end
          1, 5: begin
            int want;
            if (mode == MODE_LDCR) begin want = 201; es++; end
            else if (mode == MODE_LDAR && mv && pc == mpc) begin want = 6; es++; ep++; mv = 0; end
            else begin
              want = 1; er++;
              if (mode == MODE_LDAR) begin mv = 1; mpc = pc; end
            end
            err_at(pc, c);
            chk(c == want, "random: recovery length");
          end
          2: begin
            dl_detect = 1; step(); chk(flush, "random: deadlock flush"); step();
            er++; ed++;
          end
          3: begin
            reexec_req = 1; cm_check = 1; cm_pc = pc; #1; chk(!cm_ok, "random: reexec blocks commit");
            step(); chk(flush, "random: reexec flush"); step();
            er++;
          end
          4: begin
            eager_fail = 1; step(); chk(draining, "random: drain");
            repeat ($urandom_range(3)) begin
              eager_fail = 1; cm_check = 1; cm_pc = pc; #1; chk(cm_ok, "random: older commit while draining");
              if (mv && pc == mpc) mv = 0;
              step();
            end
            if ($urandom_range(2) == 0) begin
              int want;
              // an older instruction mismatches: the policy of the mode applies
              if (mode == MODE_LDCR) begin want = 201; es++; end
              else if (mode == MODE_LDAR && mv && pc == mpc) begin want = 6; es++; ep++; mv = 0; end
              else begin
                want = 1; er++;
                if (mode == MODE_LDAR) begin mv = 1; mpc = pc; end
              end
              err_at(pc, c);
              chk(c == want && !draining, "random: mismatch while draining");
            end else begin
              drain_done = 1; step();
              c = 1;
              while (!flush && c < 50) begin step(); c++; end
              chk(c == 6, "random: restore after drain");
              step();
              es++; ep++;
            end
          end
        endcase
        chk(n_reexec == 16'(er) && n_restore == 16'(es) && n_passive == 16'(ep) && n_deadlock == 16'(ed),
            "random: statistics counters");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
