// tb_dl_monitor: a ROB of 16 entries in sets of 4 with threshold 20. An
// entry that never commits must raise dl_detect exactly THRESH cycles after
// its set's first entry was allocated; sets whose entries drain in time must
// not; allocating the first entry of a set restarts its counter; clear
// drops the report. A random phase then drives random allocations, valid
// patterns and clears and compares dl_detect/dl_set every cycle with a
// reference model of the shared counters.
module tb_dl_monitor;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, alloc_valid, dl_detect;
  logic [3:0] alloc_idx;
  logic [15:0] entry_valid;
  logic [1:0] dl_set;

  dl_monitor #(.ROB_DEPTH(16), .SET_SIZE(4), .THRESH(20)) dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    int t0;
    clear = 0; alloc_valid = 0; alloc_idx = 0; entry_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // set 1 (entries 4..7): entry 4 allocated and stays valid
    alloc_valid = 1; alloc_idx = 4; @(posedge clk); #1;
    alloc_valid = 0; entry_valid[4] = 1;
    // set 2: entries valid only 10 cycles
    alloc_valid = 1; alloc_idx = 8; @(posedge clk); #1;
    alloc_valid = 0; entry_valid[8] = 1;
    t0 = 0;
    for (int c = 0; c < 30 && !dl_detect; c++) begin
      if (c == 10) entry_valid[8] = 0;
      @(posedge clk); #1; t0++;
    end
    // counter of set 1 started one cycle before set 2's allocation
    chk(dl_detect && dl_set == 1, "deadlock in set 1");
    chk(t0 == 19, "detected after THRESH cycles");
    clear = 1; @(posedge clk); #1; clear = 0;
    chk(!dl_detect, "cleared");
    // restart by re-allocating the first entry of the set every 15 cycles
    for (int r = 0; r < 3; r++) begin
      repeat (15) begin @(posedge clk); #1; end
      chk(!dl_detect, "no report while set keeps restarting");
      alloc_valid = 1; alloc_idx = 4; @(posedge clk); #1; alloc_valid = 0;
    end
    // random phase against a reference model
    begin
      int mc [4];
      bit md;
      int ms;
      clear = 1; entry_valid = 0; @(posedge clk); #1; clear = 0;
      for (int i = 0; i < 4; i++) mc[i] = 0;
      md = 0; ms = 0;
      for (int c = 0; c < 3000; c++) begin
        int hits, hit_set;
        alloc_valid = ($urandom_range(3) == 0);
        alloc_idx   = 4'($urandom_range(15));
        clear       = ($urandom_range(99) == 0);
        // entries mostly stay valid so that counters do reach the threshold
        if ($urandom_range(7) == 0) entry_valid = 16'($urandom());
        // model of the next state
        hits = 0; hit_set = 0;
        if (clear) begin
          md = 0;
          for (int i = 0; i < 4; i++) mc[i] = 0;
        end else begin
          for (int i = 0; i < 4; i++) begin
            if (alloc_valid && int'(alloc_idx) == 4 * i) mc[i] = 0;
            else if (entry_valid[4*i +: 4] != 0) begin
              if (mc[i] == 19 && !md) begin hits++; hit_set = i; end
              if (mc[i] < 20) mc[i]++;
            end
          end
          if (hits > 0) begin md = 1; ms = hit_set; end
        end
        @(posedge clk); #1;
        chk(dl_detect == md, "random: dl_detect matches model");
        if (md && hits == 1) chk(int'(dl_set) == ms, "random: dl_set matches model");
        clear = 0; alloc_valid = 0;
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
