// tb_ckpt_rf: commits values to a 16-register checkpoint, then starts a
// restore and checks that every register is replayed once, in order, with
// the last committed value, that the walk takes NARCH cycles and that
// restore_done pulses once at the end; repeated over 30 random rounds, with
// restore_start pulses during a walk that must be ignored.
module tb_ckpt_rf;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cm_valid, restore_start, rs_valid, restore_done, busy;
  logic [3:0] cm_arch, rs_arch;
  logic [31:0] cm_data, rs_data;
  logic [31:0] refv [16];

  ckpt_rf #(.NARCH(16)) dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    int n, ndone;
    cm_valid = 0; cm_arch = 0; cm_data = 0; restore_start = 0;
    for (int i = 0; i < 16; i++) refv[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // 30 rounds: a random number of commits, then a restore during which
    // further restore_start pulses arrive at random and must be ignored
    for (int round = 0; round < 30; round++) begin
      repeat ($urandom_range(60, 1)) begin
        cm_valid = $urandom_range(3) != 0;
        cm_arch = 4'($urandom_range(15, 0)); cm_data = $urandom();
        if (cm_valid) refv[cm_arch] = cm_data;
        @(posedge clk); #1;
      end
      cm_valid = 0;
      chk(!busy && !rs_valid, "idle before restore");
      restore_start = 1; @(posedge clk); #1; restore_start = 0;
      n = 0; ndone = 0;
      for (int c = 0; c < 20; c++) begin
        if (rs_valid) begin
          chk(rs_arch == 4'(n) && rs_data == refv[n], "restore value");
          n++;
        end
        restore_start = busy && $urandom_range(3) == 0;
        @(posedge clk); #1;
        restore_start = 0;
        if (restore_done) begin
          ndone++;
          chk(n == 16, "done after the last register");
        end
      end
      chk(n == 16 && ndone == 1, "walk length and done pulse");
      // pulses arrive only while busy, so no new walk may have started
      chk(!busy, "no walk started by pulses while busy");
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
