// tb_err_regfile: writes twin registers, injects upsets and checks eager
// detection on the read ports: repair from the twin, wait while the twin's
// status bit is clear, failure when both twins are corrupt; status bits
// cleared by deallocation; commit port values/codes against a separate code
// generator; checkpoint restore writing both twins. A random phase then
// mixes writes, reallocations and upsets with reads checked against a model.
module tb_err_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NP = 8;
  logic wr_o_valid, wr_r_valid, rs_valid, free_valid, inj_valid;
  logic [3:0] wr_o_addr, wr_r_addr, inj_addr;
  logic [31:0] wr_o_data, wr_r_data, rs_data, inj_mask;
  logic [2:0] rs_preg, free_preg, cm_preg;
  logic [3:0] rd_addr [2];
  logic [31:0] rd_data [2];
  logic [1:0] rd_err, rd_fix, rd_wait, rd_fail;
  logic [31:0] cm_val_o, cm_val_r, refv;
  logic [6:0] cm_code_o, cm_code_r, refc;
  logic cm_ready;

  edc_encode #(.DATA_W(32), .MAX_ERR(3)) u_ref (.data(refv), .code(refc));
  err_regfile #(.NPART(NP)) dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask
  task automatic idle();
    wr_o_valid = 0; wr_r_valid = 0; rs_valid = 0; free_valid = 0; inj_valid = 0;
    wr_o_addr = 0; wr_r_addr = 0; wr_o_data = 0; wr_r_data = 0; rs_data = 0; rs_preg = 0;
    free_preg = 0; inj_addr = 0; inj_mask = 0; cm_preg = 0; rd_addr[0] = 0; rd_addr[1] = 0;
  endtask
  task automatic step(); @(posedge clk); #1; idle(); endtask
  task automatic wr(input int a, input logic [31:0] v, input bit both);
    wr_o_valid = 1; wr_o_addr = 4'(a); wr_o_data = v;
    wr_r_valid = both; wr_r_addr = 4'(a + NP); wr_r_data = v;
    step();
  endtask
  task automatic inj(input int a, input logic [31:0] m);
    inj_valid = 1; inj_addr = 4'(a); inj_mask = m; step();
  endtask

  initial begin
    idle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < NP; p++) wr(p, 32'h1000 + p * 17, 1);
    for (int p = 0; p < 2 * NP; p++) begin
      rd_addr[0] = 4'(p); rd_addr[1] = 4'(p ^ NP); #1;
      chk(rd_data[0] == 32'h1000 + (p % NP) * 17 && rd_err == 0, "clean read");
    end
    // single upset in the original partition: repaired from the twin
    inj(3, 32'h0000_0100);
    rd_addr[0] = 4'd3; rd_addr[1] = 4'd11; #1;
    chk(rd_err[0] && rd_fix[0] && rd_data[0] == 32'h1000 + 3 * 17, "fix from twin");
    chk(!rd_err[1] && rd_data[1] == 32'h1000 + 3 * 17, "twin clean");
    // triple upset is still detected
    inj(4, 32'h0000_0007);
    rd_addr[0] = 4'd4; #1; chk(rd_err[0] && rd_fix[0], "3-bit detected");
    // twin not yet written: wait, then fix once the replica writes
    free_valid = 1; free_preg = 3'd5; step();
    wr(5, 32'hCAFE_0005, 0);
    inj(5, 32'h8000_0000);
    rd_addr[1] = 4'd5; #1; chk(rd_err[1] && rd_wait[1] && !rd_fix[1], "wait on status");
    wr_r_valid = 1; wr_r_addr = 4'd13; wr_r_data = 32'hCAFE_0005; step();
    rd_addr[1] = 4'd5; #1; chk(rd_fix[1] && rd_data[1] == 32'hCAFE_0005, "fix after status set");
    // both twins corrupt: fail
    inj(6, 32'h1); inj(14, 32'h2);
    rd_addr[0] = 4'd14; #1; chk(rd_fail[0], "both corrupt fails");
    // commit port
    cm_preg = 3'd2; refv = 32'h1000 + 2 * 17; #1;
    chk(cm_ready && cm_val_o == refv && cm_val_r == refv && cm_code_o == refc && cm_code_r == refc, "commit port");
    free_valid = 1; free_preg = 3'd2; step();
    cm_preg = 3'd2; #1; chk(!cm_ready, "status cleared by free");
    // restore writes both twins with fresh codes
    rs_valid = 1; rs_preg = 3'd6; rs_data = 32'h5555_AAAA; step();
    rd_addr[0] = 4'd6; rd_addr[1] = 4'd14; #1;
    chk(rd_err == 0 && rd_data[0] == 32'h5555_AAAA && rd_data[1] == 32'h5555_AAAA, "restore");
    // random phase: writes of both or one twin, deallocations and single-bit
    // upsets (at most three per register), with two random reads every
    // cycle checked against a model of the stored values, codes and status
    for (int p = 0; p < NP; p++) wr(p, 32'h0, 1);
    begin
      logic [31:0] mv [2*NP], ms [2*NP];   // value the code was made for, stored value
      bit st [2*NP];
      int nf [2*NP];
      for (int r = 0; r < 2 * NP; r++) begin mv[r] = 0; ms[r] = 0; st[r] = 1; nf[r] = 0; end
      for (int c = 0; c < 3000; c++) begin
        int op, p, r;
        op = $urandom_range(9);
        p  = $urandom_range(NP - 1);
        r  = $urandom_range(2 * NP - 1);
        if (op < 3) begin
          logic [31:0] v;
          v = $urandom();
          wr(p, v, 1);
          mv[p] = v; ms[p] = v; st[p] = 1; nf[p] = 0;
          mv[p+NP] = v; ms[p+NP] = v; st[p+NP] = 1; nf[p+NP] = 0;
        end else if (op < 4) begin
          // reallocation: free the pair, then only the original is written
          logic [31:0] v;
          v = $urandom();
          free_valid = 1; free_preg = 3'(p); step();
          wr(p, v, 0);
          mv[p] = v; ms[p] = v; st[p] = 1; nf[p] = 0; st[p+NP] = 0;
        end else if (op < 5) begin
          // the replica catches up with the same value
          if (!st[p+NP] && st[p]) begin
            wr_r_valid = 1; wr_r_addr = 4'(p + NP); wr_r_data = mv[p]; step();
            mv[p+NP] = mv[p]; ms[p+NP] = mv[p]; st[p+NP] = 1; nf[p+NP] = 0;
          end else step();
        end else if (op < 7 && nf[r] < 3) begin
          logic [31:0] m;
          m = 32'h1 << $urandom_range(31);
          inj(r, m);
          ms[r] ^= m; nf[r]++;
        end else step();
        for (int k = 0; k < 2; k++) rd_addr[k] = 4'($urandom_range(2 * NP - 1));
        #1;
        for (int k = 0; k < 2; k++) begin
          int a, t;
          a = int'(rd_addr[k]);
          t = a ^ NP;
          if (ms[a] == mv[a])
            chk(!rd_err[k] && rd_data[k] == ms[a], "random: clean read");
          else if (!st[t])
            chk(rd_err[k] && rd_wait[k] && !rd_fix[k] && !rd_fail[k], "random: wait for twin");
          else if (ms[t] == mv[t])
            chk(rd_err[k] && rd_fix[k] && rd_data[k] == ms[t] && !rd_wait[k], "random: repaired from twin");
          else
            chk(rd_err[k] && rd_fail[k] && !rd_fix[k], "random: both twins corrupt");
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
