// tb_lsq_pair: paired load/store handling against a testbench memory array.
// Loads must wait for both copies' addresses and make one read whose data is
// returned once; stores are written once, at commit; an upset in a stored
// address is corrected by the code (chk_fixed); two different addresses with
// different codes raise chk_fail; flush empties the queue. A random phase
// runs batches of loads and stores, some with an upset address copy.
module tb_lsq_pair;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush, sq_valid, al_valid, al_is_store, full, ag_valid, ag_copy, st_commit;
  logic [5:0] al_tag, ld_tag, hd_tag, sq_tag, rob_head;
  logic [2:0] al_idx, ag_idx, inj_idx;
  logic [31:0] ag_addr, ag_data, mem_addr, mem_wdata, mem_rdata, ld_data, inj_mask;
  logic mem_rd, mem_wr, ld_done, st_done, hd_store_ready, hd_is_store, chk_fail, chk_fixed, inj_valid;
  logic [31:0] mem [256];
  int n_rd = 0, n_wr = 0;

  assign mem_rdata = mem[mem_addr[9:2]];
  always @(posedge clk) begin
    if (mem_rd) n_rd++;
    if (mem_wr) begin n_wr++; mem[mem_addr[9:2]] <= mem_wdata; end
  end

  lsq_pair #(.DEPTH(8)) dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask
  task automatic idle();
    flush = 0; sq_valid = 0; sq_tag = 0; rob_head = 0; al_valid = 0; al_is_store = 0; al_tag = 0; ag_valid = 0; ag_copy = 0; ag_idx = 0;
    ag_addr = 0; ag_data = 0; st_commit = 0; inj_valid = 0; inj_idx = 0; inj_mask = 0;
  endtask
  task automatic step(); @(posedge clk); #1; idle(); endtask
  task automatic agen(input int idx, input bit copy, input logic [31:0] a, input logic [31:0] d);
    ag_valid = 1; ag_idx = 3'(idx); ag_copy = copy; ag_addr = a; ag_data = d; step();
  endtask

  initial begin
    idle();
    for (int i = 0; i < 256; i++) mem[i] = 32'hA000_0000 + i;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // load (tag 5), store (tag 6), load (tag 7)
    al_valid = 1; al_tag = 5; step();
    al_valid = 1; al_tag = 6; al_is_store = 1; step();
    al_valid = 1; al_tag = 7; step();
    agen(0, 0, 32'h40, 0);
    #1 chk(!ld_done && !mem_rd, "load waits for replica address");
    agen(0, 1, 32'h40, 0);
    // replica address arrived: the load issues combinationally now
    #0 chk(ld_done && mem_rd && ld_tag == 5 && ld_data == 32'hA000_0010, "load issued once");
    step();
    // store: data copies equal, address of original upset after agen
    agen(1, 0, 32'h80, 32'h1234_5678);
    agen(1, 1, 32'h80, 32'h1234_5678);
    inj_valid = 1; inj_idx = 1; inj_mask = 32'h0000_0100; step();
    #1 chk(hd_store_ready && hd_is_store && hd_tag == 6 && !mem_wr, "store waits for commit");
    st_commit = 1; #1;
    chk(mem_wr && chk_fixed && mem_addr == 32'h80 && mem_wdata == 32'h1234_5678, "store written once, address corrected");
    step();
    chk(mem[32] == 32'h1234_5678, "memory updated");
    // load with unresolvable addresses
    agen(2, 0, 32'h44, 0);
    agen(2, 1, 32'h48, 0);
    #1 chk(chk_fail && !mem_rd, "mismatching addresses fail");
    flush = 1; step();
    #1 chk(!chk_fail && !full, "flushed");
    chk(n_rd == 1 && n_wr == 1, "one access per pair");
    // misprediction squash: ROB head 60, branch at 62; slots tagged 61 and
    // 63 (wrapping to 0 and 1) follow; everything after the branch goes
    al_valid = 1; al_tag = 61; step();
    al_valid = 1; al_tag = 63; al_is_store = 1; step();
    al_valid = 1; al_tag = 0; step();
    al_valid = 1; al_tag = 1; step();
    #1 chk(al_idx == 4, "four slots allocated");
    sq_valid = 1; sq_tag = 62; rob_head = 60; #1;
    chk(!mem_rd && !ld_done, "no access in a squash cycle");
    step();
    #1 chk(al_idx == 1, "tail moved back to the first wrong-path slot");
    agen(0, 0, 32'h48, 0);
    agen(0, 1, 32'h48, 0);
    #0 chk(ld_done && ld_tag == 61 && ld_data == 32'hA000_0012, "older load survives");
    step();
    al_valid = 1; al_tag = 63; step();
    agen(1, 0, 32'h4C, 0);
    agen(1, 1, 32'h4C, 0);
    #0 chk(ld_done && ld_tag == 63 && !hd_store_ready, "squashed store is gone");
    // random phase: batches of up to four loads/stores with random
    // addresses and data, a single-bit upset in the original address of
    // some of them, completed in order; memory traffic checked against
    // the intended addresses and data
    flush = 1; step();
    for (int b = 0; b < 400; b++) begin
      int k;
      bit is_st [4];
      logic [31:0] ra [4], rd [4];
      logic [2:0] ix [4];
      k = $urandom_range(4, 1);
      for (int i = 0; i < k; i++) begin
        is_st[i] = ($urandom_range(1) == 1);
        ra[i] = {22'b0, 8'($urandom_range(255)), 2'b00};
        rd[i] = $urandom();
        ix[i] = al_idx;
        al_valid = 1; al_tag = 6'(i); al_is_store = is_st[i]; step();
      end
      // each pair in turn: original address, maybe an upset of it, then the
      // replica address, after which a load issues at once
      for (int i = 0; i < k; i++) begin
        bit up;
        up = ($urandom_range(2) == 0);
        agen(int'(ix[i]), 0, ra[i], rd[i]);
        if (up) begin inj_valid = 1; inj_idx = ix[i]; inj_mask = 32'h1 << $urandom_range(31); step(); end
        agen(int'(ix[i]), 1, ra[i], rd[i]);
        #0;
        if (is_st[i]) begin
          chk(hd_store_ready && hd_is_store && hd_tag == 6'(i) && !mem_wr, "random: store waits for commit");
          st_commit = 1; #1;
          chk(mem_wr && mem_addr == ra[i] && mem_wdata == rd[i] && chk_fixed == up,
              "random: store address and data");
        end else begin
          chk(ld_done && mem_rd && ld_tag == 6'(i) && mem_addr == ra[i] && chk_fixed == up,
              "random: load address");
          chk(ld_data == mem[ra[i][9:2]], "random: load data");
        end
        step();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
