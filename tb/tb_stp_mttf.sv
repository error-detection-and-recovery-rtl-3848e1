// tb_stp_mttf: the reliable STP logic under random transient errors at
// three error rates, in each recovery mode.
//
// Same surroundings as the end-to-end test (instruction ROM with codes,
// not-taken predictor, decoder queue, in-order two-copy execution core, data
// memory) and the same array-sum program. Instead of scripted faults, every
// cycle each protected structure is hit by a single-bit upset with
// probability 1/MTTF: a PC copy, a fetched copy, a register (either
// partition), a rename map entry, a ROB rename field and an LSQ address. The
// program runs once without errors and then with MTTF = 10000, 1000 and 100
// cycles per structure, in the LDCR, LDAR and EDAR modes. Every committed
// instruction must match the golden model and the stored sum must be right;
// a run that cannot finish within its cycle budget (LDCR's 200-cycle reload
// against an error every ~17 cycles at MTTF 100) only has to commit
// correctly. The cycle counts show the slowdown of each mode; the random
// seed comes from +verilator+seed or the simulator default.
module tb_stp_mttf;
  import stp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [31:0] BASE = 32'h0040_0000;
  localparam int NPART = 64;
  localparam int NITER = 300;

  // ---------------- DUT signals
  recov_mode_e mode;
  logic ic_req, fe_stall, bp_taken, dec_valid, fe_flush, core_flush;
  logic [31:0] ic_pc, bp_target, dec_pc;
  logic [63:0] ic_insn, dec_insn_orig, dec_insn_rep;
  logic [7:0] ic_code, good_code, code_flip;
  logic ds_valid, ds_has_dst, ds_is_branch, ds_pred_taken, ds_is_mem, ds_is_store, ds_ready;
  logic [31:0] ds_pc, ds_pred_target;
  logic [4:0] ds_src1, ds_src2, ds_dst;
  logic iss_valid, iss_brb_in_buf, iss_pred_taken;
  logic [5:0] iss_rob, iss_psrc1, iss_psrc2, iss_pdst;
  logic [3:0] iss_lsq, iss_brb_idx, iss_brb_ord;
  logic [31:0] iss_pred_target;
  logic [6:0] rd_addr [2];
  logic [5:0] rd_rob [2];
  logic [1:0] rd_en, rd_wait;
  logic [31:0] rd_data [2];
  logic wb_o_valid, wb_o_we, wb_r_valid, wb_r_we;
  logic [5:0] wb_o_rob, wb_r_rob;
  logic [6:0] wb_o_addr, wb_r_addr;
  logic [31:0] wb_o_data, wb_r_data;
  logic br_valid, br_in_buf, br_mispred, br_taken;
  logic [5:0] br_rob;
  logic [3:0] br_idx, br_ord;
  logic [31:0] br_target, br_next_pc;
  logic ag_valid, ag_copy;
  logic [3:0] ag_idx;
  logic [31:0] ag_addr, ag_data;
  logic mem_rd, mem_wr, ld_done;
  logic [31:0] mem_addr, mem_wdata, mem_rdata, ld_data;
  logic [5:0] ld_rob;
  logic cm_valid, cm_has_dst;
  logic [31:0] cm_pc, cm_data;
  logic [4:0] cm_dst;
  logic ev_bp_err;
  logic [0:0] bp_code, bp_flip;
  logic ev_pc_err, ev_repl_fix, ev_refetch, ev_map_fix, ev_rf_fix, ev_cm_fix, ev_lsq_fix;
  logic ev_reuse, ev_walk, ev_restore;
  logic [15:0] n_reexec, n_restore, n_passive, n_deadlock;
  logic [31:0] inj_pc_a, inj_pc_b;
  logic [63:0] inj_repl_orig, inj_repl_rep;
  logic inj_map_valid, inj_rit_valid, inj_rf_valid, inj_rob_valid, inj_lsq_valid;
  logic [4:0] inj_arch;
  logic [5:0] inj_map_mask, inj_rob_idx, inj_rob_mask;
  logic [6:0] inj_rit_mask, inj_rf_addr;
  logic [31:0] inj_rf_mask, inj_lsq_mask;
  logic [3:0] inj_lsq_idx;

  reliable_stp dut (.*);

  // ---------------- toy ISA: op[63:56] rd[52:48] rs1[44:40] rs2[36:32] imm[31:0]
  localparam logic [7:0] OP_NOP = 0, OP_ADDI = 1, OP_ADD = 2, OP_BNE = 3, OP_LW = 4, OP_SW = 5, OP_J = 6;
  function automatic logic [63:0] enc(input logic [7:0] op, input int rd, input int rs1, input int rs2, input logic [31:0] imm);
    return {op, 3'b0, 5'(rd), 3'b0, 5'(rs1), 3'b0, 5'(rs2), imm};
  endfunction
  logic [63:0] rom [10];
  initial begin
    rom[0] = enc(OP_ADDI, 1, 0, 0, 0);
    rom[1] = enc(OP_ADDI, 2, 0, 0, 32'h100);
    rom[2] = enc(OP_ADDI, 3, 0, 0, NITER);
    rom[3] = enc(OP_LW,   4, 2, 0, 0);
    rom[4] = enc(OP_ADD,  1, 1, 4, 0);
    rom[5] = enc(OP_ADDI, 2, 2, 0, 4);
    rom[6] = enc(OP_ADDI, 3, 3, 0, 32'hFFFF_FFFF);
    rom[7] = enc(OP_BNE,  0, 3, 0, BASE + 3 * 8);
    rom[8] = enc(OP_SW,   0, 0, 1, 32'h200);
    rom[9] = enc(OP_J,    0, 0, 0, BASE + 9 * 8);
  end
  function automatic logic [63:0] fetch(input logic [31:0] pc);
    int i;
    i = int'((pc - BASE) >> 3);
    return (pc >= BASE && i < 10) ? rom[i] : 64'h0;
  endfunction
  function automatic bit has_dst(input logic [7:0] op);
    return op == OP_ADDI || op == OP_ADD || op == OP_LW;
  endfunction

  // instruction cache with its stored code
  assign ic_insn = fetch(ic_pc);
  edc_encode #(.DATA_W(64), .MAX_ERR(3)) u_iccode (.data(ic_insn), .code(good_code));
  assign ic_code   = good_code ^ code_flip;
  // not-taken predictor; its stored parity can be corrupted by bp_flip
  assign bp_taken  = 1'b0;
  assign bp_target = '0;
  assign bp_code   = (^{bp_taken, bp_target}) ^ bp_flip;

  // data memory
  logic [31:0] mem [1024];
  assign mem_rdata = mem[mem_addr[11:2]];
  always @(posedge clk) if (mem_wr) mem[mem_addr[11:2]] <= mem_wdata;

  // ---------------- golden trace
  typedef struct { logic [31:0] pc; bit hd; logic [4:0] rd; logic [31:0] val; } gold_t;
  gold_t gold [$];
  logic [31:0] expected_sum;
  task automatic build_golden();
    logic [31:0] r [32];
    logic [31:0] m [1024];
    logic [31:0] pc;
    gold.delete();
    for (int i = 0; i < 32; i++) r[i] = 0;
    for (int i = 0; i < 1024; i++) m[i] = 32'h100 * i + 7;
    pc = BASE;
    while (1) begin
      logic [63:0] w;
      logic [7:0] op;
      logic [31:0] a, b, v, npc;
      int rd;
      w = fetch(pc); op = w[63:56]; rd = int'(w[52:48]);
      a = r[w[44:40]]; b = r[w[36:32]]; npc = pc + 8; v = 0;
      case (op)
        OP_ADDI: v = a + w[31:0];
        OP_ADD:  v = a + b;
        OP_LW:   v = m[(a + w[31:0]) >> 2];
        OP_SW:   m[(a + w[31:0]) >> 2] = b;
        OP_BNE:  if (a != b) npc = w[31:0];
        default: ;
      endcase
      gold.push_back('{pc, has_dst(op), 5'(rd), v});
      if (has_dst(op)) r[rd] = v;
      if (op == OP_SW) begin expected_sum = b; break; end
      pc = npc;
    end
  endtask

  // ---------------- decoder queue and execution core models
  typedef struct { logic [31:0] pc; logic [63:0] w; } fq_t;
  fq_t dq [$];
  typedef struct {
    logic [31:0] pc; logic [7:0] op; logic [4:0] rd; logic [31:0] imm;
    logic [5:0] rob, ps1, ps2, pd; logic [3:0] lsq, bidx, bord; logic bin, pred; logic [31:0] ptgt;
  } uop_t;
  uop_t iq [$];
  int phase;

  // mechanism counters (per mode)
  typedef enum int { E_PC, E_REPL, E_REFETCH, E_MAP, E_RF, E_CMFIX, E_LSQ, E_REUSE, E_WALK,
                     E_RESTORE, E_FESTALL, E_MISPRED, E_BPERR, E_BPHOLD, E_NUM } ev_e;
  int evc [3][E_NUM];
  int ci;          // commits checked in this run
  int mttf;        // 0: no random errors
  int n_inj;
  // recently dispatched physical registers, ROB and LSQ slots: the live
  // state the upsets are aimed at
  logic [5:0] rec_pd [$];
  logic [5:0] rec_rob [$];
  logic [3:0] rec_lsq [$];
  int cyc;
  logic [15:0] p_reexec, p_restore, p_passive;

  // fault arms
  bit f_bp;
  bit f_pc, f_repl, f_refetch, f_map, f_rf, f_cm, f_rob, f_rob2, f_lsq, f_mapfail, f_dl;
  bit rf_pend, cm_pend, rob_pend, rob2_armed;
  logic [6:0] rf_pend_addr, cm_pend_addr;
  logic [5:0] rob_pend_idx;
  logic [31:0] rob_pc;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic clear_inputs();
    inj_pc_a = 0; inj_pc_b = 0; inj_repl_orig = 0; inj_repl_rep = 0;
    inj_map_valid = 0; inj_rit_valid = 0; inj_arch = 0; inj_map_mask = 0; inj_rit_mask = 0;
    inj_rf_valid = 0; inj_rf_addr = 0; inj_rf_mask = 0; inj_rob_valid = 0; inj_rob_idx = 0;
    inj_rob_mask = 0; inj_lsq_valid = 0; inj_lsq_idx = 0; inj_lsq_mask = 0;
    wb_o_valid = 0; wb_o_we = 0; wb_o_rob = 0; wb_o_addr = 0; wb_o_data = 0;
    wb_r_valid = 0; wb_r_we = 0; wb_r_rob = 0; wb_r_addr = 0; wb_r_data = 0;
    br_valid = 0; br_in_buf = 0; br_mispred = 0; br_taken = 0; br_rob = 0; br_idx = 0; br_ord = 0;
    br_target = 0; br_next_pc = 0; ag_valid = 0; ag_copy = 0; ag_idx = 0; ag_addr = 0; ag_data = 0;
  endtask

  // drive the inputs that are valid from the start of a cycle
  task automatic drive_cycle_start();
    clear_inputs();
    code_flip = (f_refetch && ci >= 15) ? 8'h01 : 8'h00;
    // corrupt the predictor's parity while a loop branch is fetched
    bp_flip   = (f_bp && ci >= 25 && ic_pc == BASE + 7 * 8) ? 1'b1 : 1'b0;
    fe_stall  = (dq.size() >= 4);
    ds_valid  = (dq.size() > 0);
    if (dq.size() > 0) begin
      logic [63:0] w;
      w = dq[0].w;
      ds_pc          = dq[0].pc;
      ds_src1        = w[44:40];
      ds_src2        = w[36:32];
      ds_dst         = w[52:48];
      ds_has_dst     = has_dst(w[63:56]);
      ds_is_branch   = (w[63:56] == OP_BNE || w[63:56] == OP_J);
      ds_pred_taken  = 1'b0;
      ds_pred_target = '0;
      ds_is_mem      = (w[63:56] == OP_LW || w[63:56] == OP_SW);
      ds_is_store    = (w[63:56] == OP_SW);
    end else begin
      ds_pc = 0; ds_src1 = 0; ds_src2 = 0; ds_dst = 0; ds_has_dst = 0; ds_is_branch = 0;
      ds_pred_taken = 0; ds_pred_target = 0; ds_is_mem = 0; ds_is_store = 0;
    end
    rd_en = 2'b00;
    rd_addr[0] = 0; rd_addr[1] = 0; rd_rob[0] = 0; rd_rob[1] = 0;
    if (iq.size() > 0 && phase < 2) begin
      rd_en = 2'b11;
      rd_addr[0] = {phase[0], iq[0].ps1};
      rd_addr[1] = {phase[0], iq[0].ps2};
      rd_rob[0] = iq[0].rob; rd_rob[1] = iq[0].rob;
    end
    // random single-bit upsets, probability 1/mttf per structure and cycle
    if (mttf > 0 && rst_n) begin
      if ($urandom_range(mttf - 1) == 0) begin inj_pc_a = 32'h1 << $urandom_range(31); n_inj++; end
      if ($urandom_range(mttf - 1) == 0) begin
        if ($urandom_range(1) == 0) inj_repl_orig = 64'h1 << $urandom_range(63);
        else                        inj_repl_rep  = 64'h1 << $urandom_range(63);
        n_inj++;
      end
      if ($urandom_range(mttf - 1) == 0) begin
        if (rec_pd.size() > 0) begin
          inj_rf_valid = 1; inj_rf_addr = {1'($urandom_range(1)), rec_pd[$urandom_range(rec_pd.size() - 1)]};
          inj_rf_mask = 32'h1 << $urandom_range(31); n_inj++;
        end
      end
      if ($urandom_range(mttf - 1) == 0) begin
        inj_map_valid = 1; inj_arch = 5'($urandom_range(4, 1)); inj_map_mask = 6'h1 << $urandom_range(5); n_inj++;
      end
      if ($urandom_range(mttf - 1) == 0) begin
        if (rec_rob.size() > 0) begin
          inj_rob_valid = 1; inj_rob_idx = rec_rob[$urandom_range(rec_rob.size() - 1)];
          inj_rob_mask = 6'h1 << $urandom_range(5); n_inj++;
        end
      end
      if ($urandom_range(mttf - 1) == 0) begin
        if (rec_lsq.size() > 0) begin
          inj_lsq_valid = 1; inj_lsq_idx = rec_lsq[$urandom_range(rec_lsq.size() - 1)];
          inj_lsq_mask = 32'h1 << $urandom_range(31); n_inj++;
        end
      end
    end
    // one-shot fault injections (none armed in this test)
    if (f_pc && ci >= 5) begin inj_pc_a = 32'h0000_0100; f_pc = 0; end
    if (f_repl && ci >= 10) inj_repl_orig = 64'h0000_0010_0000_0000;
    if (f_map && ci >= 20) begin inj_map_valid = 1; inj_arch = 2; inj_map_mask = 6'h01; f_map = 0; end
    if (rf_pend) begin inj_rf_valid = 1; inj_rf_addr = rf_pend_addr; inj_rf_mask = 32'h0000_4000; rf_pend = 0; end
    if (cm_pend) begin inj_rf_valid = 1; inj_rf_addr = cm_pend_addr; inj_rf_mask = 32'h0001_0000; cm_pend = 0; end
    if (rob_pend) begin inj_rob_valid = 1; inj_rob_idx = rob_pend_idx; inj_rob_mask = 6'h01; rob_pend = 0; end
    if (f_mapfail && ci >= 70) begin
      inj_map_valid = 1; inj_rit_valid = 1; inj_arch = 3; inj_map_mask = 6'h02; inj_rit_mask = 7'h04;
      f_mapfail = 0;
    end
  endtask

  // the execution core acts in the middle of the cycle
  task automatic core_step(input int m);
    if (iq.size() == 0) return;
    if (phase < 2 && rd_wait != 0) return;
    begin
      uop_t u;
      logic [31:0] a, b, res, addr;
      bit taken;
      u = iq[0];
      a = rd_data[0]; b = rd_data[1];
      res = 0; taken = 0;
      case (u.op)
        OP_ADDI: res = a + u.imm;
        OP_ADD:  res = a + b;
        OP_BNE:  taken = (a != b);
        OP_J:    taken = 1;
        default: ;
      endcase
      addr = a + u.imm;
      // lost instruction: an issue-queue upset that never wakes it up
      if (f_dl && ci >= 80 && u.op == OP_ADD && phase == 0) begin
        f_dl = 0;
        void'(iq.pop_front());
        return;
      end
      case (phase)
        0: begin
          if (has_dst(u.op) && u.op != OP_LW) begin
            wb_o_valid = 1; wb_o_we = 1; wb_o_rob = u.rob; wb_o_addr = {1'b0, u.pd}; wb_o_data = res;
            // upset the original result after it is written and before the
            // replica arrives; nothing reads r1 again before it commits
            if (f_cm && ci >= 40 && u.op == OP_ADD) begin cm_pend = 1; cm_pend_addr = {1'b0, u.pd}; f_cm = 0; end
          end
          if (u.op == OP_BNE || u.op == OP_J || u.op == OP_NOP) begin
            wb_o_valid = 1; wb_o_we = 0; wb_o_rob = u.rob;
          end
          if (u.op == OP_BNE || u.op == OP_J) begin
            br_valid = 1; br_rob = u.rob; br_in_buf = u.bin; br_idx = u.bidx; br_ord = u.bord;
            br_taken = taken; br_target = u.imm; br_next_pc = taken ? u.imm : u.pc + 8;
            br_mispred = (taken != u.pred);
            if (br_mispred) begin
              evc[m][E_MISPRED]++;
              while (iq.size() > 1) void'(iq.pop_back());
            end
          end
          if (u.op == OP_LW || u.op == OP_SW) begin
            ag_valid = 1; ag_copy = 0; ag_idx = u.lsq; ag_addr = addr; ag_data = b;
          end
          phase = 1;
        end
        1: begin
          if (has_dst(u.op) && u.op != OP_LW) begin
            wb_r_valid = 1; wb_r_we = 1; wb_r_rob = u.rob; wb_r_addr = {1'b1, u.pd}; wb_r_data = res;
          end
          if (u.op == OP_BNE || u.op == OP_J || u.op == OP_NOP) begin
            wb_r_valid = 1; wb_r_we = 0; wb_r_rob = u.rob;
          end
          if (u.op == OP_LW || u.op == OP_SW) begin
            ag_valid = 1; ag_copy = 1; ag_idx = u.lsq; ag_addr = addr; ag_data = b;
            if (f_lsq && ci >= 60) begin
              inj_lsq_valid = 1; inj_lsq_idx = u.lsq; inj_lsq_mask = 32'h0000_0040; f_lsq = 0;
            end
          end
          if (u.op == OP_SW) begin
            wb_o_valid = 1; wb_o_we = 0; wb_o_rob = u.rob;
            wb_r_valid = 1; wb_r_we = 0; wb_r_rob = u.rob;
          end
          if (u.op == OP_LW) phase = 2;
          else begin phase = 0; void'(iq.pop_front()); end
        end
        default: begin
          if (ld_done && ld_rob == u.rob) begin
            wb_o_valid = 1; wb_o_we = 1; wb_o_rob = u.rob; wb_o_addr = {1'b0, u.pd}; wb_o_data = ld_data;
            wb_r_valid = 1; wb_r_we = 1; wb_r_rob = u.rob; wb_r_addr = {1'b1, u.pd}; wb_r_data = ld_data;
            phase = 0; void'(iq.pop_front());
          end
        end
      endcase
    end
  endtask

  // observe the settled outputs at the end of the cycle
  task automatic observe(input int m);
    if (ev_pc_err)   evc[m][E_PC]++;
    if (ev_bp_err)   begin evc[m][E_BPERR]++; f_bp = 0; end
    if (evc[m][E_BPERR] > 0 && evc[m][E_BPHOLD] == 0 && !ic_req && !fe_stall && !fe_flush)
      evc[m][E_BPHOLD]++;
    if (ev_repl_fix) begin evc[m][E_REPL]++; f_repl = 0; end
    if (ev_refetch)  begin evc[m][E_REFETCH]++; f_refetch = 0; end
    if (ev_map_fix)  evc[m][E_MAP]++;
    if (ev_rf_fix)   begin evc[m][E_RF]++; f_rf = 0; end
    if (ev_cm_fix)   evc[m][E_CMFIX]++;
    if (ev_lsq_fix)  evc[m][E_LSQ]++;
    if (ev_reuse)    evc[m][E_REUSE]++;
    if (ev_walk)     evc[m][E_WALK]++;
    if (ev_restore)  evc[m][E_RESTORE]++;
    if (fe_stall)    evc[m][E_FESTALL]++;
    if (dec_valid && !fe_flush) chk(dec_insn_orig == dec_insn_rep && dec_insn_orig == fetch(dec_pc), "replicated pair");
    // commit check against the golden trace
    if (cm_valid) begin
      if (ci < gold.size()) begin
        chk(cm_pc == gold[ci].pc && cm_has_dst == gold[ci].hd &&
            (!gold[ci].hd || (cm_dst == gold[ci].rd && cm_data == gold[ci].val)), "commit matches golden");
        if (cm_pc != gold[ci].pc) $display("  commit %0d pc %h expected %h", ci, cm_pc, gold[ci].pc);
      end
      ci++;
      if ($test$plusargs("trace")) $display("  commit %0d pc %h t=%0t", ci, cm_pc, $time);
    end
    if ($test$plusargs("trace") && (n_reexec != p_reexec || n_restore != p_restore || n_passive != p_passive))
      $display("    ctr t=%0t ci %0d reexec %0d restore %0d passive %0d", $time, ci, n_reexec, n_restore, n_passive);
    p_reexec = n_reexec; p_restore = n_restore; p_passive = n_passive;
    if ($test$plusargs("trace") && (ev_restore || core_flush || ev_walk || ev_pc_err || ev_map_fix || ev_rf_fix || ev_cm_fix || ev_lsq_fix || ev_refetch || ev_repl_fix))
      $display("    ev t=%0t restore %b cflush %b walk %b pc %b map %b rf %b cm %b lsq %b refetch %b repl %b iq %0d dq %0d", $time,
        ev_restore, core_flush, ev_walk, ev_pc_err, ev_map_fix, ev_rf_fix, ev_cm_fix, ev_lsq_fix, ev_refetch, ev_repl_fix, iq.size(), dq.size());
    // dispatch
    if (iss_valid) begin
      uop_t u;
      logic [63:0] w;
      w = dq[0].w;
      u.pc = dq[0].pc; u.op = w[63:56]; u.rd = w[52:48]; u.imm = w[31:0];
      u.rob = iss_rob; u.ps1 = iss_psrc1; u.ps2 = iss_psrc2; u.pd = iss_pdst; u.lsq = iss_lsq;
      u.bidx = iss_brb_idx; u.bord = iss_brb_ord; u.bin = iss_brb_in_buf;
      u.pred = iss_pred_taken; u.ptgt = iss_pred_target;
      iq.push_back(u);
      if (has_dst(u.op)) rec_pd.push_back(iss_pdst);
      rec_rob.push_back(iss_rob);
      if (u.op == OP_LW || u.op == OP_SW) rec_lsq.push_back(iss_lsq);
      if (rec_pd.size() > 8) void'(rec_pd.pop_front());
      if (rec_rob.size() > 8) void'(rec_rob.pop_front());
      if (rec_lsq.size() > 4) void'(rec_lsq.pop_front());
      void'(dq.pop_front());
      if (f_rf && ci >= 30 && w[44:40] != 0 && !rf_pend) begin rf_pend = 1; rf_pend_addr = {1'b0, iss_psrc1}; end
      // ROB-entry upset on an ADD (always on the correct path), and again on
      // the same instruction when it is fetched after the recovery
      if (f_rob && ci >= 50 && u.op == OP_ADD) begin
        rob_pend = 1; rob_pend_idx = iss_rob; rob_pc = u.pc; f_rob = 0; f_rob2 = 1;
      end
      if (rob2_armed && u.pc == rob_pc) begin rob_pend = 1; rob_pend_idx = iss_rob; rob2_armed = 0; end
    end
    if (fe_flush) dq.delete();
    if (core_flush) begin
      iq.delete(); phase = 0;
      if (f_rob2) begin rob2_armed = 1; f_rob2 = 0; end
    end
    if (dec_valid && !fe_flush) dq.push_back('{dec_pc, dec_insn_orig});
  endtask

  task automatic run_mode(input recov_mode_e md, input int m, input int rate, input int budget,
                          output int cycles, output bit done);
    int start;
    mode = md;
    mttf = rate;
    n_inj = 0;
    for (int i = 0; i < 1024; i++) mem[i] = 32'h100 * i + 7;
    dq.delete(); iq.delete(); phase = 0; ci = 0;
    rec_pd.delete(); rec_rob.delete(); rec_lsq.delete();
    f_pc = 0; f_repl = 0; f_refetch = 0; f_map = 0; f_rf = 0; f_cm = 0; f_rob = 0; f_rob2 = 0;
    f_lsq = 0; f_mapfail = 0; f_dl = 0; f_bp = 0;
    rf_pend = 0; cm_pend = 0; rob_pend = 0; rob2_armed = 0;
    clear_inputs(); code_flip = 0; bp_flip = 0; fe_stall = 0; ds_valid = 0; rd_en = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    start = cyc;
    while (ci < gold.size() && cyc - start < budget) begin
      drive_cycle_start();
      @(negedge clk);
      core_step(m);
      #1;
      observe(m);
      @(posedge clk); #1;
    end
    mttf = 0;
    cycles = cyc - start;
    done = (ci == gold.size());
    repeat (3) @(posedge clk);
    #1;
    if (done) chk(mem[32'h200 >> 2] == expected_sum, "stored sum");
    $display("mode %s mttf %0d: %0d/%0d commits in %0d cycles, %0d upsets, reexec %0d restore %0d passive %0d deadlock %0d",
      md.name(), rate, ci, gold.size(), cycles, n_inj, n_reexec, n_restore, n_passive, n_deadlock);
  endtask

  always @(posedge clk) cyc++;

  initial begin
    int base [3];
    int c;
    bit done;
    recov_mode_e modes [3];
    int rates [3];
    modes = '{MODE_LDCR, MODE_LDAR, MODE_EDAR};
    rates = '{10000, 1000, 100};
    for (int a = 0; a < 3; a++) for (int e = 0; e < E_NUM; e++) evc[a][e] = 0;
    cyc = 0;
    mttf = 0;
    build_golden();
    for (int k = 0; k < 3; k++) begin
      run_mode(modes[k], k, 0, 20000, base[k], done);
      chk(done, "error-free run completes");
    end
    for (int r = 0; r < 3; r++)
      for (int k = 0; k < 3; k++) begin
        run_mode(modes[k], k, rates[r], 60000, c, done);
        // at MTTF 100 LDCR's reload is longer than the time between errors
        if (rates[r] >= 1000 || modes[k] != MODE_LDCR) chk(done, "run completes under errors");
        if (done) $display("  slowdown vs error-free: %0d%%", (c - base[k]) * 100 / base[k]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
