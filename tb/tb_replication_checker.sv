// tb_replication_checker: streams instructions with their cache error code
// and injects four kinds of faults: none, a flipped bit in one replicated
// copy (must be corrected), a flipped code bit with equal copies (must
// refetch), and different flips in both copies (must refetch). Outputs are
// compared two cycles later against a queue of expected results, which also
// checks the two-stage latency.
module tb_replication_checker;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush = 0, in_valid = 0;
  logic [31:0] in_pc = 0;
  logic [63:0] in_insn = 0, fo = 0, fr = 0;
  logic [7:0] in_code, good_code;
  logic ov, ocor, rf;
  logic [31:0] opc, rpc;
  logic [63:0] oio, oir;

  edc_encode #(.DATA_W(64), .MAX_ERR(3)) u_ref (.data(in_insn), .code(good_code));
  replication_checker dut (.clk, .rst_n, .flush, .in_valid, .in_pc, .in_insn, .in_code,
    .flip_orig(fo), .flip_rep(fr), .out_valid(ov), .out_pc(opc), .out_insn_orig(oio),
    .out_insn_rep(oir), .out_corrected(ocor), .refetch(rf), .refetch_pc(rpc));

  typedef struct { bit v; int kind; logic [31:0] pc; logic [63:0] insn; } exp_t;
  exp_t pipe [3];
  int n_fix = 0, n_ref = 0;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    logic [7:0] cflip;
    for (int i = 0; i < 3; i++) pipe[i] = '{0, 0, 0, 0};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 500; cyc++) begin
      exp_t e;
      // drive this cycle
      in_valid = ($urandom_range(3, 0) != 0);
      in_pc    = cyc * 8;
      in_insn  = {$urandom(), $urandom()};
      fo = 0; fr = 0; cflip = 0;
      e.kind = $urandom_range(3, 0);
      case (e.kind)
        1: if ($urandom_range(1, 0) == 1) fo = 64'h1 << $urandom_range(63, 0);
           else fr = 64'h1 << $urandom_range(63, 0);
        2: cflip = 8'h1 << $urandom_range(6, 0);
        3: begin fo = 64'h1; fr = 64'h2; end
        default: ;
      endcase
      #1;
      in_code = good_code ^ cflip;
      e.v = in_valid; e.pc = in_pc; e.insn = in_insn;
      // check outputs for the instruction driven two cycles ago
      if (pipe[1].v) begin
        case (pipe[1].kind)
          0: chk(ov && !ocor && !rf && oio == pipe[1].insn && oir == pipe[1].insn && opc == pipe[1].pc, "clean");
          1: begin chk(ov && ocor && !rf && oio == pipe[1].insn && oir == pipe[1].insn, "replication fix"); n_fix++; end
          default: begin chk(!ov && rf && rpc == pipe[1].pc, "refetch"); n_ref++; end
        endcase
      end else chk(!ov && !rf, "idle");
      @(posedge clk);
      pipe[1] = pipe[0];
      pipe[0] = e;
      @(negedge clk);
    end
    chk(n_fix > 20 && n_ref > 20, "all cases seen");
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
