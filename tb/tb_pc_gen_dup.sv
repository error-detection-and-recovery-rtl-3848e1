// tb_pc_gen_dup: sequential fetch, predicted-taken jumps, redirects, and
// an injected upset in each PC copy. A reference PC model in the testbench
// predicts every fetched PC; after an upset the block must drop one fetch,
// flag pc_error and resume at the PC that was due next.
module tb_pc_gen_dup;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic stall, redirect, pred_taken, fv, perr;
  logic [31:0] rpc, ptgt, fa, fb, fpc;
  logic [31:0] ref_pc;
  int n_err = 0;

  pc_gen_dup dut (.clk, .rst_n, .stall, .redirect, .redirect_pc(rpc),
    .pred_taken, .pred_target(ptgt), .flip_a(fa), .flip_b(fb),
    .fetch_valid(fv), .fetch_pc(fpc), .pc_error(perr));

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    stall = 0; redirect = 0; pred_taken = 0; rpc = 0; ptgt = 0; fa = 0; fb = 0;
    ref_pc = 32'h0040_0000;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    stall = 1;
    @(posedge clk);
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      stall = 0; redirect = 0; pred_taken = 0; fa = 0; fb = 0;
      case ($urandom_range(9, 0))
        0: begin pred_taken = 1; ptgt = $urandom() & ~32'h7; end
        1: begin redirect = 1; rpc = $urandom() & ~32'h7; end
        2: stall = 1;
        3: fa = 32'h1 << $urandom_range(31, 0);
        4: fb = 32'h1 << $urandom_range(31, 0);
        default: ;
      endcase
      #1;
      if (perr) begin
        n_err++;
        chk(!fv, "no fetch on pc error");
        // upset fixed by reload from last good state: ref_pc unchanged
        if (redirect) ref_pc = rpc;
      end else begin
        chk(fpc == ref_pc, "pc matches reference");
        chk(fv == (!stall && !redirect), "fetch_valid");
        if (redirect)        ref_pc = rpc;
        else if (stall)      ref_pc = ref_pc;
        else if (pred_taken) ref_pc = ptgt;
        else                 ref_pc = ref_pc + 8;
      end
      @(posedge clk);
    end
    chk(n_err > 10, "pc errors were seen");
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
