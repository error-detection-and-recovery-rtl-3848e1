// pc_gen_dup: duplicated PC generation for the fetch stage.
//
// PC generation has no redundancy from the replicated threads, so an error
// there would silently send execution down a wrong path. Two independent
// copies of the PC register and next-PC logic therefore run side by side and
// are compared every cycle. When they agree the PC is sent to the
// instruction cache (fetch_valid). When they disagree nothing is fetched and
// both copies are reloaded from resume_pc, the next PC computed the last time
// the copies agreed, so fetch is re-initiated from the last good point.
//
// Next-PC choice, same in both copies: redirect (mispredict or recovery
// restart) > predicted-taken target > sequential PC + INSN_BYTES.
// The stall input holds the PC (fetch stalled downstream). Timing: one PC per
// cycle; a detected mismatch costs one bubble cycle. The flip_a/flip_b inputs
// XOR the stored copies and model transient upsets for testing.
// INSN_BYTES = 8 follows the 64-bit PISA instruction encoding (assumed); the
// resume register and one-instruction fetch are this design's own choices.
module pc_gen_dup #(
  parameter int          PC_W       = 32,
  parameter int          INSN_BYTES = 8,
  parameter logic [31:0] RESET_PC   = 32'h0040_0000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            stall,
  input  logic            redirect,
  input  logic [PC_W-1:0] redirect_pc,
  input  logic            pred_taken,
  input  logic [PC_W-1:0] pred_target,
  input  logic [PC_W-1:0] flip_a,       // transient upset of copy A
  input  logic [PC_W-1:0] flip_b,       // transient upset of copy B
  output logic            fetch_valid,
  output logic [PC_W-1:0] fetch_pc,
  output logic            pc_error      // copies disagreed this cycle
);

  logic [PC_W-1:0] pc_a, pc_b, resume_pc;
  logic [PC_W-1:0] next_a, next_b;

  // two separate next-PC generators
  always_comb begin
    if (redirect)        next_a = redirect_pc;
    else if (pred_taken) next_a = pred_target;
    else                 next_a = pc_a + PC_W'(INSN_BYTES);
  end
  always_comb begin
    if (redirect)        next_b = redirect_pc;
    else if (pred_taken) next_b = pred_target;
    else                 next_b = pc_b + PC_W'(INSN_BYTES);
  end

  assign pc_error    = (pc_a != pc_b);
  assign fetch_valid = !pc_error && !stall && !redirect;
  assign fetch_pc    = pc_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_a      <= PC_W'(RESET_PC);
      pc_b      <= PC_W'(RESET_PC);
      resume_pc <= PC_W'(RESET_PC);
    end else if (redirect) begin
      pc_a      <= redirect_pc ^ flip_a;
      pc_b      <= redirect_pc ^ flip_b;
      resume_pc <= redirect_pc;
    end else if (pc_error) begin
      // re-initiate fetch from the last agreed PC
      pc_a <= resume_pc ^ flip_a;
      pc_b <= resume_pc ^ flip_b;
    end else if (!stall) begin
      pc_a      <= next_a ^ flip_a;
      pc_b      <= next_b ^ flip_b;
      resume_pc <= next_a;
    end else begin
      pc_a <= pc_a ^ flip_a;
      pc_b <= pc_b ^ flip_b;
    end
  end

endmodule
