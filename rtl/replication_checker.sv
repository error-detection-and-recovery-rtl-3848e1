// replication_checker: instruction replication and the fetch/replication
// error check, the two pipeline stages the reliable STP inserts after fetch.
//
// Stage 1 (replicate): the instruction word read from the instruction cache
// is copied into an original and a replica copy; the error code stored with
// the instruction in the cache travels along.
// Stage 2 (check): the two copies and the code are corroborated:
//   * copies equal, code agrees             -> good, both copies issued.
//   * copies equal, code disagrees          -> the cache read was hit:
//                                              refetch.
//   * copies differ, code picks one copy    -> replication error, corrected
//                                              from the code (both copies
//                                              get the good word).
//   * copies differ, code picks neither     -> refetch.
// Latency: two cycles from in_valid to out_valid, one instruction per cycle.
// flip_orig/flip_rep model upsets in the replication hardware, for testing.
// The instruction code strength (MAX_ERR=3) is assumed; the cache supplies
// the code.
module replication_checker
  import stp_pkg::*;
#(
  parameter int INSN_W  = 64,
  parameter int PC_W    = 32,
  parameter int MAX_ERR = 3,
  localparam int CODE_W = edc_width(INSN_W, MAX_ERR)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              in_valid,
  input  logic [PC_W-1:0]   in_pc,
  input  logic [INSN_W-1:0] in_insn,
  input  logic [CODE_W-1:0] in_code,
  input  logic [INSN_W-1:0] flip_orig,
  input  logic [INSN_W-1:0] flip_rep,
  output logic              out_valid,
  output logic [PC_W-1:0]   out_pc,
  output logic [INSN_W-1:0] out_insn_orig,
  output logic [INSN_W-1:0] out_insn_rep,
  output logic              out_corrected,   // replication error repaired
  output logic              refetch,         // pulse: refetch out_pc
  output logic [PC_W-1:0]   refetch_pc
);

  // stage 1 registers
  logic              s1_valid;
  logic [PC_W-1:0]   s1_pc;
  logic [INSN_W-1:0] s1_orig, s1_rep;
  logic [CODE_W-1:0] s1_code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_pc    <= '0;
      s1_orig  <= '0;
      s1_rep   <= '0;
      s1_code  <= '0;
    end else begin
      s1_valid <= in_valid && !flush;
      s1_pc    <= in_pc;
      s1_orig  <= in_insn ^ flip_orig;
      s1_rep   <= in_insn ^ flip_rep;
      s1_code  <= in_code;
    end
  end

  // stage 2 check
  logic [CODE_W-1:0] regen_orig, regen_rep;
  edc_encode #(.DATA_W(INSN_W), .MAX_ERR(MAX_ERR)) u_enc_o (.data(s1_orig), .code(regen_orig));
  edc_encode #(.DATA_W(INSN_W), .MAX_ERR(MAX_ERR)) u_enc_r (.data(s1_rep),  .code(regen_rep));

  logic              c_good, c_fix, c_refetch;
  logic [INSN_W-1:0] c_word;

  always_comb begin
    c_good    = 1'b0;
    c_fix     = 1'b0;
    c_refetch = 1'b0;
    c_word    = s1_orig;
    if (s1_orig == s1_rep) begin
      if (regen_orig == s1_code) c_good = 1'b1;
      else                       c_refetch = 1'b1;
    end else if (regen_orig == s1_code && regen_rep != s1_code) begin
      c_fix  = 1'b1;
      c_word = s1_orig;
    end else if (regen_rep == s1_code && regen_orig != s1_code) begin
      c_fix  = 1'b1;
      c_word = s1_rep;
    end else begin
      c_refetch = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_pc        <= '0;
      out_insn_orig <= '0;
      out_insn_rep  <= '0;
      out_corrected <= 1'b0;
      refetch       <= 1'b0;
      refetch_pc    <= '0;
    end else begin
      out_valid     <= s1_valid && !flush && (c_good || c_fix);
      out_pc        <= s1_pc;
      out_insn_orig <= c_word;
      out_insn_rep  <= c_word;
      out_corrected <= s1_valid && !flush && c_fix;
      refetch       <= s1_valid && !flush && c_refetch;
      refetch_pc    <= s1_pc;
    end
  end

endmodule
