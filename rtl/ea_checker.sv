// ea_checker: corroborates the two copies of a value held in a storage
// structure written by both the original and the replica instruction (the
// load/store queue addresses, the two register-file partitions, the two
// instruction copies after replication).
//
// Each copy carries the error code generated when it was written. Decision:
//   * values equal                  -> value is good (ok).
//   * values differ, codes equal    -> the stored code picks the good copy:
//                                      the copy whose regenerated code equals
//                                      the stored code is taken (corrected).
//                                      If both or neither match, re-execute.
//   * values differ, codes differ   -> re-execute (reexec).
// Codes alone are never used to repair a single entry, because a mismatch
// cannot tell whether the value or the code was hit. Combinational.
module ea_checker
  import stp_pkg::*;
#(
  parameter int DATA_W  = 32,
  parameter int MAX_ERR = 3,
  localparam int CODE_W = edc_width(DATA_W, MAX_ERR)
) (
  input  logic [DATA_W-1:0] val_a,
  input  logic [CODE_W-1:0] code_a,
  input  logic [DATA_W-1:0] val_b,
  input  logic [CODE_W-1:0] code_b,
  output logic [DATA_W-1:0] val_out,    // corroborated value
  output logic              ok,         // copies agreed
  output logic              corrected,  // copies disagreed, code resolved it
  output logic              reexec      // cannot be resolved: re-execute
);

  logic [CODE_W-1:0] regen_a, regen_b;

  edc_encode #(.DATA_W(DATA_W), .MAX_ERR(MAX_ERR)) u_enc_a (.data(val_a), .code(regen_a));
  edc_encode #(.DATA_W(DATA_W), .MAX_ERR(MAX_ERR)) u_enc_b (.data(val_b), .code(regen_b));

  always_comb begin
    val_out   = val_a;
    ok        = 1'b0;
    corrected = 1'b0;
    reexec    = 1'b0;
    if (val_a == val_b) begin
      ok = 1'b1;
    end else if (code_a == code_b) begin
      if (regen_a == code_a && regen_b != code_a) begin
        val_out   = val_a;
        corrected = 1'b1;
      end else if (regen_b == code_a && regen_a != code_a) begin
        val_out   = val_b;
        corrected = 1'b1;
      end else begin
        reexec = 1'b1;
      end
    end else begin
      reexec = 1'b1;
    end
  end

endmodule
