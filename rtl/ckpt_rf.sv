// ckpt_rf: checkpointed architectural register state.
//
// Every committed register result (after the original and replica results
// have been corroborated) is also written here, indexed by architectural
// register. When a passive error cannot be repaired locally, the recovery
// controller pulses restore_start and this block replays the whole saved
// state, one architectural register per cycle (rs_valid/rs_arch/rs_data),
// so that the surrounding logic can write it back into the physical
// registers named by the committed rename map. restore_done pulses after the
// last register; busy is high during the walk. A restore takes NARCH cycles.
// One restore port and the one-register-per-cycle walk are this design's own
// choices; the document gives no checkpoint organisation.
module ckpt_rf #(
  parameter int DATA_W = 32,
  parameter int NARCH  = 32,
  localparam int AW    = $clog2(NARCH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cm_valid,
  input  logic [AW-1:0]     cm_arch,
  input  logic [DATA_W-1:0] cm_data,
  input  logic              restore_start,
  output logic              rs_valid,
  output logic [AW-1:0]     rs_arch,
  output logic [DATA_W-1:0] rs_data,
  output logic              restore_done,
  output logic              busy
);

  logic [DATA_W-1:0] regs [NARCH];
  logic [AW-1:0]     ptr;

  assign rs_valid = busy;
  assign rs_arch  = ptr;
  assign rs_data  = regs[ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      ptr          <= '0;
      restore_done <= 1'b0;
      for (int i = 0; i < NARCH; i++) regs[i] <= '0;
    end else begin
      restore_done <= 1'b0;
      if (cm_valid) regs[cm_arch] <= cm_data;
      if (restore_start && !busy) begin
        busy <= 1'b1;
        ptr  <= '0;
      end else if (busy) begin
        if (int'(ptr) == NARCH - 1) begin
          busy         <= 1'b0;
          restore_done <= 1'b1;
        end
        ptr <= ptr + 1'b1;
      end
    end
  end

endmodule
