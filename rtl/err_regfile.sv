// err_regfile: physical register file split for Efficient Register Renaming
// (ERR), with local-checkpoint codes and per-register status bits.
//
// The file has 2*NPART registers. The original thread writes partition 0
// (registers 0..NPART-1); the replica of the same instruction writes the twin
// register p+NPART in partition 1, so one rename mapping serves both copies.
// Every write stores an error code with the value and sets the register's
// status bit; deallocating a mapping clears the status bits of both twins.
// At reset every register holds zero with a valid code and its status bit
// set, so the initial architectural state can be read and repaired.
//
// Eager passive-error detection on every read port: the code is regenerated
// and compared. On a mismatch the twin register (other partition) is used:
//   twin written (status set) and its code good -> its value is returned
//                                                  (rd_fix).
//   twin not yet written                         -> rd_wait: the reader must
//                                                  stall and retry.
//   twin code bad as well                        -> rd_fail: uncorrectable,
//                                                  recovery from checkpoint.
// The commit port returns both twins with their codes for corroboration.
// Reads are combinational; writes, deallocation and restore take effect at
// the clock edge. inj_* XOR a register's stored value to model an upset.
// This is the variant without an additional register file (the status-bit
// scheme); port counts are this design's own choice.
module err_regfile
  import stp_pkg::*;
#(
  parameter int DATA_W  = 32,
  parameter int NPART   = 64,
  parameter int NRD     = 2,
  parameter int MAX_ERR = MAXERR_ORIG_RF,
  localparam int PW     = $clog2(2 * NPART),
  localparam int CODE_W = edc_width(DATA_W, MAX_ERR)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // result writes: original and replica writeback
  input  logic                 wr_o_valid,
  input  logic [PW-1:0]        wr_o_addr,
  input  logic [DATA_W-1:0]    wr_o_data,
  input  logic                 wr_r_valid,
  input  logic [PW-1:0]        wr_r_addr,
  input  logic [DATA_W-1:0]    wr_r_data,
  // checkpoint restore writes both twins
  input  logic                 rs_valid,
  input  logic [PW-2:0]        rs_preg,
  input  logic [DATA_W-1:0]    rs_data,
  // deallocation of a mapping (both twins)
  input  logic                 free_valid,
  input  logic [PW-2:0]        free_preg,
  // operand read ports
  input  logic [PW-1:0]        rd_addr  [NRD],
  output logic [DATA_W-1:0]    rd_data  [NRD],
  output logic [NRD-1:0]       rd_err,
  output logic [NRD-1:0]       rd_fix,
  output logic [NRD-1:0]       rd_wait,
  output logic [NRD-1:0]       rd_fail,
  // commit read port: both twins with their codes
  input  logic [PW-2:0]        cm_preg,
  output logic [DATA_W-1:0]    cm_val_o,
  output logic [CODE_W-1:0]    cm_code_o,
  output logic [DATA_W-1:0]    cm_val_r,
  output logic [CODE_W-1:0]    cm_code_r,
  output logic                 cm_ready,    // both twins written
  // upset injection
  input  logic                 inj_valid,
  input  logic [PW-1:0]        inj_addr,
  input  logic [DATA_W-1:0]    inj_mask
);

  localparam int NREG = 2 * NPART;

  logic [DATA_W-1:0] val  [NREG];
  logic [CODE_W-1:0] code [NREG];
  logic [NREG-1:0]   status;

  logic [CODE_W-1:0] wr_o_code, wr_r_code, rs_code;
  edc_encode #(.DATA_W(DATA_W), .MAX_ERR(MAX_ERR)) u_enc_wo (.data(wr_o_data), .code(wr_o_code));
  edc_encode #(.DATA_W(DATA_W), .MAX_ERR(MAX_ERR)) u_enc_wr (.data(wr_r_data), .code(wr_r_code));
  edc_encode #(.DATA_W(DATA_W), .MAX_ERR(MAX_ERR)) u_enc_rs (.data(rs_data),   .code(rs_code));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status <= '1;   // every register starts holding a written zero
      for (int i = 0; i < NREG; i++) begin
        val[i]  <= '0;
        code[i] <= '0;
      end
    end else begin
      if (free_valid) begin
        status[{1'b0, free_preg}] <= 1'b0;
        status[{1'b1, free_preg}] <= 1'b0;
      end
      if (inj_valid) val[inj_addr] <= val[inj_addr] ^ inj_mask;
      if (wr_o_valid) begin
        val[wr_o_addr]    <= wr_o_data;
        code[wr_o_addr]   <= wr_o_code;
        status[wr_o_addr] <= 1'b1;
      end
      if (wr_r_valid) begin
        val[wr_r_addr]    <= wr_r_data;
        code[wr_r_addr]   <= wr_r_code;
        status[wr_r_addr] <= 1'b1;
      end
      if (rs_valid) begin
        val[{1'b0, rs_preg}]    <= rs_data;
        code[{1'b0, rs_preg}]   <= rs_code;
        status[{1'b0, rs_preg}] <= 1'b1;
        val[{1'b1, rs_preg}]    <= rs_data;
        code[{1'b1, rs_preg}]   <= rs_code;
        status[{1'b1, rs_preg}] <= 1'b1;
      end
    end
  end

  // eager detection and twin correction on each read port
  for (genvar g = 0; g < NRD; g++) begin : g_rd
    logic [PW-1:0]     twin;
    logic [CODE_W-1:0] regen_own, regen_twin;
    assign twin = rd_addr[g] ^ PW'(NPART);
    edc_encode #(.DATA_W(DATA_W), .MAX_ERR(MAX_ERR)) u_enc_own  (.data(val[rd_addr[g]]), .code(regen_own));
    edc_encode #(.DATA_W(DATA_W), .MAX_ERR(MAX_ERR)) u_enc_twin (.data(val[twin]),       .code(regen_twin));
    always_comb begin
      rd_data[g] = val[rd_addr[g]];
      rd_err[g]  = (regen_own != code[rd_addr[g]]);
      rd_fix[g]  = 1'b0;
      rd_wait[g] = 1'b0;
      rd_fail[g] = 1'b0;
      if (rd_err[g]) begin
        if (!status[twin])                 rd_wait[g] = 1'b1;
        else if (regen_twin == code[twin]) begin
          rd_fix[g]  = 1'b1;
          rd_data[g] = val[twin];
        end else                           rd_fail[g] = 1'b1;
      end
    end
  end

  assign cm_val_o  = val[{1'b0, cm_preg}];
  assign cm_code_o = code[{1'b0, cm_preg}];
  assign cm_val_r  = val[{1'b1, cm_preg}];
  assign cm_code_r = code[{1'b1, cm_preg}];
  assign cm_ready  = status[{1'b0, cm_preg}] && status[{1'b1, cm_preg}];

endmodule
