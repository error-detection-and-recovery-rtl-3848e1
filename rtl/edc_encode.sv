// edc_encode: error-detecting code generator used for "local checkpointing".
//
// When a value is written into a protected storage structure its code is
// generated here and stored beside it; when the value is read back the code
// is generated again and compared with the stored one (a mismatch means a
// bit flipped while the value sat in storage).
//
// The code is chosen by MAX_ERR, the number of bit errors it must detect:
//   1 -> even parity; 2 -> Hamming check bits; 3 -> Hamming check bits plus an
//   overall parity bit (extended Hamming, distance 4).
// Hamming construction: the data bits are laid out at the code positions
// 1,2,3,... that are not powers of two; check bit j is the XOR of the data
// bits whose position has bit j set. The overall parity covers data and
// check bits. Purely combinational, no clock.
module edc_encode
  import stp_pkg::*;
#(
  parameter int DATA_W  = 32,
  parameter int MAX_ERR = 3,
  localparam int CODE_W = edc_width(DATA_W, MAX_ERR)
) (
  input  logic [DATA_W-1:0] data,
  output logic [CODE_W-1:0] code
);

  localparam int R = hamming_r(DATA_W);

  always_comb begin
    logic [R-1:0] chk;
    int d;
    chk = '0;
    d   = 0;
    // walk code positions, skipping the powers of two
    for (int p = 1; p <= DATA_W + R; p++) begin
      if ((p & (p - 1)) != 0 && d < DATA_W) begin
        for (int j = 0; j < R; j++)
          if (((p >> j) & 1) == 1) chk[j] = chk[j] ^ data[d];
        d++;
      end
    end
    if (MAX_ERR <= 1) begin
      code = CODE_W'(^data);
    end else if (MAX_ERR == 2) begin
      code = CODE_W'(chk);
    end else begin
      code = CODE_W'({(^data) ^ (^chk), chk});
    end
  end

endmodule
