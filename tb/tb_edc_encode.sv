// tb_edc_encode: checks the local-checkpoint code generator.
// For the three strengths (parity, Hamming, extended Hamming) on 32-bit data
// it checks hand-worked code words and the detection property: every
// pattern of up to MAX_ERR flipped data bits must change the code. Random
// data and random error patterns from $urandom.
module tb_edc_encode;
  import stp_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] d1, d2, d3;
  logic [0:0] c1;
  logic [5:0] c2;
  logic [6:0] c3;
  logic [31:0] e1, e2, e3;
  logic [0:0] f1;
  logic [5:0] f2;
  logic [6:0] f3;

  edc_encode #(.DATA_W(32), .MAX_ERR(1)) u1 (.data(d1), .code(c1));
  edc_encode #(.DATA_W(32), .MAX_ERR(2)) u2 (.data(d2), .code(c2));
  edc_encode #(.DATA_W(32), .MAX_ERR(3)) u3 (.data(d3), .code(c3));
  edc_encode #(.DATA_W(32), .MAX_ERR(1)) v1 (.data(d1 ^ e1), .code(f1));
  edc_encode #(.DATA_W(32), .MAX_ERR(2)) v2 (.data(d2 ^ e2), .code(f2));
  edc_encode #(.DATA_W(32), .MAX_ERR(3)) v3 (.data(d3 ^ e3), .code(f3));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] rand_err(input int nbits);
    logic [31:0] m;
    m = '0;
    while ($countones(m) < nbits) m[$urandom_range(31, 0)] = 1'b1;
    return m;
  endfunction

  initial begin
    // worked examples: data bit 0 sits at code position 3 -> check bits 0,1
    d1 = 32'h1; d2 = 32'h1; d3 = 32'h1; e1 = '0; e2 = '0; e3 = '0;
    #1;
    chk(c1 == 1'b1, "parity of 1");
    chk(c2 == 6'b000011, "hamming of 1");
    chk(c3 == 7'b1000011, "ext hamming of 1");
    // data bit 1 sits at position 5 -> check bits 0,2
    d2 = 32'h2; d3 = 32'h2; #1;
    chk(c2 == 6'b000101, "hamming of 2");
    chk(c3 == 7'b1000101, "ext hamming of 2");
    d2 = 32'h0; d3 = 32'h0; #1;
    chk(c2 == 6'b0 && c3 == 7'b0, "code of 0");
    // detection property
    repeat (300) begin
      int n;
      d1 = $urandom(); d2 = $urandom(); d3 = $urandom();
      e1 = rand_err(1);
      n = $urandom_range(2, 1); e2 = rand_err(n);
      n = $urandom_range(3, 1); e3 = rand_err(n);
      #1;
      chk(c1 == ^d1, "parity value");
      chk(f1 != c1, "parity detects 1");
      chk(f2 != c2, "hamming detects <=2");
      chk(f3 != c3, "ext hamming detects <=3");
      chk(c3[5:0] == c2 || d3 != d2, "ext hamming contains hamming");
    end
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
