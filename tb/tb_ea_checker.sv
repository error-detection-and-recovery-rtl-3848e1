// tb_ea_checker: checks the two-copy corroboration rules. The code stored
// with each copy comes from a separate edc_encode instance; the test then
// corrupts one value, one code, or both copies and compares the decision
// (ok / corrected / reexec) and the chosen value with the rules.
module tb_ea_checker;
  import stp_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] va, vb, vout, good;
  logic [6:0]  ca, cb, cgood;
  logic ok, fix, rx;

  edc_encode #(.DATA_W(32), .MAX_ERR(3)) u_ref (.data(good), .code(cgood));
  ea_checker #(.DATA_W(32), .MAX_ERR(3)) dut (
    .val_a(va), .code_a(ca), .val_b(vb), .code_b(cb),
    .val_out(vout), .ok(ok), .corrected(fix), .reexec(rx));

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200) begin
      good = $urandom(); #1;
      // clean
      va = good; vb = good; ca = cgood; cb = cgood; #1;
      chk(ok && !fix && !rx && vout == good, "clean");
      // copy A value corrupted by 1..3 bits: code picks B
      va = good ^ (32'h1 << $urandom_range(31, 0)); vb = good; #1;
      chk(!ok && fix && !rx && vout == good, "A corrupt");
      va = good; vb = good ^ 32'h8000_0001; #1;
      chk(!ok && fix && !rx && vout == good, "B corrupt");
      // value differs and codes differ -> reexec
      va = good ^ 32'h10; vb = good; ca = cgood ^ 7'h1; #1;
      chk(!ok && !fix && rx, "codes differ");
      // codes equal but both values corrupt -> reexec
      va = good ^ 32'h1; vb = good ^ 32'h2; ca = cgood; cb = cgood; #1;
      chk(rx && !fix, "both corrupt");
      // values equal, one code corrupt -> ok (value trusted)
      va = good; vb = good; ca = cgood ^ 7'h40; cb = cgood; #1;
      chk(ok && vout == good, "code only corrupt");
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
