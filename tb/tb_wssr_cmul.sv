// tb_wssr_cmul: checks the complex multiplier, plain and conjugating, on
// random and extreme operands against products worked out here from the
// definition (a.re*b.re - a.im*b.im, a.re*b.im + a.im*b.re).
module tb_wssr_cmul;
  import wssr_pkg::*;
  cpx_t a, b;
  cpx_wide_t p, pc;
  int checks = 0, failures = 0;

  wssr_cmul #(.CONJ_B(1'b0)) dut  (.a(a), .b(b), .p(p));
  wssr_cmul #(.CONJ_B(1'b1)) dutc (.a(a), .b(b), .p(pc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int ar, ai, br, bi);
    longint er, ei, cr, ci;
    a.re = 16'(ar); a.im = 16'(ai); b.re = 16'(br); b.im = 16'(bi);
    #1;
    er = longint'(ar) * br - longint'(ai) * bi;
    ei = longint'(ar) * bi + longint'(ai) * br;
    cr = longint'(ar) * br + longint'(ai) * bi;
    ci = longint'(ai) * br - longint'(ar) * bi;
    checks += 4;
    if (longint'(p.re) != er) begin failures++; $display("re %0d %0d %0d %0d: %0d vs %0d", ar, ai, br, bi, p.re, er); end
    if (longint'(p.im) != ei) begin failures++; $display("im mismatch"); end
    if (longint'(pc.re) != cr) begin failures++; $display("conj re mismatch"); end
    if (longint'(pc.im) != ci) begin failures++; $display("conj im mismatch"); end
  endtask

  initial begin
    check_one(32767, 32767, 32767, -32767);
    check_one(-32768, 0, -32768, 0);
    check_one(1, -1, 1, 1);
    for (int n = 0; n < 2000; n++)
      check_one($signed(16'($urandom)), $signed(16'($urandom)),
                $signed(16'($urandom)), $signed(16'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
