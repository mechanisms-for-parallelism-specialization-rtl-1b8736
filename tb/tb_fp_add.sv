// tb_fp_add: checks fp_add against exact real arithmetic. Random normal operands of nearby and distant exponents, plus
// cancellation and zero cases; since fp_add truncates, a result may differ
// from the exact sum by less than one unit in its last place.
module tb_fp_add;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp_add dut (.a_i(a), .b_i(b), .sub_i(sub), .y_o(y));

  function automatic logic [31:0] rnd_fp(int emin, int emax);
    logic [31:0] v;
    v[31]    = 1'($urandom);
    v[30:23] = 8'(emin + int'($urandom % (emax - emin + 1)));
    v[22:0]  = 23'($urandom);
    return v;
  endfunction


  task automatic check_one(logic [31:0] x, logic [31:0] z, logic s);
    real r;
    a = x; b = z; sub = s;
    #1;
    r = s ? (f2r(x) - f2r(z)) : (f2r(x) + f2r(z));
    checks++;
    // truncation: below one unit in the last place of the result
    if (!near(y, r, ULP_REL)) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h: got %h exp %g", x, s ? "-" : "+", z, y, r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] x, z;
      int e0;
      e0 = 60 + int'($urandom % 100);
      x = rnd_fp(e0, e0 + 3);
      z = rnd_fp(e0 - (i % 30), e0 + 1);
      check_one(x, z, 1'($urandom));
    end
    check_one(32'h3f800000, 32'h3f800000, 1'b1);   // 1 - 1 = 0
    check_one(32'h40400000, 32'h00000000, 1'b0);   // 3 + 0
    check_one(32'h00000000, 32'hc0a00000, 1'b0);   // 0 + -5
    check_one(32'h3f800000, 32'h33800000, 1'b0);   // 1 + 2^-24
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
