// tb_fp_mul: checks fp_mul against exact real multiplication on random
// normal operands and zero operands; the truncating multiplier must be within
// one unit in the last place of the exact product.
module tb_fp_mul;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a_i(a), .b_i(b), .y_o(y));

  task automatic check_one(logic [31:0] x, logic [31:0] z);
    real e;
    a = x; b = z;
    #1;
    e = f2r(x) * f2r(z);
    checks++;
    if (!near(y, e, ULP_REL)) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h exp %g", x, z, y, e);
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
    for (int i = 0; i < 3000; i++)
      check_one({1'($urandom), 8'(90 + $urandom % 70), 23'($urandom)},
                {1'($urandom), 8'(90 + $urandom % 70), 23'($urandom)});
    check_one(32'h40000000, 32'h40400000);   // 2 * 3
    check_one(32'h00000000, 32'h40400000);   // 0 * 3
    check_one(32'hbf800000, 32'h3fc00000);   // -1 * 1.5
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
