// tb_fp_divsqrt: checks the unified divide/square-root unit against the
// exact real arithmetic (within one unit in the last place), checks
// that every result takes exactly 12 cycles, that the unit refuses new work
// while busy, and the special cases (x/0, 0/x, sqrt of a negative number).
module tb_fp_divsqrt;
  import fp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, sqrt_op, ready, valid;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_divsqrt dut (.clk, .rst_n, .start_i(start), .sqrt_i(sqrt_op), .a_i(a), .b_i(b),
                  .ready_o(ready), .valid_o(valid), .y_o(y));

  task automatic run(logic [31:0] x, logic [31:0] z, logic s, real e, logic exact, logic [31:0] ebits);
    int cyc;
    @(negedge clk);
    a = x; b = z; sqrt_op = s; start = 1'b1;
    checks++;
    if (!ready) begin failures++; $display("FAIL not ready"); end
    @(negedge clk);
    start = 1'b0;
    cyc = 1;   // cycles since the start cycle
    checks++;
    if (ready) begin failures++; $display("FAIL ready while busy"); end
    while (!valid && cyc < 50) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 12) begin failures++; $display("FAIL latency %0d", cyc); end
    checks++;
    if (exact ? (y != ebits) : !near(y, e, ULP_REL)) begin
      failures++;
      if (failures < 10) $display("FAIL %s %h %h: got %h exp %g", s ? "sqrt" : "div", x, z, y, e);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; sqrt_op = 0; a = 0; b = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      logic [31:0] x, z;
      x = {1'($urandom), 8'(100 + $urandom % 50), 23'($urandom)};
      z = {1'($urandom), 8'(100 + $urandom % 50), 23'($urandom)};
      run(x, z, 1'b0, f2r(x) / f2r(z), 1'b0, 32'd0);
      x[31] = 1'b0;
      run(x, 32'd0, 1'b1, $sqrt(f2r(x)), 1'b0, 32'd0);
    end
    run(32'h40800000, 32'd0, 1'b1, 0.0, 1'b1, 32'h40000000);   // sqrt(4) = 2
    run(32'h41100000, 32'd0, 1'b1, 0.0, 1'b1, 32'h40400000);   // sqrt(9) = 3
    run(32'h40c00000, 32'h40000000, 1'b0, 0.0, 1'b1, 32'h40400000); // 6/2 = 3
    run(32'h3f800000, 32'h00000000, 1'b0, 0.0, 1'b1, 32'h7f800000); // 1/0 = inf
    run(32'h00000000, 32'h40000000, 1'b0, 0.0, 1'b1, 32'h00000000); // 0/2 = 0
    run(32'hc0800000, 32'd0, 1'b1, 0.0, 1'b1, 32'h7fc00000);   // sqrt(-4) = NaN
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
