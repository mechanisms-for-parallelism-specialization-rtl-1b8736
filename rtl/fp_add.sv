// fp_add: single-precision floating-point adder/subtractor (combinational).
//
// Computes a + b, or a - b when sub_i is set, on IEEE-754 binary32 operands.
// The operand of smaller magnitude is aligned to the larger one with three
// extra low-order bits, the mantissas are added or subtracted, the result is
// renormalised and truncated to 24 bits. Simplifications of this design:
// denormal inputs and results are flushed to zero, rounding is toward zero,
// exponent overflow gives infinity, and NaN/infinity inputs are not treated
// specially. The document names the FP-ADD unit and its 4-cycle latency
// (Table 2) but not its insides; the FU places this logic in front of a
// 4-stage delay line to give that latency.
module fp_add (
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  input  logic        sub_i,
  output logic [31:0] y_o
);
  logic        sa, sb, sx, sy;
  logic [7:0]  ea, eb, ex, ey;
  logic [23:0] ma, mb, mx, my;
  logic [26:0] ax, ay;
  logic [27:0] sum;
  logic [7:0]  d;
  logic [4:0]  lz;
  logic signed [9:0] e_res;
  logic [26:0] norm;

  always_comb begin
    sa = a_i[31];
    sb = b_i[31] ^ sub_i;
    ea = a_i[30:23];
    eb = b_i[30:23];
    ma = (ea == 0) ? 24'd0 : {1'b1, a_i[22:0]};
    mb = (eb == 0) ? 24'd0 : {1'b1, b_i[22:0]};
    // x: operand of larger magnitude
    if ({ea, ma} >= {eb, mb}) begin
      sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
    end else begin
      sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
    end
    d  = ex - ey;
    ax = {mx, 3'b000};
    ay = (d > 8'd26) ? 27'd0 : ({my, 3'b000} >> d);
    if (sx == sy) sum = {1'b0, ax} + {1'b0, ay};
    else          sum = {1'b0, ax} - {1'b0, ay};

    lz = 5'd0;
    for (int i = 26; i >= 0; i--) begin
      if (sum[i]) begin
        lz = 5'(26 - i);
        break;
      end
    end

    y_o   = 32'd0;
    e_res = '0;
    norm  = '0;
    if (mx == 0) begin
      y_o = 32'd0;
    end else if (sum[27]) begin
      e_res = $signed({2'b00, ex}) + 10'sd1;
      norm  = sum[27:1];
      y_o   = (e_res >= 10'sd255) ? {sx, 8'hFF, 23'd0} : {sx, e_res[7:0], norm[25:3]};
    end else if (sum[26:0] == 0) begin
      y_o = 32'd0;
    end else begin
      e_res = $signed({2'b00, ex}) - $signed({5'd0, lz});
      norm  = sum[26:0] << lz;
      y_o   = (e_res <= 10'sd0) ? 32'd0 : {sx, e_res[7:0], norm[25:3]};
    end
  end
endmodule
