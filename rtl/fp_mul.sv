// fp_mul: single-precision floating-point multiplier (combinational).
//
// Multiplies two IEEE-754 binary32 operands: the 24x24-bit mantissa product is
// normalised by at most one place and truncated to 24 bits, the exponents are
// added and rebiased. Simplifications of this design: denormals flush to zero,
// rounding is toward zero, overflow gives infinity, NaN/infinity inputs are
// not treated specially. The document names the FP-MUL unit and its 7-cycle
// latency (Table 2) only; the FU adds the delay line that gives that latency.
module fp_mul (
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  output logic [31:0] y_o
);
  logic [23:0] ma, mb;
  logic [47:0] p;
  logic signed [9:0] e_res;
  logic [22:0] frac;
  logic        s;

  always_comb begin
    s  = a_i[31] ^ b_i[31];
    ma = (a_i[30:23] == 0) ? 24'd0 : {1'b1, a_i[22:0]};
    mb = (b_i[30:23] == 0) ? 24'd0 : {1'b1, b_i[22:0]};
    p  = ma * mb;
    e_res = $signed({2'b00, a_i[30:23]}) + $signed({2'b00, b_i[30:23]}) - 10'sd127;
    if (p[47]) begin
      e_res = e_res + 10'sd1;
      frac  = p[46:24];
    end else begin
      frac  = p[45:23];
    end
    if (ma == 0 || mb == 0 || e_res <= 10'sd0) y_o = {s, 31'd0};
    else if (e_res >= 10'sd255)                y_o = {s, 8'hFF, 23'd0};
    else                                       y_o = {s, e_res[7:0], frac};
  end
endmodule
