// fp_divsqrt: unified single-precision divide and square-root unit.
//
// One unit serves both operations, as in the document's unified FP-DIV/SQRT
// (Table 2), and it is not pipelined: start_i is accepted only while ready_o
// is high, and the result appears on y_o with valid_o high in the 12th cycle
// after the start cycle (the latency of Table 2), after which the unit is ready again.
// Division is restoring division of the 24-bit mantissas, square root is the
// digit-by-digit integer square root of the mantissa scaled to 48 bits; both
// retire two result bits per cycle, so 24 bits take 12 cycles. The document
// cites a Taylor-series divider for its area figures; this design uses the
// simpler digit recurrence, which gives the same latency. Denormals flush to
// zero, rounding is toward zero, divide by zero gives infinity and the square
// root of a negative number gives the quiet NaN 0x7FC00000.
module fp_divsqrt (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic        sqrt_i,   // 1: sqrt(a), 0: a / b
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  output logic        ready_o,
  output logic        valid_o,
  output logic [31:0] y_o
);
  localparam int ITER = 12;

  typedef struct packed {
    logic [25:0] rem;
    logic [23:0] q;
    logic [47:0] rad;   // sqrt radicand, consumed two bits per step
  } st_t;

  logic [3:0]  cnt;
  logic        busy, is_sqrt, special;
  logic [31:0] special_val;
  logic        sign;
  logic signed [9:0] e_res;
  logic [23:0] divisor;
  st_t         st, st_init, st_next;

  function automatic st_t div_step(st_t s, logic [23:0] dv);
    st_t o = s;
    if (o.rem >= {2'b00, dv}) begin
      o.rem = o.rem - {2'b00, dv};
      o.q   = {o.q[22:0], 1'b1};
    end else begin
      o.q   = {o.q[22:0], 1'b0};
    end
    o.rem = {o.rem[24:0], 1'b0};
    return o;
  endfunction

  function automatic st_t sqrt_step(st_t s);
    st_t o = s;
    logic [25:0] t;
    o.rem = {o.rem[23:0], o.rad[47:46]};
    o.rad = {o.rad[45:0], 2'b00};
    t = {o.q, 2'b01};
    if (o.rem >= t) begin
      o.rem = o.rem - t;
      o.q   = {o.q[22:0], 1'b1};
    end else begin
      o.q   = {o.q[22:0], 1'b0};
    end
    return o;
  endfunction

  // Operand preparation for a new operation.
  logic [23:0] ma, mb;
  logic [7:0]  ea, eb;
  logic signed [9:0] e_start;
  logic        sp_start;
  logic [31:0] sp_val;
  always_comb begin
    ea = a_i[30:23];
    eb = b_i[30:23];
    ma = (ea == 0) ? 24'd0 : {1'b1, a_i[22:0]};
    mb = (eb == 0) ? 24'd0 : {1'b1, b_i[22:0]};
    st_init  = '0;
    sp_start = 1'b0;
    sp_val   = 32'd0;
    e_start  = '0;
    if (sqrt_i) begin
      if (ma == 0) begin
        sp_start = 1'b1; sp_val = {a_i[31], 31'd0};
      end else if (a_i[31]) begin
        sp_start = 1'b1; sp_val = 32'h7FC00000;
      end else if (ea[0]) begin
        // unbiased exponent even: sqrt(m * 2^23)
        st_init.rad = {1'b0, ma, 23'd0};
        e_start = $signed({2'b00, ea}) - 10'sd127;
        e_start = (e_start >>> 1) + 10'sd127;
      end else begin
        // unbiased exponent odd: sqrt(2m * 2^23)
        st_init.rad = {ma, 24'd0};
        e_start = $signed({2'b00, ea}) - 10'sd128;
        e_start = (e_start >>> 1) + 10'sd127;
      end
    end else begin
      e_start = $signed({2'b00, ea}) - $signed({2'b00, eb}) + 10'sd127;
      if (ma == 0) begin
        sp_start = 1'b1; sp_val = {a_i[31] ^ b_i[31], 31'd0};
      end else if (mb == 0) begin
        sp_start = 1'b1; sp_val = {a_i[31] ^ b_i[31], 8'hFF, 23'd0};
      end else if (ma < mb) begin
        st_init.rem = {1'b0, ma, 1'b0};
        e_start = e_start - 10'sd1;
      end else begin
        st_init.rem = {2'b00, ma};
      end
    end
  end

  always_comb begin
    if (is_sqrt) st_next = sqrt_step(sqrt_step(st));
    else         st_next = div_step(div_step(st, divisor), divisor);
  end

  assign ready_o = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      cnt         <= '0;
      valid_o     <= 1'b0;
      y_o         <= '0;
      st          <= '0;
      is_sqrt     <= 1'b0;
      special     <= 1'b0;
      special_val <= '0;
      sign        <= 1'b0;
      e_res       <= '0;
      divisor     <= '0;
    end else begin
      valid_o <= 1'b0;
      if (!busy) begin
        if (start_i) begin
          busy        <= 1'b1;
          // the first two result bits are formed in the start cycle
          cnt         <= 4'(ITER - 1);
          st          <= sqrt_i ? sqrt_step(sqrt_step(st_init))
                                : div_step(div_step(st_init, mb), mb);
          is_sqrt     <= sqrt_i;
          special     <= sp_start;
          special_val <= sp_val;
          sign        <= sqrt_i ? 1'b0 : (a_i[31] ^ b_i[31]);
          e_res       <= e_start;
          divisor     <= mb;
        end
      end else begin
        st  <= st_next;
        cnt <= cnt - 1'b1;
        if (cnt == 4'd1) begin
          busy    <= 1'b0;
          valid_o <= 1'b1;
          if (special)                 y_o <= special_val;
          else if (e_res >= 10'sd255)  y_o <= {sign, 8'hFF, 23'd0};
          else if (e_res <= 10'sd0)    y_o <= {sign, 31'd0};
          else                         y_o <= {sign, e_res[7:0], st_next.q[22:0]};
        end
      end
    end
  end
endmodule
