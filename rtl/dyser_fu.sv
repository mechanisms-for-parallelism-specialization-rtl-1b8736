// dyser_fu: one functional unit tile of the DySER fabric.
//
// The FU sits in the square between four switches and can take each operand
// from any of them (inputs indexed FS_NW, FS_NE, FS_SW, FS_SE); its result goes
// to the switch at its south-east corner. Its configuration register bank holds
// NUM_CFG configurations (enable, opcode, operand sources). The FU fires when
// every operand it needs is a valid data token at the head of its input buffer
// and it holds a credit for the south-east switch; the credit is spent at
// issue, so a result can always be delivered. KIND selects the hardware of
// the tile (Table 2): INT-ADD (add/sub, 1 cycle), INT-MUL (5 cycles), FP-ADD
// (add/sub, 4 cycles), FP-MUL (7 cycles) or the unified FP divide/square root
// (12 cycles, not pipelined). The pipelined kinds compute combinationally and
// then pass the result through a delay line of their latency, standing for a
// pipelined unit of that depth; the result is on out_o exactly LAT cycles
// after the operands were consumed.
//
// Fast configuration switching: the FU is active or off. When active, and every
// operand input of the current configuration holds a RESET token, and no result
// is still in flight, it consumes them, sends one RESET on and turns off. When
// off, and every operand input of the next configuration (tgt_slot_i) holds a
// SET, and the south-east switch reports free, it consumes them, sends one SET
// on and becomes active in the next configuration. RESET or SET tokens on an
// input the relevant configuration does not use are dropped. free_o is the
// tile's free signal. act_i activates configuration act_slot_i at once.
// Own choices: the opcode set and the delay-line model of pipelining.
module dyser_fu
  import dyser_pkg::*;
#(
  parameter fu_kind_e KIND    = FK_IADD,
  parameter int       NUM_CFG = 4,
  parameter int       DEPTH   = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  link_t [3:0]                in_i,
  output logic  [3:0]                in_credit_o,
  output link_t                      out_o,
  input  logic                       out_credit_i,
  input  logic                       out_free_i,
  output logic                       free_o,
  input  logic                       cfg_we_i,
  input  logic [$clog2(NUM_CFG)-1:0] cfg_slot_i,
  input  fu_cfg_t                    cfg_i,
  input  logic                       act_i,
  input  logic [$clog2(NUM_CFG)-1:0] act_slot_i,
  input  logic [$clog2(NUM_CFG)-1:0] tgt_slot_i
);
  localparam int SW  = $clog2(NUM_CFG);
  localparam int CW  = $clog2(DEPTH + 1);
  localparam int LAT = fu_latency(KIND);

  fu_cfg_t       bank [NUM_CFG];
  logic          active;
  logic [SW-1:0] slot;
  logic [CW-1:0] credits;
  logic [4:0]    inflight;

  link_t [3:0] head;
  logic  [3:0] pop;

  for (genvar i = 0; i < 4; i++) begin : g_in
    link_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_i    (in_i[i]),
      .pop_i   (pop[i]),
      .head_o  (head[i]),
      .credit_o(in_credit_o[i])
    );
  end

  fu_cfg_t cur, nxt;
  logic [3:0] use_cur, use_nxt;
  logic       fire, fire_rst, fire_set, unit_ready;
  logic       res_valid;
  logic [DATA_W-1:0] res_data;

  always_comb begin
    cur = bank[slot];
    nxt = bank[tgt_slot_i];
    use_cur = '0;
    use_nxt = '0;
    use_cur[cur.src_a] = 1'b1;
    if (!op_is_unary(cur.op)) use_cur[cur.src_b] = 1'b1;
    use_nxt[nxt.src_a] = 1'b1;
    if (!op_is_unary(nxt.op)) use_nxt[nxt.src_b] = 1'b1;
    if (!(active && cur.en)) use_cur = '0;
    if (!nxt.en)             use_nxt = '0;
  end

  // heads of all used inputs carry the given kind
  function automatic logic all_kind(link_t [3:0] h, logic [3:0] use_m, tok_kind_e k);
    logic r = (use_m != 0);
    for (int i = 0; i < 4; i++)
      if (use_m[i] && !(h[i].valid && h[i].kind == k)) r = 1'b0;
    return r;
  endfunction

  always_comb begin
    fire     = active && cur.en && all_kind(head, use_cur, TK_DATA) &&
               credits != 0 && unit_ready;
    fire_rst = active && cur.en && all_kind(head, use_cur, TK_RESET) &&
               inflight == 0 && credits != 0;
    fire_set = !active && all_kind(head, use_nxt, TK_SET) &&
               credits != 0 && out_free_i;
    pop = '0;
    if (fire || fire_rst) pop = use_cur;
    else if (fire_set)    pop = use_nxt;
    // drop control tokens on inputs that the relevant configuration ignores
    for (int i = 0; i < 4; i++) begin
      if (head[i].valid && head[i].kind == TK_RESET && !use_cur[i]) pop[i] = 1'b1;
      if (head[i].valid && head[i].kind == TK_SET   && !use_nxt[i]) pop[i] = 1'b1;
    end
  end

  // ---------------------------------------------------------------- datapath
  logic [DATA_W-1:0] opa, opb;
  assign opa = head[cur.src_a].data;
  assign opb = head[cur.src_b].data;

  if (KIND == FK_FDIVSQRT) begin : g_divsqrt
    logic ds_ready;
    fp_divsqrt u_ds (
      .clk, .rst_n,
      .start_i(fire),
      .sqrt_i (cur.op == OP_FSQRT),
      .a_i    (opa),
      .b_i    (opb),
      .ready_o(ds_ready),
      .valid_o(res_valid),
      .y_o    (res_data)
    );
    assign unit_ready = ds_ready;
  end else begin : g_pipe
    logic [DATA_W-1:0] comb_res, fadd_y, fmul_y;
    logic [LAT-1:0]    v_pipe;
    logic [DATA_W-1:0] d_pipe [LAT];

    if (KIND == FK_FADD) begin : g_fadd
      fp_add u_fadd (.a_i(opa), .b_i(opb), .sub_i(cur.op == OP_FSUB), .y_o(fadd_y));
    end else begin : g_nofadd
      assign fadd_y = '0;
    end
    if (KIND == FK_FMUL) begin : g_fmul
      fp_mul u_fmul (.a_i(opa), .b_i(opb), .y_o(fmul_y));
    end else begin : g_nofmul
      assign fmul_y = '0;
    end

    always_comb begin
      case (KIND)
        FK_IADD: comb_res = (cur.op == OP_ISUB) ? opa - opb : opa + opb;
        FK_IMUL: comb_res = opa * opb;
        FK_FADD: comb_res = fadd_y;
        default: comb_res = fmul_y;
      endcase
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_pipe <= '0;
      else        v_pipe <= (v_pipe << 1) | LAT'(fire);
    end
    always_ff @(posedge clk) begin
      d_pipe[0] <= comb_res;
      for (int s = 1; s < LAT; s++) d_pipe[s] <= d_pipe[s-1];
    end
    assign res_valid  = v_pipe[LAT-1];
    assign res_data   = d_pipe[LAT-1];
    assign unit_ready = 1'b1;
  end

  // ----------------------------------------------------------------- output
  always_comb begin
    out_o = '0;
    if (res_valid) begin
      out_o.valid = 1'b1;
      out_o.kind  = TK_DATA;
      out_o.data  = res_data;
    end else if (fire_rst) begin
      out_o.valid = 1'b1;
      out_o.kind  = TK_RESET;
    end else if (fire_set) begin
      out_o.valid = 1'b1;
      out_o.kind  = TK_SET;
    end
  end

  assign free_o = !active || slot == tgt_slot_i;

  always_ff @(posedge clk) begin
    if (cfg_we_i) bank[cfg_slot_i] <= cfg_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      slot     <= '0;
      credits  <= CW'(DEPTH);
      inflight <= '0;
    end else begin
      credits  <= credits - CW'(fire || fire_rst || fire_set) + CW'(out_credit_i);
      inflight <= inflight + 5'(fire) - 5'(res_valid);
      if (act_i) begin
        active <= bank[act_slot_i].en;
        slot   <= act_slot_i;
      end else if (fire_rst) begin
        active <= 1'b0;
      end else if (fire_set) begin
        active <= 1'b1;
        slot   <= tgt_slot_i;
      end
    end
  end

  // A configured opcode must be one this tile's hardware implements.
  a_op_supported: assert property (@(posedge clk) disable iff (!rst_n)
    fire |-> fu_supports(KIND, cur.op));
  // Control tokens never overtake results in flight.
  a_ctl_order: assert property (@(posedge clk) disable iff (!rst_n)
    !(res_valid && (fire_rst || fire_set)));

endmodule
