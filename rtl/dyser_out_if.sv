// dyser_out_if: the DySER output interface.
//
// Results leave the fabric through NUM_OUT output ports, each ending in a
// receive FIFO of DEPTH entries that returns credits to the edge switch. A
// host request is either scalar (one word from output port req_port_i) or
// vector (VEC_LEN words through vector port req_port_i). The vector map of the
// vector port (per configuration slot, slot_i) names for each word k the output
// port it comes from, or masks the word off (it then reads as zero). Like the
// input side, the gathering FSM handles one entry per cycle, word 0 first, and
// waits while the port it needs is empty. The answer appears on resp_data_o with
// resp_valid_o high for one cycle: the cycle after a scalar request is
// accepted, or the cycle after the last word of a vector was gathered. RESET
// and SET tokens that reach an output port end there; they are counted on
// ctl_count_o. The document only states that the output side needs a mapping
// FSM like the input side; ports, depths and handshake are this design's.
module dyser_out_if
  import dyser_pkg::*;
#(
  parameter int NUM_OUT = 18,
  parameter int NUM_VP  = 8,
  parameter int VEC_LEN = 4,
  parameter int NUM_CFG = 4,
  parameter int DEPTH   = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           req_valid_i,
  output logic                           req_ready_o,
  input  logic                           req_vec_i,
  input  logic [5:0]                     req_port_i,
  output logic                           resp_valid_o,
  output logic [VEC_LEN-1:0][DATA_W-1:0] resp_data_o,
  input  logic                           vmap_we_i,
  input  logic [$clog2(NUM_CFG)-1:0]     vmap_slot_i,
  input  logic [$clog2(NUM_VP)-1:0]      vmap_vp_i,
  input  vmap_ent_t [VEC_LEN-1:0]        vmap_i,
  input  logic [$clog2(NUM_CFG)-1:0]     slot_i,
  input  link_t [NUM_OUT-1:0]            in_i,
  output logic  [NUM_OUT-1:0]            in_credit_o,
  output logic [15:0]                    ctl_count_o,
  output logic                           stall_o
);
  localparam int EW  = (VEC_LEN > 1) ? $clog2(VEC_LEN) : 1;
  localparam int VPW = $clog2(NUM_VP);

  link_t [NUM_OUT-1:0] head;
  logic  [NUM_OUT-1:0] pop;
  logic  [NUM_OUT-1:0] has_data;

  for (genvar p = 0; p < NUM_OUT; p++) begin : g_port
    link_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_i    (in_i[p]),
      .pop_i   (pop[p]),
      .head_o  (head[p]),
      .credit_o(in_credit_o[p])
    );
    assign has_data[p] = head[p].valid && head[p].kind == TK_DATA;
  end

  vmap_ent_t [VEC_LEN-1:0] vmap [NUM_CFG][NUM_VP];

  logic                           busy;
  logic [EW-1:0]                  idx;
  logic [VPW-1:0]                 vp;
  logic [VEC_LEN-1:0][DATA_W-1:0] vbuf;
  vmap_ent_t                      ent;
  logic                           advance, take_scalar, take_vec;
  logic [5:0]                     nctl;

  always_comb begin
    ent         = vmap[slot_i][vp][idx];
    advance     = busy && (!ent.en || has_data[ent.port]);
    stall_o     = busy && !advance;
    req_ready_o = !busy && (req_vec_i || has_data[req_port_i]);
    take_scalar = req_valid_i && req_ready_o && !req_vec_i;
    take_vec    = req_valid_i && req_ready_o && req_vec_i;
    pop  = '0;
    nctl = '0;
    for (int p = 0; p < NUM_OUT; p++)
      if (head[p].valid && head[p].kind != TK_DATA) begin
        pop[p] = 1'b1;
        nctl   = nctl + 1'b1;
      end
    if (advance && ent.en) pop[ent.port] = 1'b1;
    if (take_scalar)       pop[req_port_i] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (vmap_we_i) vmap[vmap_slot_i][vmap_vp_i] <= vmap_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      idx          <= '0;
      vp           <= '0;
      vbuf         <= '0;
      resp_valid_o <= 1'b0;
      resp_data_o  <= '0;
      ctl_count_o  <= '0;
    end else begin
      resp_valid_o <= 1'b0;
      ctl_count_o  <= ctl_count_o + 16'(nctl);
      if (take_scalar) begin
        resp_valid_o   <= 1'b1;
        resp_data_o    <= '0;
        resp_data_o[0] <= head[req_port_i].data;
      end else if (take_vec) begin
        busy <= 1'b1;
        idx  <= '0;
        vp   <= VPW'(req_port_i);
      end else if (advance) begin
        vbuf[idx] <= ent.en ? head[ent.port].data : '0;
        if (idx == EW'(VEC_LEN - 1)) begin
          busy         <= 1'b0;
          resp_valid_o <= 1'b1;
          resp_data_o  <= vbuf;
          resp_data_o[idx] <= ent.en ? head[ent.port].data : '0;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  a_port_range: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid_i |-> (req_vec_i ? int'(req_port_i) < NUM_VP : int'(req_port_i) < NUM_OUT));

endmodule
