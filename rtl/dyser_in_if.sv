// dyser_in_if: the DySER input interface.
//
// The host core writes into NUM_IN named input ports, each a FIFO of DEPTH
// words whose head is forwarded, under credit flow control, into the edge
// switch the port feeds. A request is either scalar (one word to input port
// req_port_i) or vector (VEC_LEN words to vector port req_port_i). A vector
// port is mapped to input ports by its vector map, held per configuration slot
// (slot_i): entry k names the input port that receives word k, or is masked
// off. The mapping FSM handles one entry per cycle, word 0 first, so a vector
// takes VEC_LEN cycles; a masked entry still takes its cycle, and the FSM waits
// while the target FIFO is full. A new request is accepted (req_ready_o) when
// the FSM is idle, or, for a vector, when it is finishing its last entry, so
// vectors can follow each other every VEC_LEN cycles. This follows the document's vector-port mechanism;
// the port counts, FIFO depth and handshake are this design's choices.
//
// Fast configuration switching: fcs_i asks the interface to put a RESET token
// into every input port, then a SET token; fcs_ready_o is high when it is idle
// and able to do so. A port hands its SET to the fabric only while the switch
// it feeds reports free (sw_free_i). Words sent after fcs_i belong to the new
// configuration.
module dyser_in_if
  import dyser_pkg::*;
#(
  parameter int NUM_IN   = 18,
  parameter int NUM_VP   = 8,
  parameter int VEC_LEN  = 4,
  parameter int NUM_CFG  = 4,
  parameter int DEPTH    = 4,
  parameter int LINK_DEPTH = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // requests from the host
  input  logic                        req_valid_i,
  output logic                        req_ready_o,
  input  logic                        req_vec_i,
  input  logic [5:0]                  req_port_i,
  input  logic [VEC_LEN-1:0][DATA_W-1:0] req_data_i,
  // fast configuration switch
  input  logic                        fcs_i,
  output logic                        fcs_ready_o,
  // vector maps
  input  logic                        vmap_we_i,
  input  logic [$clog2(NUM_CFG)-1:0]  vmap_slot_i,
  input  logic [$clog2(NUM_VP)-1:0]   vmap_vp_i,
  input  vmap_ent_t [VEC_LEN-1:0]     vmap_i,
  input  logic [$clog2(NUM_CFG)-1:0]  slot_i,
  // links into the fabric
  output link_t [NUM_IN-1:0]          out_o,
  input  logic  [NUM_IN-1:0]          out_credit_i,
  input  logic  [NUM_IN-1:0]          sw_free_i,
  // statistics
  output logic                        stall_o    // FSM waiting on a full port
);
  localparam int CW  = $clog2(LINK_DEPTH + 1);
  localparam int AW  = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int EW  = (VEC_LEN > 1) ? $clog2(VEC_LEN) : 1;
  localparam int VPW = $clog2(NUM_VP);

  // ------------------------------------------------------------ port FIFOs
  link_t         fifo [NUM_IN][DEPTH];
  logic [AW-1:0] rd [NUM_IN];
  logic [AW-1:0] wr [NUM_IN];
  logic [AW:0]   cnt [NUM_IN];
  logic [CW-1:0] credits [NUM_IN];
  logic [NUM_IN-1:0] push, pop, full;
  link_t         push_tok [NUM_IN];

  vmap_ent_t [VEC_LEN-1:0] vmap [NUM_CFG][NUM_VP];

  // ------------------------------------------------------------ FSM state
  typedef enum logic [1:0] {S_IDLE, S_VEC, S_RST, S_SET} state_e;
  state_e                         state;
  logic [EW-1:0]                  idx;
  logic [VPW-1:0]                 vp;
  logic [VEC_LEN-1:0][DATA_W-1:0] vbuf;

  vmap_ent_t ent;
  logic      advance, last;

  always_comb begin
    for (int p = 0; p < NUM_IN; p++) full[p] = (cnt[p] == (AW+1)'(DEPTH));
    ent     = vmap[slot_i][vp][idx];
    advance = (state == S_VEC) && (!ent.en || !full[ent.port]);
    last    = (idx == EW'(VEC_LEN - 1));
    stall_o = (state == S_VEC) && !advance;

    req_ready_o = (state == S_IDLE && !fcs_i && (req_vec_i || !full[req_port_i])) ||
                  (advance && last && req_vec_i);
    fcs_ready_o = (state == S_IDLE);

    push = '0;
    for (int p = 0; p < NUM_IN; p++) push_tok[p] = '0;
    if (advance && ent.en) begin
      push[ent.port]     = 1'b1;
      push_tok[ent.port] = '{valid: 1'b1, kind: TK_DATA, data: vbuf[idx]};
    end
    if (req_valid_i && req_ready_o && !req_vec_i) begin
      push[req_port_i]     = 1'b1;
      push_tok[req_port_i] = '{valid: 1'b1, kind: TK_DATA, data: req_data_i[0]};
    end
    if ((state == S_RST || state == S_SET) && full == '0) begin
      for (int p = 0; p < NUM_IN; p++) begin
        push[p]     = 1'b1;
        push_tok[p] = '{valid: 1'b1, kind: (state == S_RST) ? TK_RESET : TK_SET,
                        data: '0};
      end
    end

    for (int p = 0; p < NUM_IN; p++) begin
      link_t h;
      h = fifo[p][rd[p]];
      pop[p] = (cnt[p] != 0) && credits[p] != 0 &&
               (h.kind != TK_SET || sw_free_i[p]);
      out_o[p] = h;
      out_o[p].valid = pop[p];
    end
  end

  always_ff @(posedge clk) begin
    if (vmap_we_i) vmap[vmap_slot_i][vmap_vp_i] <= vmap_i;
    for (int p = 0; p < NUM_IN; p++)
      if (push[p]) fifo[p][wr[p]] <= push_tok[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      vp    <= '0;
      vbuf  <= '0;
      for (int p = 0; p < NUM_IN; p++) begin
        rd[p]      <= '0;
        wr[p]      <= '0;
        cnt[p]     <= '0;
        credits[p] <= CW'(LINK_DEPTH);
      end
    end else begin
      for (int p = 0; p < NUM_IN; p++) begin
        if (push[p]) wr[p] <= (wr[p] == AW'(DEPTH - 1)) ? '0 : wr[p] + 1'b1;
        if (pop[p])  rd[p] <= (rd[p] == AW'(DEPTH - 1)) ? '0 : rd[p] + 1'b1;
        cnt[p]     <= cnt[p] + (AW+1)'(push[p]) - (AW+1)'(pop[p]);
        credits[p] <= credits[p] - CW'(pop[p]) + CW'(out_credit_i[p]);
      end
      case (state)
        S_IDLE: begin
          if (fcs_i) state <= S_RST;
          else if (req_valid_i && req_ready_o && req_vec_i) begin
            state <= S_VEC;
            idx   <= '0;
            vp    <= VPW'(req_port_i);
            vbuf  <= req_data_i;
          end
        end
        S_VEC: begin
          if (advance) begin
            if (last) begin
              if (req_valid_i && req_ready_o && req_vec_i) begin
                idx  <= '0;
                vp   <= VPW'(req_port_i);
                vbuf <= req_data_i;
              end else begin
                state <= S_IDLE;
              end
            end else begin
              idx <= idx + 1'b1;
            end
          end
        end
        S_RST: if (full == '0) state <= S_SET;
        S_SET: if (full == '0) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Requests must name an existing port; fcs is only issued when it can be taken.
  a_port_range: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid_i |-> (req_vec_i ? int'(req_port_i) < NUM_VP : int'(req_port_i) < NUM_IN));
  a_fcs_idle: assert property (@(posedge clk) disable iff (!rst_n)
    fcs_i |-> fcs_ready_o);

endmodule
