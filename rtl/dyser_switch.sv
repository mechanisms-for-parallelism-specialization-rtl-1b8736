// dyser_switch: one circuit switch of the DySER fabric.
//
// The switch has five inputs (tokens from the switches to its north, east,
// south and west, and the result of the FU to its north-west) and eight
// outputs (to the same four switches and to the four FUs around it). Its
// configuration register bank holds NUM_CFG configurations; in each, every
// output is either unused or driven by one input, so one input may fan out to
// several outputs. Each input ends in a link_fifo; each output keeps a credit
// counter for the buffer at the far end. A head token leaves only when every
// output that takes it holds a credit, and then goes to all of them in the same
// cycle. One hop costs one cycle (Table 2 gives the switch a latency of 1).
//
// Fast configuration switching (the document's reset/set protocol): each
// output is either active, in the configuration held in its own slot
// register, or off. A RESET token travels along the old configuration: it
// leaves through the outputs that take it and turns each of them off; a RESET
// that no active output takes is dropped. A SET token travels along the next
// configuration (slot tgt_slot_i): it may leave through an output only when that
// output is off and the neighbour it leads to reports free; the output then
// becomes active in the next configuration. A SET that no output of the next
// configuration takes is dropped. free_o is high when no output is still active
// in a configuration other than tgt_slot_i; it is this switch's 1-bit free
// signal to its eight neighbours. act_i puts every output into configuration
// act_slot_i at once (the ordinary, slow configuration path).
//
// Own choices: the port numbering, fan-out by all-or-nothing broadcast, and the
// per-output granularity of the on/off state. A data token with no active
// output to take it waits at its input.
module dyser_switch
  import dyser_pkg::*;
#(
  parameter int NUM_CFG = 4,
  parameter int DEPTH   = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // links
  input  link_t [SW_NIN-1:0]         in_i,
  output logic  [SW_NIN-1:0]         in_credit_o,
  output link_t [SW_NOUT-1:0]        out_o,
  input  logic  [SW_NOUT-1:0]        out_credit_i,
  input  logic  [SW_NOUT-1:0]        nbr_free_i,
  output logic                       free_o,
  // configuration
  input  logic                       cfg_we_i,
  input  logic [$clog2(NUM_CFG)-1:0] cfg_slot_i,
  input  sw_cfg_t                    cfg_i,
  input  logic                       act_i,
  input  logic [$clog2(NUM_CFG)-1:0] act_slot_i,
  input  logic [$clog2(NUM_CFG)-1:0] tgt_slot_i
);
  localparam int SW = $clog2(NUM_CFG);
  localparam int CW = $clog2(DEPTH + 1);

  sw_cfg_t      bank [NUM_CFG];
  logic [SW_NOUT-1:0] active;
  logic [SW-1:0] slot [SW_NOUT];
  logic [CW-1:0] credits [SW_NOUT];

  link_t [SW_NIN-1:0] head;
  logic  [SW_NIN-1:0] pop;

  for (genvar i = 0; i < SW_NIN; i++) begin : g_in
    link_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_i    (in_i[i]),
      .pop_i   (pop[i]),
      .head_o  (head[i]),
      .credit_o(in_credit_o[i])
    );
  end

  sw_out_cfg_t cur [SW_NOUT];
  sw_out_cfg_t nxt [SW_NOUT];
  logic [SW_NOUT-1:0] send, go_off, go_on;

  always_comb begin
    for (int o = 0; o < SW_NOUT; o++) begin
      cur[o] = bank[slot[o]][o];
      nxt[o] = bank[tgt_slot_i][o];
    end
    pop    = '0;
    send   = '0;
    go_off = '0;
    go_on  = '0;
    out_o  = '0;
    for (int i = 0; i < SW_NIN; i++) begin
      logic [SW_NOUT-1:0] takers;
      logic               ok;
      takers = '0;
      ok     = 1'b1;
      if (head[i].valid) begin
        if (head[i].kind == TK_SET) begin
          for (int o = 0; o < SW_NOUT; o++)
            if (nxt[o].en && nxt[o].sel == 3'(i)) begin
              takers[o] = 1'b1;
              if (active[o] || credits[o] == 0 || !nbr_free_i[o]) ok = 1'b0;
            end
        end else begin
          for (int o = 0; o < SW_NOUT; o++)
            if (active[o] && cur[o].en && cur[o].sel == 3'(i)) begin
              takers[o] = 1'b1;
              if (credits[o] == 0) ok = 1'b0;
            end
        end
        if (takers == 0) begin
          // control tokens with nowhere to go are dropped; data waits
          pop[i] = (head[i].kind != TK_DATA);
        end else if (ok) begin
          pop[i] = 1'b1;
          for (int o = 0; o < SW_NOUT; o++)
            if (takers[o]) begin
              send[o]  = 1'b1;
              out_o[o] = head[i];
              if (head[i].kind == TK_RESET) go_off[o] = 1'b1;
              if (head[i].kind == TK_SET)   go_on[o]  = 1'b1;
            end
        end
      end
    end
    free_o = 1'b1;
    for (int o = 0; o < SW_NOUT; o++)
      if (active[o] && slot[o] != tgt_slot_i) free_o = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (cfg_we_i) bank[cfg_slot_i] <= cfg_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= '0;
      for (int o = 0; o < SW_NOUT; o++) begin
        slot[o]    <= '0;
        credits[o] <= CW'(DEPTH);
      end
    end else begin
      for (int o = 0; o < SW_NOUT; o++) begin
        credits[o] <= credits[o] - CW'(send[o]) + CW'(out_credit_i[o]);
        if (act_i) begin
          active[o] <= bank[act_slot_i][o].en;
          slot[o]   <= act_slot_i;
        end else if (go_off[o]) begin
          active[o] <= 1'b0;
        end else if (go_on[o]) begin
          active[o] <= 1'b1;
          slot[o]   <= tgt_slot_i;
        end
      end
    end
  end

  // A credit can never come back that was not spent.
  for (genvar o = 0; o < SW_NOUT; o++) begin : g_chk
    a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
      credits[o] <= CW'(DEPTH));
  end

endmodule
