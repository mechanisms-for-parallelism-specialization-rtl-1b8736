// tb_dyser_switch: drives the five inputs of one switch as credit-respecting
// senders and models the eight receivers, which take tokens into a buffer of
// DEPTH entries and return credits at random times (back-pressure).
//   Phase A (slot 0: E<-W, S<-W fan-out, SE<-N, NE<-FU): random data on W, N
//   and FU must arrive in order, unchanged, on exactly the configured outputs.
//   Phase B (switch to slot 1: E<-N, S<-FU): RESET tokens on W, N, FU and S
//   must leave on E, S, SE and NE (the one on S, unused, is dropped), after
//   which the switch reports free; a SET on N must wait while the east
//   neighbour is not free and then leave on E; a SET on FU leaves on S; new
//   data then follows the slot 1 routes. One hop must take one cycle.
module tb_dyser_switch;
  import dyser_pkg::*;
  localparam int DEPTH = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t [SW_NIN-1:0]  in;
  logic  [SW_NIN-1:0]  in_credit;
  link_t [SW_NOUT-1:0] out;
  logic  [SW_NOUT-1:0] out_credit, nbr_free;
  logic free;
  logic cfg_we, act; logic [1:0] cfg_slot, act_slot, tgt_slot;
  sw_cfg_t cfg;

  dyser_switch #(.NUM_CFG(4), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .in_i(in), .in_credit_o(in_credit), .out_o(out), .out_credit_i(out_credit),
    .nbr_free_i(nbr_free), .free_o(free), .cfg_we_i(cfg_we), .cfg_slot_i(cfg_slot), .cfg_i(cfg),
    .act_i(act), .act_slot_i(act_slot), .tgt_slot_i(tgt_slot));

  int checks = 0, failures = 0;
  int scred [SW_NIN];
  logic [33:0] sendq [SW_NIN][$];     // {kind, data} waiting to be sent
  logic [33:0] expq  [SW_NOUT][$];    // expected at each output
  int          rxocc [SW_NOUT];
  int          rel_prob = 50;         // percent chance per cycle that a receiver frees an entry

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receivers and sender credit counters sample what is transferred at the
  // clock edge; senders and credit returns are driven after the falling edge
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < SW_NOUT; o++) begin
      if (out[o].valid) begin
        logic [33:0] e;
        checks++;
        if (expq[o].size() == 0) begin
          failures++; $display("FAIL unexpected token on output %0d: %h", o, {out[o].kind, out[o].data});
        end else begin
          e = expq[o].pop_front();
          if ({out[o].kind, out[o].data} != e) begin
            failures++; $display("FAIL output %0d got %h exp %h", o, {out[o].kind, out[o].data}, e);
          end
        end
        rxocc[o]++;
        if (rxocc[o] > DEPTH) begin failures++; $display("FAIL receiver %0d overflow", o); end
      end
    end
    for (int i = 0; i < SW_NIN; i++) if (in_credit[i]) scred[i]++;
  end

  always @(negedge clk) if (rst_n) begin
    #1;
    for (int o = 0; o < SW_NOUT; o++) begin
      out_credit[o] = 0;
      if (rxocc[o] > 0 && int'($urandom % 100) < rel_prob) begin
        out_credit[o] = 1; rxocc[o]--;
      end
    end
    for (int i = 0; i < SW_NIN; i++) begin
      in[i] = '0;
      if (sendq[i].size() > 0 && scred[i] > 0 && ($urandom % 4 != 0)) begin
        logic [33:0] t;
        t = sendq[i].pop_front();
        in[i] = '{valid: 1'b1, kind: tok_kind_e'(t[33:32]), data: t[31:0]};
        scred[i]--;
      end
    end
  end

  function automatic sw_out_cfg_t rt(int sel);
    return '{en: 1'b1, sel: 3'(sel)};
  endfunction

  task automatic idle_until_empty(int max_cyc);
    int n = 0;
    while (n < max_cyc) begin
      int busy = 0;
      for (int i = 0; i < SW_NIN; i++) busy += sendq[i].size();
      for (int o = 0; o < SW_NOUT; o++) busy += expq[o].size();
      if (busy == 0) break;
      @(negedge clk);
      n++;
    end
    checks++;
    if (n == max_cyc) begin
      failures++;
      $display("FAIL tokens stuck");
      for (int i = 0; i < SW_NIN; i++) $display("  input %0d: %0d to send, %0d credits", i, sendq[i].size(), scred[i]);
      for (int o = 0; o < SW_NOUT; o++) $display("  output %0d: %0d expected", o, expq[o].size());
    end
  endtask

  initial begin
    logic [31:0] d;
    int t0;
    in = '0; out_credit = '0; nbr_free = '1; cfg_we = 0; act = 0; cfg_slot = 0; act_slot = 0;
    tgt_slot = 0; cfg = '0;
    for (int i = 0; i < SW_NIN; i++) scred[i] = DEPTH;
    for (int o = 0; o < SW_NOUT; o++) rxocc[o] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // slot 0 and slot 1 configurations
    @(negedge clk);
    cfg = '0; cfg[SO_E] = rt(SI_W); cfg[SO_S] = rt(SI_W); cfg[SO_SE] = rt(SI_N); cfg[SO_NE] = rt(SI_FU);
    cfg_we = 1; cfg_slot = 0;
    @(negedge clk);
    cfg = '0; cfg[SO_E] = rt(SI_N); cfg[SO_S] = rt(SI_FU);
    cfg_slot = 1;
    @(negedge clk);
    cfg_we = 0; act = 1; act_slot = 0; tgt_slot = 0;
    @(negedge clk);
    act = 0;

    // one-cycle hop: a token sent on W appears on E in the same cycle it is at the head
    rel_prob = 100;
    @(negedge clk);
    #2;
    in[SI_W] = '{valid: 1'b1, kind: TK_DATA, data: 32'hCAFE};
    scred[SI_W]--;
    expq[SO_E].push_back({TK_DATA, 32'hCAFE});
    expq[SO_S].push_back({TK_DATA, 32'hCAFE});
    @(posedge clk); #1;
    in[SI_W] = '0;
    t0 = 0;
    while (!out[SO_E].valid && t0 < 10) begin @(posedge clk); #1; t0++; end
    checks++;
    if (t0 != 0) begin failures++; $display("FAIL hop latency %0d extra cycles", t0); end
    @(negedge clk);

    // phase A
    rel_prob = 35;
    for (int k = 0; k < 60; k++) begin
      d = $urandom; sendq[SI_W].push_back({TK_DATA, d});
      expq[SO_E].push_back({TK_DATA, d}); expq[SO_S].push_back({TK_DATA, d});
      d = $urandom; sendq[SI_N].push_back({TK_DATA, d}); expq[SO_SE].push_back({TK_DATA, d});
      d = $urandom; sendq[SI_FU].push_back({TK_DATA, d}); expq[SO_NE].push_back({TK_DATA, d});
    end
    idle_until_empty(2000);

    // phase B: switch to slot 1
    #2;
    tgt_slot = 1;
    nbr_free[SO_E] = 0;
    @(negedge clk);
    checks++;
    if (free) begin failures++; $display("FAIL free while old configuration active"); end
    sendq[SI_W].push_back({TK_RESET, 32'd0}); expq[SO_E].push_back({TK_RESET, 32'd0});
    expq[SO_S].push_back({TK_RESET, 32'd0});
    sendq[SI_N].push_back({TK_RESET, 32'd0}); expq[SO_SE].push_back({TK_RESET, 32'd0});
    sendq[SI_FU].push_back({TK_RESET, 32'd0}); expq[SO_NE].push_back({TK_RESET, 32'd0});
    sendq[SI_S].push_back({TK_RESET, 32'd0});   // unused input: dropped
    idle_until_empty(200);
    repeat (3) @(negedge clk);
    checks++;
    if (!free) begin failures++; $display("FAIL not free after reset"); end
    sendq[SI_N].push_back({TK_SET, 32'd0});
    repeat (20) @(negedge clk);
    checks++;
    if (expq[SO_E].size() != 0 || dut.active[SO_E]) begin
      failures++; $display("FAIL set passed a neighbour that is not free");
    end
    #2;   // change stimulus after the receiver model has sampled this cycle
    expq[SO_E].push_back({TK_SET, 32'd0});
    nbr_free[SO_E] = 1;
    sendq[SI_FU].push_back({TK_SET, 32'd0}); expq[SO_S].push_back({TK_SET, 32'd0});
    for (int k = 0; k < 30; k++) begin
      d = $urandom; sendq[SI_N].push_back({TK_DATA, d}); expq[SO_E].push_back({TK_DATA, d});
      d = $urandom; sendq[SI_FU].push_back({TK_DATA, d}); expq[SO_S].push_back({TK_DATA, d});
    end
    idle_until_empty(2000);
    checks++;
    if (dut.active != ((1 << SO_E) | (1 << SO_S))) begin
      failures++; $display("FAIL active outputs %b after switch", dut.active);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
