// tb_dyser_fabric: tests the switch/FU grid at a reduced size (2 x 2 FUs,
// 3 x 3 switches, 6 input and 6 output ports). The host side of the ports is
// modelled here: senders obey the credits, and a sender hands a SET token to
// the fabric only while the edge switch reports free. Two lanes are configured:
//   - lane 1: input ports 0 and 1 (north edge of switches (0,0) and (0,1)) feed
//     operands A and B of FU(0,0), an INT-ADD tile; the result enters switch
//     (1,1) and runs south through switch (2,1) to output port 1;
//   - lane 2: input port 3 (west edge of switch (0,0)) runs east through
//     switches (0,0), (0,1) and (0,2) to output port 3, a 3-hop route that must
//     take 3 cycles (one per switch).
// Slot 1 holds the same routes with FU(0,0) subtracting. After data in slot 0,
// a reset/set switch moves the fabric to slot 1 while results are still
// arriving; each output must then see the old results, one RESET, one SET and
// the new results, in that order, under random back-pressure.
module tb_dyser_fabric;
  import dyser_pkg::*;
  localparam int FR = 2, FC = 2, SR = FR + 1, SC = FC + 1, NP = SR + SC, LD = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t [NP-1:0] in, out;
  logic  [NP-1:0] in_credit, in_free, out_credit;
  logic           cfg_we, act;
  logic [3:0]     cfg_row, cfg_col;
  logic [1:0]     cfg_slot, act_slot, tgt_slot;
  sw_cfg_t        cfg_sw;
  fu_cfg_t        cfg_fu;

  dyser_fabric #(.FU_ROWS(FR), .FU_COLS(FC), .LINK_DEPTH(LD)) dut (
    .clk, .rst_n, .in_i(in), .in_credit_o(in_credit), .in_free_o(in_free),
    .out_o(out), .out_credit_i(out_credit), .cfg_we_i(cfg_we), .cfg_row_i(cfg_row),
    .cfg_col_i(cfg_col), .cfg_slot_i(cfg_slot), .cfg_sw_i(cfg_sw), .cfg_fu_i(cfg_fu),
    .act_i(act), .act_slot_i(act_slot), .tgt_slot_i(tgt_slot));

  int checks = 0, failures = 0;
  logic [33:0] sendq [NP][$];
  logic [33:0] expq  [NP][$];
  int scred [NP], rxocc [NP];
  int rel_prob = 100;
  int cycle = 0, first_out3 = -1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cycle++;
    for (int p = 0; p < NP; p++) begin
      if (in_credit[p]) scred[p]++;
      if (out[p].valid) begin
        logic [33:0] e;
        checks++;
        if (p == 3 && first_out3 < 0) first_out3 = cycle;
        if (expq[p].size() == 0) begin
          failures++; $display("FAIL out %0d unexpected %h", p, {out[p].kind, out[p].data});
        end else begin
          e = expq[p].pop_front();
          if ({out[p].kind, out[p].data} != e) begin
            failures++; $display("FAIL out %0d got %h exp %h", p, {out[p].kind, out[p].data}, e);
          end
        end
        rxocc[p]++;
        if (rxocc[p] > LD) begin failures++; $display("FAIL out %0d overflowed", p); end
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    #1;
    for (int p = 0; p < NP; p++) begin
      out_credit[p] = 0;
      if (rxocc[p] > 0 && int'($urandom % 100) < rel_prob) begin out_credit[p] = 1; rxocc[p]--; end
      in[p] = '0;
      if (sendq[p].size() > 0 && scred[p] > 0 &&
          (sendq[p][0][33:32] != TK_SET || in_free[p])) begin
        logic [33:0] t;
        t = sendq[p].pop_front();
        in[p] = '{valid: 1'b1, kind: tok_kind_e'(t[33:32]), data: t[31:0]};
        scred[p]--;
      end
    end
  end

  task automatic wait_empty(int max_cyc);
    int n = 0, busy = 1;
    while (n < max_cyc && busy != 0) begin
      busy = 0;
      for (int p = 0; p < NP; p++) busy += expq[p].size() + sendq[p].size();
      @(negedge clk);
      n++;
    end
    checks++;
    if (n == max_cyc) begin failures++; $display("FAIL tokens stuck"); end
  endtask

  function automatic sw_out_cfg_t R(int sel);
    return '{en: 1'b1, sel: 3'(sel)};
  endfunction

  task automatic write_slot(int s, op_e op);
    sw_cfg_t swc [SR][SC];
    fu_cfg_t fuc [SR][SC];
    for (int r = 0; r < SR; r++) for (int c = 0; c < SC; c++) begin swc[r][c] = '0; fuc[r][c] = '0; end
    swc[0][0][SO_SE] = R(SI_N);     // operand A to FU(0,0)
    swc[0][1][SO_SW] = R(SI_N);     // operand B to FU(0,0)
    swc[1][1][SO_S]  = R(SI_FU);    // result south
    swc[2][1][SO_S]  = R(SI_N);     // to output port 1
    swc[0][0][SO_E]  = R(SI_W);     // lane 2
    swc[0][1][SO_E]  = R(SI_W);
    swc[0][2][SO_E]  = R(SI_W);     // to output port SC+0
    fuc[0][0] = '{en: 1'b1, op: op, src_a: 2'(FS_NW), src_b: 2'(FS_NE)};
    for (int r = 0; r < SR; r++) for (int c = 0; c < SC; c++) begin
      @(negedge clk);
      cfg_we = 1; cfg_slot = 2'(s); cfg_row = 4'(r); cfg_col = 4'(c);
      cfg_sw = swc[r][c]; cfg_fu = fuc[r][c];
    end
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    int t0;
    in = '0; out_credit = '0; cfg_we = 0; act = 0; cfg_row = 0; cfg_col = 0; cfg_slot = 0;
    act_slot = 0; tgt_slot = 0; cfg_sw = '0; cfg_fu = '0;
    for (int p = 0; p < NP; p++) begin scred[p] = LD; rxocc[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    write_slot(0, OP_IADD);
    write_slot(1, OP_ISUB);
    @(negedge clk);
    act = 1; act_slot = 0;
    @(negedge clk);
    act = 0;

    // hop latency of lane 2: token driven in cycle t0+1 appears 3 cycles later
    t0 = cycle;
    sendq[3].push_back({TK_DATA, 32'h1234});
    expq[SC].push_back({TK_DATA, 32'h1234});
    wait_empty(50);
    checks++;
    if (first_out3 - (t0 + 1) != 3) begin
      failures++; $display("FAIL 3-hop route took %0d cycles", first_out3 - (t0 + 1));
    end

    // slot 0 traffic under back-pressure, then the switch to slot 1
    rel_prob = 40;
    for (int k = 0; k < 30; k++) begin
      logic [31:0] a, b;
      a = $urandom; b = $urandom;
      sendq[0].push_back({TK_DATA, a}); sendq[1].push_back({TK_DATA, b});
      expq[1].push_back({TK_DATA, a + b});
      sendq[3].push_back({TK_DATA, a ^ b}); expq[SC].push_back({TK_DATA, a ^ b});
    end
    repeat (10) @(negedge clk);
    #2;
    tgt_slot = 1;
    for (int p = 0; p < NP; p++) begin
      sendq[p].push_back({TK_RESET, 32'd0});
      sendq[p].push_back({TK_SET, 32'd0});
    end
    expq[1].push_back({TK_RESET, 32'd0}); expq[1].push_back({TK_SET, 32'd0});
    expq[SC].push_back({TK_RESET, 32'd0}); expq[SC].push_back({TK_SET, 32'd0});
    for (int k = 0; k < 30; k++) begin
      logic [31:0] a, b;
      a = $urandom; b = $urandom;
      sendq[0].push_back({TK_DATA, a}); sendq[1].push_back({TK_DATA, b});
      expq[1].push_back({TK_DATA, a - b});
      sendq[3].push_back({TK_DATA, a}); expq[SC].push_back({TK_DATA, a});
    end
    wait_empty(2000);
    checks++;
    if (dut.g_r[0].g_c[0].g_fu.u_fu.slot != 1 || !dut.g_r[0].g_c[0].g_fu.u_fu.active) begin
      failures++; $display("FAIL FU(0,0) not active in slot 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
