// tb_dyser_fu: tests functional-unit tiles of three kinds side by side:
// INT-ADD (unit 0), INT-MUL (unit 1) and the unified divide/square root
// (unit 2). Each takes operand A from its north-west switch and operand B from
// its south-east switch in configuration slot 0. The test checks
//   - results against values computed here, in order, under random credit
//     back-pressure from the receiving switch;
//   - the latency of Table 2 (1, 5 and 12 cycles from operands at the head of
//     the input buffers to the result on the output link);
//   - that the divide unit, which is not pipelined, accepts one operation per
//     12 cycles;
//   - on the INT-ADD tile, the reset/set switch to slot 1 (subtract, operands
//     from the north-east and south-west switches): RESET tokens on the old
//     operand inputs produce one RESET and turn the tile off; SET tokens on the
//     new inputs wait while the downstream switch is not free, then produce one
//     SET; new data then follows the new configuration.
module tb_dyser_fu;
  import dyser_pkg::*;
  import fp_ref_pkg::*;
  localparam int NU = 3;
  localparam int DEPTH = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t [3:0] in [NU];
  logic  [3:0] in_credit [NU];
  link_t       out [NU];
  logic        out_credit [NU], out_free [NU], free [NU];
  logic        cfg_we [NU];
  fu_cfg_t     cfg;
  logic [1:0]  cfg_slot, tgt_slot;
  logic        act;

  dyser_fu #(.KIND(FK_IADD), .DEPTH(DEPTH)) u0 (.clk, .rst_n, .in_i(in[0]), .in_credit_o(in_credit[0]),
    .out_o(out[0]), .out_credit_i(out_credit[0]), .out_free_i(out_free[0]), .free_o(free[0]),
    .cfg_we_i(cfg_we[0]), .cfg_slot_i(cfg_slot), .cfg_i(cfg), .act_i(act), .act_slot_i(2'd0), .tgt_slot_i(tgt_slot));
  dyser_fu #(.KIND(FK_IMUL), .DEPTH(DEPTH)) u1 (.clk, .rst_n, .in_i(in[1]), .in_credit_o(in_credit[1]),
    .out_o(out[1]), .out_credit_i(out_credit[1]), .out_free_i(out_free[1]), .free_o(free[1]),
    .cfg_we_i(cfg_we[1]), .cfg_slot_i(cfg_slot), .cfg_i(cfg), .act_i(act), .act_slot_i(2'd0), .tgt_slot_i(tgt_slot));
  dyser_fu #(.KIND(FK_FDIVSQRT), .DEPTH(DEPTH)) u2 (.clk, .rst_n, .in_i(in[2]), .in_credit_o(in_credit[2]),
    .out_o(out[2]), .out_credit_i(out_credit[2]), .out_free_i(out_free[2]), .free_o(free[2]),
    .cfg_we_i(cfg_we[2]), .cfg_slot_i(cfg_slot), .cfg_i(cfg), .act_i(act), .act_slot_i(2'd0), .tgt_slot_i(tgt_slot));

  int checks = 0, failures = 0;
  int scred [NU][4];
  logic [33:0] sendq [NU][4][$];
  logic [33:0] expq  [NU][$];
  int rxocc [NU];
  int rel_prob = 100;
  int first_out [NU];
  int cycle = 0;

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cycle++;
    for (int u = 0; u < NU; u++) begin
      if (out[u].valid) begin
        logic [33:0] e;
        checks++;
        if (first_out[u] < 0) first_out[u] = cycle;
        if (expq[u].size() == 0) begin
          failures++; $display("FAIL unit %0d unexpected %h", u, {out[u].kind, out[u].data});
        end else begin
          e = expq[u].pop_front();
          if (u == 2 && e[33:32] == TK_DATA) begin
            if (!near(out[u].data, f2r(e[31:0]) , ULP_REL) && out[u].data != e[31:0]) begin
              failures++; $display("FAIL unit 2 got %h exp %h", out[u].data, e[31:0]);
            end
          end else if ({out[u].kind, out[u].data} != e) begin
            failures++; $display("FAIL unit %0d got %h exp %h", u, {out[u].kind, out[u].data}, e);
          end
        end
        rxocc[u]++;
        if (rxocc[u] > DEPTH) begin failures++; $display("FAIL unit %0d overflowed the receiver", u); end
      end
      for (int i = 0; i < 4; i++) if (in_credit[u][i]) scred[u][i]++;
    end
  end

  always @(negedge clk) if (rst_n) begin
    #1;
    for (int u = 0; u < NU; u++) begin
      out_credit[u] = 0;
      if (rxocc[u] > 0 && int'($urandom % 100) < rel_prob) begin out_credit[u] = 1; rxocc[u]--; end
      for (int i = 0; i < 4; i++) begin
        in[u][i] = '0;
        if (sendq[u][i].size() > 0 && scred[u][i] > 0) begin
          logic [33:0] t;
          t = sendq[u][i].pop_front();
          in[u][i] = '{valid: 1'b1, kind: tok_kind_e'(t[33:32]), data: t[31:0]};
          scred[u][i]--;
        end
      end
    end
  end

  task automatic wait_empty(int max_cyc);
    int n = 0;
    while (n < max_cyc) begin
      int busy = 0;
      for (int u = 0; u < NU; u++) begin
        busy += expq[u].size();
        for (int i = 0; i < 4; i++) busy += sendq[u][i].size();
      end
      if (busy == 0) break;
      @(negedge clk);
      n++;
    end
    checks++;
    if (n == max_cyc) begin failures++; $display("FAIL tokens stuck"); end
  endtask

  task automatic put(int u, int port, tok_kind_e k, logic [31:0] d);
    sendq[u][port].push_back({k, d});
  endtask

  initial begin
    int t_in, t_div0;
    for (int u = 0; u < NU; u++) begin
      in[u] = '0; out_credit[u] = 0; out_free[u] = 1; cfg_we[u] = 0; rxocc[u] = 0; first_out[u] = -1;
      for (int i = 0; i < 4; i++) scred[u][i] = DEPTH;
    end
    cfg = '0; cfg_slot = 0; tgt_slot = 0; act = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // configuration
    @(negedge clk);
    cfg = '{en: 1'b1, op: OP_IADD, src_a: 2'(FS_NW), src_b: 2'(FS_SE)}; cfg_we[0] = 1;
    @(negedge clk);
    cfg_we[0] = 0; cfg = '{en: 1'b1, op: OP_IMUL, src_a: 2'(FS_NW), src_b: 2'(FS_SE)}; cfg_we[1] = 1;
    @(negedge clk);
    cfg_we[1] = 0; cfg = '{en: 1'b1, op: OP_FDIV, src_a: 2'(FS_NW), src_b: 2'(FS_SE)}; cfg_we[2] = 1;
    @(negedge clk);
    cfg_we[2] = 0; cfg = '{en: 1'b1, op: OP_ISUB, src_a: 2'(FS_NE), src_b: 2'(FS_SW)}; cfg_we[0] = 1; cfg_slot = 1;
    @(negedge clk);
    cfg_we[0] = 0; act = 1;
    @(negedge clk);
    act = 0;

    // latency: one operation per unit, receivers always ready
    t_in = cycle;
    put(0, FS_NW, TK_DATA, 32'd7);  put(0, FS_SE, TK_DATA, 32'd5);  expq[0].push_back({TK_DATA, 32'd12});
    put(1, FS_NW, TK_DATA, 32'd7);  put(1, FS_SE, TK_DATA, 32'd5);  expq[1].push_back({TK_DATA, 32'd35});
    put(2, FS_NW, TK_DATA, 32'h40c00000); put(2, FS_SE, TK_DATA, 32'h40000000); expq[2].push_back({TK_DATA, 32'h40400000});
    wait_empty(100);
    // operands are driven in cycle t_in+1, reach the buffer heads in t_in+2
    begin
      int lat [NU] = '{1, 5, 12};
      for (int u = 0; u < NU; u++) begin
        checks++;
        if (first_out[u] - (t_in + 2) != lat[u]) begin
          failures++; $display("FAIL unit %0d latency %0d, expected %0d", u, first_out[u] - (t_in + 2), lat[u]);
        end
      end
    end

    // random operations under back-pressure
    rel_prob = 40;
    for (int k = 0; k < 40; k++) begin
      logic [31:0] a, b;
      a = $urandom; b = $urandom;
      put(0, FS_NW, TK_DATA, a); put(0, FS_SE, TK_DATA, b); expq[0].push_back({TK_DATA, a + b});
      put(1, FS_NW, TK_DATA, a); put(1, FS_SE, TK_DATA, b); expq[1].push_back({TK_DATA, a * b});
    end
    for (int k = 0; k < 8; k++) begin
      logic [31:0] a, b;
      real q;
      a = {1'b0, 8'(110 + $urandom % 30), 23'($urandom)};
      b = {1'b0, 8'(110 + $urandom % 30), 23'($urandom)};
      q = f2r(a) / f2r(b);
      put(2, FS_NW, TK_DATA, a); put(2, FS_SE, TK_DATA, b);
      // expected quotient kept as bits of the reference value
      expq[2].push_back({TK_DATA, 32'(0)});
      expq[2][expq[2].size()-1][31:0] = r2f(q);
    end
    wait_empty(3000);

    // divide throughput: four back-to-back divisions need 4 x 12 cycles
    rel_prob = 100;
    first_out[2] = -1;
    t_div0 = cycle;
    for (int k = 0; k < 4; k++) begin
      put(2, FS_NW, TK_DATA, 32'h40c00000); put(2, FS_SE, TK_DATA, 32'h40000000);
      expq[2].push_back({TK_DATA, 32'h40400000});
    end
    wait_empty(200);
    checks++;
    if (cycle - t_div0 < 48) begin failures++; $display("FAIL divide unit pipelined: %0d cycles", cycle - t_div0); end

    // reset/set switch of unit 0 to slot 1
    #2;
    tgt_slot = 1;
    out_free[0] = 0;
    #1;
    checks++;
    if (free[0]) begin failures++; $display("FAIL free while active in the old slot"); end
    put(0, FS_NW, TK_RESET, 0); put(0, FS_SE, TK_RESET, 0); expq[0].push_back({TK_RESET, 32'd0});
    wait_empty(50);
    checks++;
    if (!free[0] || u0.active) begin failures++; $display("FAIL not off and free after reset"); end
    put(0, FS_NE, TK_SET, 0); put(0, FS_SW, TK_SET, 0);
    repeat (10) @(negedge clk);
    checks++;
    if (u0.active) begin failures++; $display("FAIL set taken while downstream not free"); end
    #2;
    expq[0].push_back({TK_SET, 32'd0});
    out_free[0] = 1;
    for (int k = 0; k < 20; k++) begin
      logic [31:0] a, b;
      a = $urandom; b = $urandom;
      put(0, FS_NE, TK_DATA, a); put(0, FS_SW, TK_DATA, b); expq[0].push_back({TK_DATA, a - b});
    end
    wait_empty(500);
    checks++;
    if (!u0.active || u0.slot != 1) begin failures++; $display("FAIL not active in slot 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
