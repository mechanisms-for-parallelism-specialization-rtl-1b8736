// tb_dyser_out_if: tests the output interface at a reduced size (4 output
// ports, 2 vector ports of 4 words, port buffers of 2). The fabric side is
// modelled here as one sender per port that obeys the credits. The test checks
//   - a scalar request is accepted only when its port holds a word, and the
//     word comes back on resp_data_o[0] in the next cycle;
//   - a vector request gathers word k from the port named by entry k of the
//     vector map ([1, masked, 0, 1] for vector port 0), a masked word reads as
//     zero, and the answer comes the cycle after the last word was gathered;
//   - gathering takes one cycle per map entry and stalls while a port is empty;
//   - RESET and SET tokens arriving at a port are removed and counted.
module tb_dyser_out_if;
  import dyser_pkg::*;
  localparam int NO = 4, NVP = 2, VL = 4, NCFG = 4, DEPTH = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                      req_valid, req_ready, req_vec, resp_valid, vmap_we, stall;
  logic [5:0]                req_port;
  logic [VL-1:0][DATA_W-1:0] resp_data;
  logic [1:0]                vmap_slot, slot;
  logic [0:0]                vmap_vp;
  vmap_ent_t [VL-1:0]        vmap;
  link_t [NO-1:0]            in;
  logic  [NO-1:0]            in_credit;
  logic [15:0]               ctl_count;

  dyser_out_if #(.NUM_OUT(NO), .NUM_VP(NVP), .VEC_LEN(VL), .NUM_CFG(NCFG), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .req_valid_i(req_valid), .req_ready_o(req_ready), .req_vec_i(req_vec),
    .req_port_i(req_port), .resp_valid_o(resp_valid), .resp_data_o(resp_data),
    .vmap_we_i(vmap_we), .vmap_slot_i(vmap_slot), .vmap_vp_i(vmap_vp), .vmap_i(vmap),
    .slot_i(slot), .in_i(in), .in_credit_o(in_credit), .ctl_count_o(ctl_count), .stall_o(stall));

  int checks = 0, failures = 0;
  logic [33:0] sendq [NO][$];
  int scred [NO];
  int send_prob = 100;
  int stalls = 0;
  int resp_seen = 0;
  logic [VL-1:0][DATA_W-1:0] last_resp;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (stall) stalls++;
    if (resp_valid) begin resp_seen++; last_resp = resp_data; end
    for (int p = 0; p < NO; p++) if (in_credit[p]) scred[p]++;
  end

  always @(negedge clk) if (rst_n) begin
    #1;
    for (int p = 0; p < NO; p++) begin
      in[p] = '0;
      if (sendq[p].size() > 0 && scred[p] > 0 && int'($urandom % 100) < send_prob) begin
        logic [33:0] t;
        t = sendq[p].pop_front();
        in[p] = '{valid: 1'b1, kind: tok_kind_e'(t[33:32]), data: t[31:0]};
        scred[p]--;
      end
    end
  end

  // issue one request; wait for acceptance and for the response
  task automatic request(logic vec, int port, output logic [VL-1:0][DATA_W-1:0] r, output int cyc);
    int n0;
    @(negedge clk); #2;
    req_valid = 1; req_vec = vec; req_port = 6'(port);
    #1;
    while (!req_ready) begin @(negedge clk); #3; end
    n0 = resp_seen;
    @(negedge clk); #2;
    req_valid = 0;
    cyc = 0;
    while (resp_seen == n0 && cyc < 200) begin @(posedge clk); #1; cyc++; end
    r = last_resp;
  endtask

  function automatic vmap_ent_t M(int p);
    return '{en: 1'b1, port: 6'(p)};
  endfunction

  initial begin
    int cyc;
    logic [VL-1:0][DATA_W-1:0] r;
    logic [31:0] w [NO][$];
    vmap_ent_t X;
    X = '0;
    req_valid = 0; req_vec = 0; req_port = 0; vmap_we = 0; vmap_slot = 0; vmap_vp = 0;
    vmap = '0; slot = 0; in = '0;
    for (int p = 0; p < NO; p++) scred[p] = DEPTH;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    vmap_we = 1; vmap_vp = 0; vmap = {M(1), M(0), X, M(1)};   // word 0 is the rightmost
    @(negedge clk);
    vmap_we = 0;

    // scalar: not ready on an empty port; then one word per request
    #3;
    req_port = 2; req_vec = 0;
    #1;
    checks++;
    if (req_ready) begin failures++; $display("FAIL ready on an empty port"); end
    for (int k = 0; k < 16; k++) begin
      logic [31:0] v;
      v = $urandom;
      sendq[k % NO].push_back({TK_DATA, v});
      if (k % 5 == 0) sendq[k % NO].push_back({TK_RESET, 32'd0});
      w[k % NO].push_back(v);
    end
    for (int k = 0; k < 16; k++) begin
      logic [31:0] e;
      e = w[k % NO].pop_front();
      request(0, k % NO, r, cyc);
      checks++;
      if (r[0] != e || cyc != 1) begin
        failures++; $display("FAIL scalar port %0d got %h after %0d, exp %h", k % NO, r[0], cyc, e);
      end
    end

    // vectors with slow senders: gather [1, masked, 0, 1]
    send_prob = 30;
    for (int k = 0; k < 12; k++) begin
      logic [31:0] a0, a1, b0;
      a0 = $urandom; a1 = $urandom; b0 = $urandom;
      sendq[1].push_back({TK_DATA, a0});
      sendq[0].push_back({TK_DATA, b0});
      if (k % 3 == 0) sendq[0].push_back({TK_SET, 32'd0});
      sendq[1].push_back({TK_DATA, a1});
      request(1, 0, r, cyc);
      checks++;
      if (r[0] != a0 || r[1] != 0 || r[2] != b0 || r[3] != a1) begin
        failures++; $display("FAIL vector got %h exp %h %h %h", r, a1, b0, a0);
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL never stalled on an empty port"); end

    // fast gather: all words present; VEC_LEN gather cycles, then the answer
    send_prob = 100;
    sendq[1].push_back({TK_DATA, 32'd11}); sendq[1].push_back({TK_DATA, 32'd13});
    sendq[0].push_back({TK_DATA, 32'd12});
    repeat (6) @(negedge clk);
    request(1, 0, r, cyc);
    checks++;
    if (cyc != VL + 1 || r != {32'd13, 32'd12, 32'd0, 32'd11}) begin
      failures++; $display("FAIL gather took %0d cycles, got %h", cyc, r);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (ctl_count != 16'd8) begin failures++; $display("FAIL control count %0d, expected 8", ctl_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
