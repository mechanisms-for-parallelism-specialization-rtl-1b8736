// tb_dyser_in_if: tests the input interface at a reduced size (6 input ports,
// 2 vector ports of 4 words, port FIFOs of 2). The fabric side is modelled
// here: each port has a receive buffer of LINK_DEPTH entries that hands
// credits back at random. The test checks
//   - scalar sends arrive, in order, at the named port;
//   - a vector is spread by its vector map: vector port 0 maps words to ports
//     [2, masked, 0, 3], vector port 1 sends all four words to port 1;
//   - the mapping FSM takes one cycle per map entry, so back-to-back vectors
//     are accepted every VEC_LEN cycles when nothing is full;
//   - the FSM stalls (stall_o) while the port it needs is full;
//   - a configuration switch puts one RESET and then one SET into every port,
//     and a port holds its SET while the switch it feeds is not free.
module tb_dyser_in_if;
  import dyser_pkg::*;
  localparam int NI = 6, NVP = 2, VL = 4, NCFG = 4, DEPTH = 2, LD = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                      req_valid, req_ready, req_vec, fcs, fcs_ready, vmap_we, stall;
  logic [5:0]                req_port;
  logic [VL-1:0][DATA_W-1:0] req_data;
  logic [1:0]                vmap_slot, slot;
  logic [0:0]                vmap_vp;
  vmap_ent_t [VL-1:0]        vmap;
  link_t [NI-1:0]            out;
  logic  [NI-1:0]            out_credit, sw_free;

  dyser_in_if #(.NUM_IN(NI), .NUM_VP(NVP), .VEC_LEN(VL), .NUM_CFG(NCFG), .DEPTH(DEPTH),
                .LINK_DEPTH(LD)) dut (
    .clk, .rst_n, .req_valid_i(req_valid), .req_ready_o(req_ready), .req_vec_i(req_vec),
    .req_port_i(req_port), .req_data_i(req_data), .fcs_i(fcs), .fcs_ready_o(fcs_ready),
    .vmap_we_i(vmap_we), .vmap_slot_i(vmap_slot), .vmap_vp_i(vmap_vp), .vmap_i(vmap),
    .slot_i(slot), .out_o(out), .out_credit_i(out_credit), .sw_free_i(sw_free), .stall_o(stall));

  int checks = 0, failures = 0;
  logic [33:0] expq [NI][$];
  int rxocc [NI];
  int rel_prob = 100;
  int stalls = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (stall) stalls++;
    for (int p = 0; p < NI; p++) if (out[p].valid) begin
      logic [33:0] e;
      checks++;
      if (expq[p].size() == 0) begin
        failures++; $display("FAIL port %0d unexpected %h", p, {out[p].kind, out[p].data});
      end else begin
        e = expq[p].pop_front();
        if ({out[p].kind, out[p].data} != e) begin
          failures++; $display("FAIL port %0d got %h exp %h", p, {out[p].kind, out[p].data}, e);
        end
      end
      if (out[p].kind == TK_SET && !sw_free[p]) begin
        failures++; $display("FAIL port %0d SET while switch not free", p);
      end
      rxocc[p]++;
      if (rxocc[p] > LD) begin failures++; $display("FAIL port %0d overflowed its link", p); end
    end
  end

  always @(negedge clk) if (rst_n) begin
    #1;
    for (int p = 0; p < NI; p++) begin
      out_credit[p] = 0;
      if (rxocc[p] > 0 && int'($urandom % 100) < rel_prob) begin out_credit[p] = 1; rxocc[p]--; end
    end
  end

  // one request; returns the number of cycles it waited for req_ready
  task automatic send(logic vec, int port, logic [VL-1:0][DATA_W-1:0] d, output int waited);
    @(negedge clk); #2;
    req_valid = 1; req_vec = vec; req_port = 6'(port); req_data = d;
    waited = 0;
    #1;
    while (!req_ready) begin @(negedge clk); #3; waited++; end
    @(negedge clk); #2;
    req_valid = 0;
  endtask

  task automatic wait_empty(int max_cyc);
    int n = 0, busy = 1;
    while (n < max_cyc && busy != 0) begin
      busy = 0;
      for (int p = 0; p < NI; p++) busy += expq[p].size();
      @(negedge clk);
      n++;
    end
    checks++;
    if (n == max_cyc) begin failures++; $display("FAIL tokens stuck"); end
  endtask

  function automatic vmap_ent_t M(int p);
    return '{en: 1'b1, port: 6'(p)};
  endfunction

  initial begin
    int w, tstart, tend;
    vmap_ent_t X;
    logic [VL-1:0][DATA_W-1:0] d;
    X = '0;
    req_valid = 0; req_vec = 0; req_port = 0; req_data = '0; fcs = 0; vmap_we = 0;
    vmap_slot = 0; vmap_vp = 0; vmap = '0; slot = 0; out_credit = '0; sw_free = '1;
    for (int p = 0; p < NI; p++) rxocc[p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    vmap_we = 1; vmap_vp = 0; vmap = {M(3), M(0), X, M(2)};   // word 0 is the rightmost
    @(negedge clk);
    vmap_vp = 1; vmap = {M(1), M(1), M(1), M(1)};
    @(negedge clk);
    vmap_we = 0;

    // scalar sends to every port
    for (int k = 0; k < 24; k++) begin
      d = '0; d[0] = $urandom;
      expq[k % NI].push_back({TK_DATA, d[0]});
      send(0, k % NI, d, w);
    end
    wait_empty(200);

    // vectors through vector port 0, under back-pressure
    rel_prob = 50;
    for (int k = 0; k < 20; k++) begin
      for (int e = 0; e < VL; e++) d[e] = $urandom;
      expq[2].push_back({TK_DATA, d[0]});
      expq[0].push_back({TK_DATA, d[2]});
      expq[3].push_back({TK_DATA, d[3]});
      send(1, 0, d, w);
    end
    wait_empty(500);

    // back-to-back vectors through vector port 1 with the port drained at once:
    // one map entry per cycle, so 8 vectors take 8 x VEC_LEN cycles
    rel_prob = 100;
    @(negedge clk); #2;
    tstart = $time / 10;
    req_valid = 1; req_vec = 1; req_port = 1;
    for (int k = 0; k < 8; k++) begin
      for (int e = 0; e < VL; e++) begin d[e] = $urandom; expq[1].push_back({TK_DATA, d[e]}); end
      req_data = d;
      #1;
      while (!req_ready) begin @(negedge clk); #3; end
      @(negedge clk); #2;
    end
    req_valid = 0;
    wait_empty(200);
    tend = $time / 10;
    checks++;
    if (tend - tstart < 8 * VL || tend - tstart > 8 * VL + 8) begin
      failures++; $display("FAIL 8 vectors took %0d cycles", tend - tstart);
    end

    // stall: the fabric holds port 1's credits, the FSM must wait
    stalls = 0;
    rel_prob = 0;
    for (int k = 0; k < 2; k++) begin
      for (int e = 0; e < VL; e++) begin d[e] = $urandom; expq[1].push_back({TK_DATA, d[e]}); end
      send(1, 1, d, w);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall with a full port"); end
    rel_prob = 100;
    wait_empty(200);

    // configuration switch: RESET then SET on every port; port 4's switch not free
    #2;
    sw_free = 6'b101111;
    for (int p = 0; p < NI; p++) begin
      expq[p].push_back({TK_RESET, 32'd0});
      expq[p].push_back({TK_SET, 32'd0});
    end
    #1;
    checks++;
    if (!fcs_ready) begin failures++; $display("FAIL not ready for a switch"); end
    @(negedge clk); #2;
    fcs = 1;
    @(negedge clk); #2;
    fcs = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (expq[4].size() != 1) begin failures++; $display("FAIL port 4 SET went early (%0d left)", expq[4].size()); end
    #2;
    sw_free = '1;
    wait_empty(100);
    $display("in-interface stall cycles seen: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
