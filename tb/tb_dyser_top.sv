// tb_dyser_top: end-to-end test of the full-size DySER block (8x8 FUs, 81
// switches, default parameters).
//
// Two configurations are written tile by tile into slots 0 and 1:
//   slot 0, lane 1: r = (a + b) - c    on INT-ADD tiles (0,0) and (1,0)
//   slot 0, lane 2: s = sqrt(x * x)    on FP-MUL tile (0,3), whose two operands
//                   come from one switch input fanned out, and the unified
//                   divide/square-root tile (1,7)
//   slot 1, lane 1: r = (a - b) + c    on the same tiles and routes
// Lane 1 inputs arrive through vector port 0 (a, b, c to three input ports and
// a masked fourth word: intra-invocation communication); lane 2 inputs through
// vector port 1, all four words to one port (inter-invocation). Results are
// gathered four invocations at a time through output vector ports 0 and 1.
// The test then switches to slot 1 with the fast configuration switch while
// results of slot 0 are still in flight, runs more invocations, and finally
// runs one invocation with scalar sends and a scalar receive.
//
// Expected values are computed in the testbench: integer arithmetic for lane
// 1, and |x| within one unit in the last place for lane 2. The test counts how
// often each mechanism happened (masked vector element, vector send and
// receive FSM stalls from credit back-pressure, fan-out, the configuration
// switch with its reset/set tokens reaching the outputs, scalar send and
// receive) and counts a failure for any that never happened.
module tb_dyser_top;
  import dyser_pkg::*;
  import fp_ref_pkg::*;

  localparam int SR = 9, SC = 9, VL = 4;
  localparam int N_INV = 16;   // invocations per phase (multiple of 4)

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we; logic [3:0] cfg_row, cfg_col; logic [1:0] cfg_slot;
  sw_cfg_t cfg_sw; fu_cfg_t cfg_fu;
  logic vmap_we, vmap_out; logic [1:0] vmap_slot; logic [2:0] vmap_vp;
  vmap_ent_t [VL-1:0] vmap;
  logic act_valid; logic [1:0] act_slot;
  logic fcs_valid; logic [1:0] fcs_slot; logic fcs_ready; logic [1:0] cur_slot;
  logic send_valid, send_ready, send_vec; logic [5:0] send_port;
  logic [VL-1:0][31:0] send_data;
  logic recv_valid, recv_ready, recv_vec; logic [5:0] recv_port;
  logic resp_valid; logic [VL-1:0][31:0] resp_data;
  logic in_stall, out_stall; logic [15:0] ctl_count;

  dyser_top dut (
    .clk, .rst_n,
    .cfg_we_i(cfg_we), .cfg_row_i(cfg_row), .cfg_col_i(cfg_col), .cfg_slot_i(cfg_slot),
    .cfg_sw_i(cfg_sw), .cfg_fu_i(cfg_fu),
    .vmap_we_i(vmap_we), .vmap_out_i(vmap_out), .vmap_slot_i(vmap_slot), .vmap_vp_i(vmap_vp),
    .vmap_i(vmap),
    .act_valid_i(act_valid), .act_slot_i(act_slot),
    .fcs_valid_i(fcs_valid), .fcs_slot_i(fcs_slot), .fcs_ready_o(fcs_ready), .cur_slot_o(cur_slot),
    .send_valid_i(send_valid), .send_ready_o(send_ready), .send_vec_i(send_vec),
    .send_port_i(send_port), .send_data_i(send_data),
    .recv_valid_i(recv_valid), .recv_ready_o(recv_ready), .recv_vec_i(recv_vec),
    .recv_port_i(recv_port), .resp_valid_o(resp_valid), .resp_data_o(resp_data),
    .in_stall_o(in_stall), .out_stall_o(out_stall), .ctl_count_o(ctl_count)
  );

  int checks = 0, failures = 0;
  int n_in_stall = 0, n_out_stall = 0, n_fcs = 0, n_masked = 0, n_fanout = 0;
  int n_scalar = 0, n_vec_intra = 0, n_vec_inter = 0, n_divsqrt_busy = 0;

  sw_cfg_t swc [2][SR][SC];
  fu_cfg_t fuc [2][SR][SC];

  // input ports: c -> north of switch (0,c), SC+r -> west of switch (r,0)
  // output ports: c <- south of switch (8,c), SC+r <- east of switch (r,8)
  localparam int P_A = SC + 0, P_B = 1, P_C = SC + 1, P_X = 3;
  localparam int P_R = SC + 2, P_S = SC + 3;

  function automatic sw_out_cfg_t rt(int sel);
    return '{en: 1'b1, sel: 3'(sel)};
  endfunction

  task automatic build_cfgs();
    for (int s = 0; s < 2; s++)
      for (int r = 0; r < SR; r++)
        for (int c = 0; c < SC; c++) begin
          swc[s][r][c] = '0;
          fuc[s][r][c] = '0;
        end
    for (int s = 0; s < 2; s++) begin
      // lane 1
      swc[s][0][0][SO_SE] = rt(SI_W);     // a -> FU(0,0).NW
      swc[s][0][1][SO_SW] = rt(SI_N);     // b -> FU(0,0).NE
      fuc[s][0][0] = '{en: 1'b1, op: (s == 0) ? OP_IADD : OP_ISUB, src_a: 2'(FS_NW), src_b: 2'(FS_NE)};
      swc[s][1][1][SO_SW] = rt(SI_FU);    // t -> FU(1,0).NE
      swc[s][1][0][SO_SE] = rt(SI_W);     // c -> FU(1,0).NW
      fuc[s][1][0] = '{en: 1'b1, op: (s == 0) ? OP_ISUB : OP_IADD, src_a: 2'(FS_NE), src_b: 2'(FS_NW)};
      swc[s][2][1][SO_E] = rt(SI_FU);
      for (int c = 2; c < SC; c++) swc[s][2][c][SO_E] = rt(SI_W);   // to output port SC+2
    end
    // lane 2, slot 0 only
    swc[0][0][3][SO_SE] = rt(SI_N);       // x -> FU(0,3).NW
    swc[0][0][3][SO_S]  = rt(SI_N);       // fan-out: x -> switch (1,3)
    swc[0][1][3][SO_NE] = rt(SI_N);       // x -> FU(0,3).SW
    fuc[0][0][3] = '{en: 1'b1, op: OP_FMUL, src_a: 2'(FS_NW), src_b: 2'(FS_SW)};
    swc[0][1][4][SO_E] = rt(SI_FU);
    swc[0][1][5][SO_E] = rt(SI_W);
    swc[0][1][6][SO_E] = rt(SI_W);
    swc[0][1][7][SO_SE] = rt(SI_W);       // x*x -> FU(1,7).NW
    fuc[0][1][7] = '{en: 1'b1, op: OP_FSQRT, src_a: 2'(FS_NW), src_b: 2'(FS_NW)};
    swc[0][2][8][SO_S] = rt(SI_FU);
    swc[0][3][8][SO_E] = rt(SI_N);        // to output port SC+3
  endtask

  task automatic write_vmap(logic out, int slot, int vp, int p0, int p1, int p2, int p3);
    int p[VL] = '{p0, p1, p2, p3};
    @(negedge clk);
    vmap_we = 1; vmap_out = out; vmap_slot = 2'(slot); vmap_vp = 3'(vp);
    for (int k = 0; k < VL; k++) vmap[k] = (p[k] < 0) ? '0 : '{en: 1'b1, port: 6'(p[k])};
    @(negedge clk);
    vmap_we = 0;
  endtask

  task automatic load_config();
    int cyc = 0;
    for (int s = 0; s < 2; s++)
      for (int r = 0; r < SR; r++)
        for (int c = 0; c < SC; c++) begin
          @(negedge clk);
          cfg_we = 1; cfg_row = 4'(r); cfg_col = 4'(c); cfg_slot = 2'(s);
          cfg_sw = swc[s][r][c]; cfg_fu = fuc[s][r][c];
          cyc++;
        end
    @(negedge clk);
    cfg_we = 0;
    $display("configuration: %0d tile writes (%0d per slot)", cyc, cyc / 2);
    for (int s = 0; s < 2; s++) begin
      write_vmap(0, s, 0, P_A, P_B, P_C, -1);    // intra-invocation, word 3 masked
      write_vmap(0, s, 1, P_X, P_X, P_X, P_X);   // inter-invocation
      write_vmap(1, s, 0, P_R, P_R, P_R, P_R);
      write_vmap(1, s, 1, P_S, P_S, P_S, P_S);
    end
  endtask

  // --------------------------------------------------------- stimulus data
  logic [31:0] av [3*N_INV], bv [3*N_INV], cv [3*N_INV], xv [N_INV];
  logic [31:0] exp_r [$];

  task automatic send_vec_req(int vp, logic [VL-1:0][31:0] d);
    @(negedge clk);
    send_valid = 1; send_vec = 1; send_port = 6'(vp); send_data = d;
    @(posedge clk);
    while (!send_ready) @(posedge clk);
    @(negedge clk);
    send_valid = 0;
  endtask

  task automatic send_scalar(int port, logic [31:0] d);
    @(negedge clk);
    send_valid = 1; send_vec = 0; send_port = 6'(port); send_data = '0; send_data[0] = d;
    @(posedge clk);
    while (!send_ready) @(posedge clk);
    @(negedge clk);
    send_valid = 0;
    n_scalar++;
  endtask

  task automatic recv_req(logic vec, int port, output logic [VL-1:0][31:0] d);
    @(negedge clk);
    recv_valid = 1; recv_vec = vec; recv_port = 6'(port);
    @(posedge clk);
    while (!recv_ready) @(posedge clk);
    @(negedge clk);
    recv_valid = 0;
    while (!resp_valid) @(negedge clk);
    d = resp_data;
  endtask

  task automatic check_r(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // lane 1 phase: send n invocations starting at index base
  task automatic lane1_send(int base, int n, int slot);
    for (int i = base; i < base + n; i++) begin
      send_vec_req(0, {32'hDEAD_BEEF, cv[i], bv[i], av[i]});
      n_vec_intra++;
      n_masked++;
      exp_r.push_back(slot == 0 ? (av[i] + bv[i] - cv[i]) : (av[i] - bv[i] + cv[i]));
    end
  endtask

  task automatic lane1_recv(int n);
    logic [VL-1:0][31:0] d;
    for (int i = 0; i < n; i += VL) begin
      recv_req(1, 0, d);
      for (int k = 0; k < VL; k++) check_r(d[k], exp_r.pop_front(), "lane 1 result");
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && in_stall)  n_in_stall++;
    if (rst_n && out_stall) n_out_stall++;
    if (rst_n && dut.u_fabric.g_r[1].g_c[7].g_fu.u_fu.g_divsqrt.u_ds.busy &&
        dut.u_fabric.g_r[1].g_c[7].g_fu.u_fu.head[FS_NW].valid) n_divsqrt_busy++;
    if (rst_n && dut.u_fabric.g_r[0].g_c[3].u_sw.send[SO_SE] &&
        dut.u_fabric.g_r[0].g_c[3].u_sw.send[SO_S]) n_fanout++;
  end

  initial begin
    logic [VL-1:0][31:0] d;
    int t0;
    cfg_we = 0; cfg_row = 0; cfg_col = 0; cfg_slot = 0; cfg_sw = '0; cfg_fu = '0;
    vmap_we = 0; vmap_out = 0; vmap_slot = 0; vmap_vp = 0; vmap = '0;
    act_valid = 0; act_slot = 0; fcs_valid = 0; fcs_slot = 0;
    send_valid = 0; send_vec = 0; send_port = 0; send_data = '0;
    recv_valid = 0; recv_vec = 0; recv_port = 0;
    for (int i = 0; i < 3 * N_INV; i++) begin
      av[i] = $urandom; bv[i] = $urandom; cv[i] = $urandom;
    end
    for (int i = 0; i < N_INV; i++) xv[i] = {1'($urandom), 8'(100 + $urandom % 50), 23'($urandom)};
    build_cfgs();
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_config();
    @(negedge clk);
    act_valid = 1; act_slot = 0;
    @(negedge clk);
    act_valid = 0;
    checks++;
    if (cur_slot != 0) begin failures++; $display("FAIL slot after activate"); end

    // ---------------- phase 1: slot 0, both lanes, sends and receives overlap
    fork
      begin
        lane1_send(0, N_INV, 0);
        for (int i = 0; i < N_INV; i += VL) begin
          send_vec_req(1, {xv[i+3], xv[i+2], xv[i+1], xv[i]});
          n_vec_inter++;
        end
      end
      begin
        repeat (40) @(negedge clk);   // let the output side back up first
        lane1_recv(N_INV);
      end
    join
    for (int i = 0; i < N_INV; i += VL) begin
      recv_req(1, 1, d);
      for (int k = 0; k < VL; k++) begin
        real e;
        e = f2r(xv[i+k]);
        if (e < 0.0) e = -e;
        checks++;
        if (!near(d[k], e, 2.0 * ULP_REL)) begin
          failures++;
          $display("FAIL lane 2: sqrt(%h^2) got %h", xv[i+k], d[k]);
        end
      end
    end

    // ---------------- phase 2: fast switch to slot 1 with results in flight
    lane1_send(N_INV, VL, 0);
    @(negedge clk);
    while (!fcs_ready) @(negedge clk);
    fcs_valid = 1; fcs_slot = 1;
    @(negedge clk);
    fcs_valid = 0;
    t0 = $time / 10;
    checks++;
    if (cur_slot != 1) begin failures++; $display("FAIL slot after switch"); end
    lane1_send(N_INV + VL, N_INV, 1);
    lane1_recv(N_INV + VL);
    $display("switch plus %0d invocations took %0d cycles", N_INV, $time / 10 - t0);
    repeat (20) @(negedge clk);
    if (ctl_count != 0) n_fcs++;
    checks++;
    if (ctl_count == 0) begin failures++; $display("FAIL no reset/set token reached the outputs"); end

    // ---------------- phase 3: one invocation by scalar sends and receive
    send_scalar(P_A, av[2*N_INV+VL]);
    send_scalar(P_B, bv[2*N_INV+VL]);
    send_scalar(P_C, cv[2*N_INV+VL]);
    recv_req(0, P_R, d);
    check_r(d[0], av[2*N_INV+VL] - bv[2*N_INV+VL] + cv[2*N_INV+VL], "scalar invocation");

    $display("mechanisms: vec_intra=%0d vec_inter=%0d masked=%0d fanout=%0d in_stall=%0d out_stall=%0d divsqrt_busy=%0d fcs=%0d scalar=%0d ctl_tokens=%0d",
             n_vec_intra, n_vec_inter, n_masked, n_fanout, n_in_stall, n_out_stall,
             n_divsqrt_busy, n_fcs, n_scalar, ctl_count);
    if (n_vec_intra == 0) begin failures++; $display("FAIL no intra-invocation vector send"); end
    if (n_vec_inter == 0) begin failures++; $display("FAIL no inter-invocation vector send"); end
    if (n_masked == 0)    begin failures++; $display("FAIL no masked vector element"); end
    if (n_fanout == 0)    begin failures++; $display("FAIL no switch fan-out"); end
    if (n_in_stall == 0)  begin failures++; $display("FAIL no input-side back-pressure"); end
    if (n_out_stall == 0) begin failures++; $display("FAIL no output-side wait"); end
    if (n_divsqrt_busy == 0) begin failures++; $display("FAIL divide/sqrt never busy with work waiting"); end
    if (n_fcs == 0)       begin failures++; $display("FAIL no fast configuration switch"); end
    if (n_scalar == 0)    begin failures++; $display("FAIL no scalar send"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
