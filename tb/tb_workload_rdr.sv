// tb_workload_rdr: one lane of a complex multiplier, the kernel behind
// complex-signal convolution, run on the full-size DySER block (default
// parameters). Each invocation computes
//     re = a*c - b*d,   im = a*d + b*c
// on six tiles of one configuration slot:
//     FP-MUL (0,3): a*c      operands from input ports 3 and 4 (north edge)
//     FP-MUL (1,1): b*d      operands from input ports 1 and 2
//     FP-MUL (1,5): a*d      operands from input ports 5 and 6
//     FP-MUL (2,3): b*c      operands from input ports 11 and 12 (west edge,
//                            rows 2 and 3), routed east along rows 2 and 3
//     FP-ADD (2,2): re = a*c - b*d, a*c routed from switch (1,4) via (2,4),(2,3)
//     FP-ADD (2,6): im = a*d + b*c, b*c routed from switch (3,4) via (3,5),(3,6)
// re leaves south through column 3 to output port 3; im leaves east along row 3
// to output port 12. The host sends two 4-word vectors per invocation:
// vector port 0 maps [a, c, b, d] to ports [3, 4, 1, 2], vector port 1 maps
// [a, d, b, c] to ports [5, 6, 11, 12]. Output vector port 0 gathers [re, im]
// from ports [3, 12] with words 2 and 3 masked (they read as zero).
// Results are checked against real arithmetic within a tolerance that covers
// the truncating FP units, and words 2 and 3 must be zero. The operation count
// (4 multiplies and 2 add/subtracts per complex product) is standard; the
// routing is this test's own.
module tb_workload_rdr;
  import dyser_pkg::*;
  import fp_ref_pkg::*;

  localparam int SR = 9, SC = 9, VL = 4;
  localparam int N_INV = 24;
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
  sw_cfg_t swc [SR][SC];
  fu_cfg_t fuc [SR][SC];
  logic [31:0] av [N_INV], bv [N_INV], cv [N_INV], dv [N_INV];

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sw_out_cfg_t rt(int sel);
    return '{en: 1'b1, sel: 3'(sel)};
  endfunction

  function automatic fu_cfg_t fu(op_e op, int a, int b);
    return '{en: 1'b1, op: op, src_a: 2'(a), src_b: 2'(b)};
  endfunction

  task automatic build_cfg();
    for (int r = 0; r < SR; r++) for (int c = 0; c < SC; c++) begin swc[r][c] = '0; fuc[r][c] = '0; end
    // a*c on FU(0,3)
    swc[0][3][SO_SE] = rt(SI_N);
    swc[0][4][SO_SW] = rt(SI_N);
    fuc[0][3] = fu(OP_FMUL, FS_NW, FS_NE);
    // b*d on FU(1,1)
    swc[0][1][SO_S] = rt(SI_N);  swc[1][1][SO_SE] = rt(SI_N);
    swc[0][2][SO_S] = rt(SI_N);  swc[1][2][SO_SW] = rt(SI_N);
    fuc[1][1] = fu(OP_FMUL, FS_NW, FS_NE);
    // a*d on FU(1,5)
    swc[0][5][SO_S] = rt(SI_N);  swc[1][5][SO_SE] = rt(SI_N);
    swc[0][6][SO_S] = rt(SI_N);  swc[1][6][SO_SW] = rt(SI_N);
    fuc[1][5] = fu(OP_FMUL, FS_NW, FS_NE);
    // b*c on FU(2,3): b along row 2 from the west, c along row 3
    swc[2][0][SO_E] = rt(SI_W);  swc[2][1][SO_E] = rt(SI_W);  swc[2][2][SO_E] = rt(SI_W);
    swc[2][3][SO_SE] = rt(SI_W);
    swc[3][0][SO_E] = rt(SI_W);  swc[3][1][SO_E] = rt(SI_W);  swc[3][2][SO_E] = rt(SI_W);
    swc[3][3][SO_NE] = rt(SI_W);
    fuc[2][3] = fu(OP_FMUL, FS_NW, FS_SW);
    // re = a*c - b*d on FU(2,2)
    swc[1][4][SO_S]  = rt(SI_FU);   // a*c down
    swc[2][4][SO_W]  = rt(SI_N);    // then west
    swc[2][3][SO_SW] = rt(SI_E);    // into FU(2,2) from its north-east corner
    swc[2][2][SO_SE] = rt(SI_FU);   // b*d into FU(2,2) from its north-west corner
    fuc[2][2] = fu(OP_FSUB, FS_NE, FS_NW);
    swc[3][3][SO_S] = rt(SI_FU);
    for (int r = 4; r < SR; r++) swc[r][3][SO_S] = rt(SI_N);   // to output port 3
    // im = a*d + b*c on FU(2,6)
    swc[2][6][SO_SE] = rt(SI_FU);   // a*d
    swc[3][4][SO_E]  = rt(SI_FU);   // b*c east
    swc[3][5][SO_E]  = rt(SI_W);
    swc[3][6][SO_NE] = rt(SI_W);    // into FU(2,6) from its south-west corner
    fuc[2][6] = fu(OP_FADD, FS_NW, FS_SW);
    swc[3][7][SO_E] = rt(SI_FU);
    swc[3][8][SO_E] = rt(SI_W);     // to output port SC+3
  endtask

  task automatic write_vmap(logic out, int vp, int p0, int p1, int p2, int p3);
    int p[VL] = '{p0, p1, p2, p3};
    @(negedge clk);
    vmap_we = 1; vmap_out = out; vmap_slot = 0; vmap_vp = 3'(vp);
    for (int k = 0; k < VL; k++) vmap[k] = (p[k] < 0) ? '0 : '{en: 1'b1, port: 6'(p[k])};
    @(negedge clk);
    vmap_we = 0;
  endtask

  task automatic send_vec_req(int vp, logic [VL-1:0][31:0] d);
    @(negedge clk);
    send_valid = 1; send_vec = 1; send_port = 6'(vp); send_data = d;
    @(posedge clk);
    while (!send_ready) @(posedge clk);
    @(negedge clk);
    send_valid = 0;
  endtask

  task automatic recv_vec_req(output logic [VL-1:0][31:0] d);
    @(negedge clk);
    recv_valid = 1; recv_vec = 1; recv_port = 0;
    @(posedge clk);
    while (!recv_ready) @(posedge clk);
    @(negedge clk);
    recv_valid = 0;
    while (!resp_valid) @(negedge clk);
    d = resp_data;
  endtask

  function automatic logic close(logic [31:0] got, real want, real scale);
    real diff = f2r(got) - want;
    if (diff < 0.0) diff = -diff;
    return diff <= scale / 262144.0;   // 2^-18 of the operand magnitudes
  endfunction

  initial begin
    cfg_we = 0; cfg_row = 0; cfg_col = 0; cfg_slot = 0; cfg_sw = '0; cfg_fu = '0;
    vmap_we = 0; vmap_out = 0; vmap_slot = 0; vmap_vp = 0; vmap = '0;
    act_valid = 0; act_slot = 0; fcs_valid = 0; fcs_slot = 0;
    send_valid = 0; send_vec = 0; send_port = 0; send_data = '0;
    recv_valid = 0; recv_vec = 0; recv_port = 0;
    for (int i = 0; i < N_INV; i++) begin
      av[i] = {1'($urandom), 8'(126 + $urandom % 3), 23'($urandom)};
      bv[i] = {1'($urandom), 8'(126 + $urandom % 3), 23'($urandom)};
      cv[i] = {1'($urandom), 8'(126 + $urandom % 3), 23'($urandom)};
      dv[i] = {1'($urandom), 8'(126 + $urandom % 3), 23'($urandom)};
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    build_cfg();
    for (int r = 0; r < SR; r++)
      for (int c = 0; c < SC; c++) begin
        @(negedge clk);
        cfg_we = 1; cfg_row = 4'(r); cfg_col = 4'(c); cfg_slot = 0;
        cfg_sw = swc[r][c]; cfg_fu = fuc[r][c];
      end
    @(negedge clk);
    cfg_we = 0;
    write_vmap(0, 0, 3, 4, 1, 2);
    write_vmap(0, 1, 5, 6, SC + 2, SC + 3);
    write_vmap(1, 0, 3, SC + 3, -1, -1);
    @(negedge clk);
    act_valid = 1; act_slot = 0;
    @(negedge clk);
    act_valid = 0;

    fork
      for (int i = 0; i < N_INV; i++) begin
        send_vec_req(0, {dv[i], bv[i], cv[i], av[i]});
        send_vec_req(1, {cv[i], bv[i], dv[i], av[i]});
      end
      for (int i = 0; i < N_INV; i++) begin
        logic [VL-1:0][31:0] d;
        real a, b, c, e;
        recv_vec_req(d);
        a = f2r(av[i]); b = f2r(bv[i]); c = f2r(cv[i]); e = f2r(dv[i]);
        checks += 2;
        if (!close(d[0], a * c - b * e, (a * c < 0 ? -a * c : a * c) + (b * e < 0 ? -b * e : b * e))) begin
          failures++; $display("FAIL re %0d: got %h (%g) exp %g", i, d[0], f2r(d[0]), a * c - b * e);
        end
        if (!close(d[1], a * e + b * c, (a * e < 0 ? -a * e : a * e) + (b * c < 0 ? -b * c : b * c))) begin
          failures++; $display("FAIL im %0d: got %h (%g) exp %g", i, d[1], f2r(d[1]), a * e + b * c);
        end
        checks++;
        if (d[2] != 0 || d[3] != 0) begin failures++; $display("FAIL masked words not zero"); end
      end
    join
    $display("complex products: %0d", N_INV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
