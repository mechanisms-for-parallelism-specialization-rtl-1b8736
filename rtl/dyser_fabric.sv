// dyser_fabric: the grid of switches and functional units.
//
// (FU_ROWS+1) x (FU_COLS+1) switches form a mesh; FU (r,c) sits in the square
// whose corners are switches (r,c), (r,c+1), (r+1,c) and (r+1,c+1). Each FU
// takes operands from any of those four switches and sends its result to
// switch (r+1,c+1). With the defaults this is the document's 64-FU block with
// 81 switches. The kind of each FU comes from dyser_pkg::fu_kind_at.
//
// Edge ports: input port c (c < FU_COLS+1) enters the north input of switch
// (0,c); input port FU_COLS+1+r enters the west input of switch (r,0). Output
// port c leaves the south output of switch (FU_ROWS,c); output port FU_COLS+1+r
// leaves the east output of switch (r,FU_COLS). All links carry valid/credit
// flow control; unconnected switch sides have no credits and never send.
// Every tile reports its free signal to its neighbours; the output ports count
// as always free.
//
// Configuration: cfg_we_i writes configuration slot cfg_slot_i of tile
// (cfg_row_i, cfg_col_i): the switch there, and the FU to its south-east if
// there is one. One tile is written per cycle. act_i starts configuration
// act_slot_i everywhere; tgt_slot_i is the configuration the set tokens of a
// fast configuration switch lead into.
//
// Follows the document: each FU connects to its four neighbouring switches,
// the switches form a circuit-switched mesh, the Table 2 unit counts, and the
// free signal between a tile and its neighbours. Own choices: the corner that
// takes the FU result, the FU placement, the edge-port numbering and
// treating output ports as always free.
module dyser_fabric
  import dyser_pkg::*;
#(
  parameter int FU_ROWS    = 8,
  parameter int FU_COLS    = 8,
  parameter int NUM_CFG    = 4,
  parameter int LINK_DEPTH = 2,
  localparam int SR = FU_ROWS + 1,
  localparam int SC = FU_COLS + 1,
  localparam int NP = SR + SC
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  link_t [NP-1:0]             in_i,
  output logic  [NP-1:0]             in_credit_o,
  output logic  [NP-1:0]             in_free_o,
  output link_t [NP-1:0]             out_o,
  input  logic  [NP-1:0]             out_credit_i,
  input  logic                       cfg_we_i,
  input  logic [3:0]                 cfg_row_i,
  input  logic [3:0]                 cfg_col_i,
  input  logic [$clog2(NUM_CFG)-1:0] cfg_slot_i,
  input  sw_cfg_t                    cfg_sw_i,
  input  fu_cfg_t                    cfg_fu_i,
  input  logic                       act_i,
  input  logic [$clog2(NUM_CFG)-1:0] act_slot_i,
  input  logic [$clog2(NUM_CFG)-1:0] tgt_slot_i
);
  link_t [SW_NIN-1:0]  sw_in     [SR][SC];
  logic  [SW_NIN-1:0]  sw_in_cr  [SR][SC];
  link_t [SW_NOUT-1:0] sw_out    [SR][SC];
  logic  [SW_NOUT-1:0] sw_out_cr [SR][SC];
  logic  [SW_NOUT-1:0] sw_nfree  [SR][SC];
  logic                sw_free   [SR][SC];

  link_t [3:0]         fu_in     [SR][SC];
  logic  [3:0]         fu_in_cr  [SR][SC];
  link_t               fu_out    [SR][SC];
  logic                fu_out_cr [SR][SC];
  logic                fu_free   [SR][SC];

  for (genvar r = 0; r < SR; r++) begin : g_r
    for (genvar c = 0; c < SC; c++) begin : g_c
      logic we_here;
      assign we_here = cfg_we_i && cfg_row_i == 4'(r) && cfg_col_i == 4'(c);

      // ---------------------------------------------------- switch inputs
      if (r == 0) begin : g_n_edge
        assign sw_in[r][c][SI_N] = in_i[c];
        assign in_credit_o[c]    = sw_in_cr[r][c][SI_N];
        assign in_free_o[c]      = sw_free[r][c];
      end else begin : g_n
        assign sw_in[r][c][SI_N] = sw_out[r-1][c][SO_S];
      end
      if (c == 0) begin : g_w_edge
        assign sw_in[r][c][SI_W] = in_i[SC+r];
        assign in_credit_o[SC+r] = sw_in_cr[r][c][SI_W];
        assign in_free_o[SC+r]   = sw_free[r][c];
      end else begin : g_w
        assign sw_in[r][c][SI_W] = sw_out[r][c-1][SO_E];
      end
      if (r == SR - 1) begin : g_s_none
        assign sw_in[r][c][SI_S] = '0;
      end else begin : g_s
        assign sw_in[r][c][SI_S] = sw_out[r+1][c][SO_N];
      end
      if (c == SC - 1) begin : g_e_none
        assign sw_in[r][c][SI_E] = '0;
      end else begin : g_e
        assign sw_in[r][c][SI_E] = sw_out[r][c+1][SO_W];
      end
      if (r > 0 && c > 0) begin : g_fu_in
        assign sw_in[r][c][SI_FU] = fu_out[r-1][c-1];
        assign fu_out_cr[r-1][c-1] = sw_in_cr[r][c][SI_FU];
      end else begin : g_fu_none
        assign sw_in[r][c][SI_FU] = '0;
      end

      // ------------------------------------- switch output credits / free
      if (r == 0) begin : g_on_none
        assign sw_out_cr[r][c][SO_N] = 1'b0;
        assign sw_nfree[r][c][SO_N]  = 1'b0;
      end else begin : g_on
        assign sw_out_cr[r][c][SO_N] = sw_in_cr[r-1][c][SI_S];
        assign sw_nfree[r][c][SO_N]  = sw_free[r-1][c];
      end
      if (r == SR - 1) begin : g_os_edge
        assign out_o[c]              = sw_out[r][c][SO_S];
        assign sw_out_cr[r][c][SO_S] = out_credit_i[c];
        assign sw_nfree[r][c][SO_S]  = 1'b1;
      end else begin : g_os
        assign sw_out_cr[r][c][SO_S] = sw_in_cr[r+1][c][SI_N];
        assign sw_nfree[r][c][SO_S]  = sw_free[r+1][c];
      end
      if (c == SC - 1) begin : g_oe_edge
        assign out_o[SC+r]           = sw_out[r][c][SO_E];
        assign sw_out_cr[r][c][SO_E] = out_credit_i[SC+r];
        assign sw_nfree[r][c][SO_E]  = 1'b1;
      end else begin : g_oe
        assign sw_out_cr[r][c][SO_E] = sw_in_cr[r][c+1][SI_W];
        assign sw_nfree[r][c][SO_E]  = sw_free[r][c+1];
      end
      if (c == 0) begin : g_ow_none
        assign sw_out_cr[r][c][SO_W] = 1'b0;
        assign sw_nfree[r][c][SO_W]  = 1'b0;
      end else begin : g_ow
        assign sw_out_cr[r][c][SO_W] = sw_in_cr[r][c-1][SI_E];
        assign sw_nfree[r][c][SO_W]  = sw_free[r][c-1];
      end
      // to the four FUs around the switch
      if (r > 0 && c > 0) begin : g_onw
        assign fu_in[r-1][c-1][FS_SE]  = sw_out[r][c][SO_NW];
        assign sw_out_cr[r][c][SO_NW]  = fu_in_cr[r-1][c-1][FS_SE];
        assign sw_nfree[r][c][SO_NW]   = fu_free[r-1][c-1];
      end else begin : g_onw_none
        assign sw_out_cr[r][c][SO_NW]  = 1'b0;
        assign sw_nfree[r][c][SO_NW]   = 1'b0;
      end
      if (r > 0 && c < SC - 1) begin : g_one
        assign fu_in[r-1][c][FS_SW]    = sw_out[r][c][SO_NE];
        assign sw_out_cr[r][c][SO_NE]  = fu_in_cr[r-1][c][FS_SW];
        assign sw_nfree[r][c][SO_NE]   = fu_free[r-1][c];
      end else begin : g_one_none
        assign sw_out_cr[r][c][SO_NE]  = 1'b0;
        assign sw_nfree[r][c][SO_NE]   = 1'b0;
      end
      if (r < SR - 1 && c > 0) begin : g_osw
        assign fu_in[r][c-1][FS_NE]    = sw_out[r][c][SO_SW];
        assign sw_out_cr[r][c][SO_SW]  = fu_in_cr[r][c-1][FS_NE];
        assign sw_nfree[r][c][SO_SW]   = fu_free[r][c-1];
      end else begin : g_osw_none
        assign sw_out_cr[r][c][SO_SW]  = 1'b0;
        assign sw_nfree[r][c][SO_SW]   = 1'b0;
      end
      if (r < SR - 1 && c < SC - 1) begin : g_ose
        assign fu_in[r][c][FS_NW]      = sw_out[r][c][SO_SE];
        assign sw_out_cr[r][c][SO_SE]  = fu_in_cr[r][c][FS_NW];
        assign sw_nfree[r][c][SO_SE]   = fu_free[r][c];
      end else begin : g_ose_none
        assign sw_out_cr[r][c][SO_SE]  = 1'b0;
        assign sw_nfree[r][c][SO_SE]   = 1'b0;
      end

      dyser_switch #(.NUM_CFG(NUM_CFG), .DEPTH(LINK_DEPTH)) u_sw (
        .clk, .rst_n,
        .in_i        (sw_in[r][c]),
        .in_credit_o (sw_in_cr[r][c]),
        .out_o       (sw_out[r][c]),
        .out_credit_i(sw_out_cr[r][c]),
        .nbr_free_i  (sw_nfree[r][c]),
        .free_o      (sw_free[r][c]),
        .cfg_we_i    (we_here),
        .cfg_slot_i,
        .cfg_i       (cfg_sw_i),
        .act_i,
        .act_slot_i,
        .tgt_slot_i
      );

      if (r < SR - 1 && c < SC - 1) begin : g_fu
        dyser_fu #(.KIND(fu_kind_at(r, c)), .NUM_CFG(NUM_CFG), .DEPTH(LINK_DEPTH)) u_fu (
          .clk, .rst_n,
          .in_i        (fu_in[r][c]),
          .in_credit_o (fu_in_cr[r][c]),
          .out_o       (fu_out[r][c]),
          .out_credit_i(fu_out_cr[r][c]),
          .out_free_i  (sw_free[r+1][c+1]),
          .free_o      (fu_free[r][c]),
          .cfg_we_i    (we_here),
          .cfg_slot_i,
          .cfg_i       (cfg_fu_i),
          .act_i,
          .act_slot_i,
          .tgt_slot_i
        );
      end else begin : g_no_fu
        assign fu_out[r][c]  = '0;
        assign fu_free[r][c] = 1'b1;
        assign fu_in_cr[r][c] = '0;
        assign fu_in[r][c]    = '0;
        assign fu_out_cr[r][c] = 1'b0;
      end
    end
  end
endmodule
