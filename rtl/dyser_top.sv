// dyser_top: a DySER block as seen by the host core's execute stage.
//
// The block combines the switch/FU fabric (dyser_fabric), the input interface
// with its named input ports and vector-port mapping FSM (dyser_in_if) and the
// output interface with its gathering FSM (dyser_out_if). The host, which is
// not part of this design, drives the ports below; they correspond to the
// DySER instructions: configure (cfg_* and vmap_*, then act_*), send register
// or memory data (send_*, scalar or VEC_LEN-word vector), receive results
// (recv_*), and the fast configuration switch (fcs_*).
//
// Configuration slot state: cur_slot_o is the configuration that the next
// invocations use. act_valid_i makes slot act_slot_i current in every tile at
// once (the ordinary path, after the tiles were written one per cycle).
// fcs_valid_i makes slot fcs_slot_i current through the reset/set protocol:
// the input interface puts a RESET and then a SET token into every input
// port; the RESET tokens drain the old configuration tile by tile and the SET
// tokens switch tiles into the new one as they become free, so data of the
// new configuration may follow immediately. fcs_valid_i is taken only while
// fcs_ready_o is high.
//
// Status outputs: in_stall_o / out_stall_o are high in cycles where a
// vector FSM waits on a full input port or an empty output port; ctl_count_o
// counts RESET and SET tokens that reached the output ports.
//
// Timing: a tile (switch plus the FU to its south-east) is written per cycle,
// so one configuration slot takes 81 cycles at the default size; a scalar send
// is taken in one cycle, a vector in VEC_LEN cycles.
// Follows the document: the 64-FU grid with 81 switches, named FIFO ports,
// vector maps held with the configuration, multiple stored configurations and
// the reset/set/free switch protocol. Own choices: the port and slot counts,
// vector length, FIFO depths, the request handshakes and the one-tile-per-cycle
// configuration path (the document quotes about 64 cycles to configure).
module dyser_top
  import dyser_pkg::*;
#(
  parameter int FU_ROWS    = 8,
  parameter int FU_COLS    = 8,
  parameter int NUM_CFG    = 4,
  parameter int NUM_VP     = 8,
  parameter int VEC_LEN    = 4,
  parameter int PORT_DEPTH = 4,
  parameter int LINK_DEPTH = 2,
  localparam int NP = FU_ROWS + FU_COLS + 2,
  localparam int SW = $clog2(NUM_CFG)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // tile configuration
  input  logic                           cfg_we_i,
  input  logic [3:0]                     cfg_row_i,
  input  logic [3:0]                     cfg_col_i,
  input  logic [SW-1:0]                  cfg_slot_i,
  input  sw_cfg_t                        cfg_sw_i,
  input  fu_cfg_t                        cfg_fu_i,
  // vector maps (vmap_out_i: 0 input side, 1 output side)
  input  logic                           vmap_we_i,
  input  logic                           vmap_out_i,
  input  logic [SW-1:0]                  vmap_slot_i,
  input  logic [$clog2(NUM_VP)-1:0]      vmap_vp_i,
  input  vmap_ent_t [VEC_LEN-1:0]        vmap_i,
  // configuration activation and fast switching
  input  logic                           act_valid_i,
  input  logic [SW-1:0]                  act_slot_i,
  input  logic                           fcs_valid_i,
  input  logic [SW-1:0]                  fcs_slot_i,
  output logic                           fcs_ready_o,
  output logic [SW-1:0]                  cur_slot_o,
  // sends
  input  logic                           send_valid_i,
  output logic                           send_ready_o,
  input  logic                           send_vec_i,
  input  logic [5:0]                     send_port_i,
  input  logic [VEC_LEN-1:0][DATA_W-1:0] send_data_i,
  // receives
  input  logic                           recv_valid_i,
  output logic                           recv_ready_o,
  input  logic                           recv_vec_i,
  input  logic [5:0]                     recv_port_i,
  output logic                           resp_valid_o,
  output logic [VEC_LEN-1:0][DATA_W-1:0] resp_data_o,
  // status
  output logic                           in_stall_o,
  output logic                           out_stall_o,
  output logic [15:0]                    ctl_count_o
);
  link_t [NP-1:0] in_links, out_links;
  logic  [NP-1:0] in_credit, in_free, out_credit;
  logic  [SW-1:0] tgt_slot;
  logic           fcs_go;

  assign fcs_go     = fcs_valid_i && fcs_ready_o;
  assign cur_slot_o = tgt_slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           tgt_slot <= '0;
    else if (act_valid_i) tgt_slot <= act_slot_i;
    else if (fcs_go)      tgt_slot <= fcs_slot_i;
  end

  dyser_in_if #(
    .NUM_IN(NP), .NUM_VP(NUM_VP), .VEC_LEN(VEC_LEN), .NUM_CFG(NUM_CFG),
    .DEPTH(PORT_DEPTH), .LINK_DEPTH(LINK_DEPTH)
  ) u_in (
    .clk, .rst_n,
    .req_valid_i (send_valid_i),
    .req_ready_o (send_ready_o),
    .req_vec_i   (send_vec_i),
    .req_port_i  (send_port_i),
    .req_data_i  (send_data_i),
    .fcs_i       (fcs_go),
    .fcs_ready_o,
    .vmap_we_i   (vmap_we_i && !vmap_out_i),
    .vmap_slot_i,
    .vmap_vp_i,
    .vmap_i,
    .slot_i      (tgt_slot),
    .out_o       (in_links),
    .out_credit_i(in_credit),
    .sw_free_i   (in_free),
    .stall_o     (in_stall_o)
  );

  dyser_fabric #(
    .FU_ROWS(FU_ROWS), .FU_COLS(FU_COLS), .NUM_CFG(NUM_CFG), .LINK_DEPTH(LINK_DEPTH)
  ) u_fabric (
    .clk, .rst_n,
    .in_i        (in_links),
    .in_credit_o (in_credit),
    .in_free_o   (in_free),
    .out_o       (out_links),
    .out_credit_i(out_credit),
    .cfg_we_i,
    .cfg_row_i,
    .cfg_col_i,
    .cfg_slot_i,
    .cfg_sw_i,
    .cfg_fu_i,
    .act_i       (act_valid_i),
    .act_slot_i,
    .tgt_slot_i  (tgt_slot)
  );

  dyser_out_if #(
    .NUM_OUT(NP), .NUM_VP(NUM_VP), .VEC_LEN(VEC_LEN), .NUM_CFG(NUM_CFG),
    .DEPTH(LINK_DEPTH)
  ) u_out (
    .clk, .rst_n,
    .req_valid_i (recv_valid_i),
    .req_ready_o (recv_ready_o),
    .req_vec_i   (recv_vec_i),
    .req_port_i  (recv_port_i),
    .resp_valid_o,
    .resp_data_o,
    .vmap_we_i   (vmap_we_i && vmap_out_i),
    .vmap_slot_i,
    .vmap_vp_i,
    .vmap_i,
    .slot_i      (tgt_slot),
    .in_i        (out_links),
    .in_credit_o (out_credit),
    .ctl_count_o,
    .stall_o     (out_stall_o)
  );

endmodule
