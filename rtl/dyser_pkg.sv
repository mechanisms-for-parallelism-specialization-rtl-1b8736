// dyser_pkg: types and constants shared by the DySER fabric.
//
// A DySER block is a grid of circuit switches with a functional unit (FU) in
// every square formed by four switches. All values travel as 32-bit tokens on
// point-to-point links with a forward valid and a backward credit. Besides
// data, a link carries the two control tokens of fast configuration
// switching: RESET, which retires a tile from its old configuration, and SET,
// which moves an idle tile into the next configuration.
//
// Follows the document: the FU mix and latencies (64 FUs: 16 INT-ADD, 12
// INT-MUL, 16 FP-ADD, 12 FP-MUL, 4 FP-DIV + 4 FP-SQRT as eight unified
// divide/square-root units; latencies 1, 5, 4, 7, 12), the valid/credit links
// and the reset/set/free protocol. Own choices: 32-bit single-precision data,
// the token encoding, the configuration word layouts, the opcode set and the
// placement of FU kinds in the grid (fu_kind_at).
package dyser_pkg;

  localparam int DATA_W = 32;

  typedef enum logic [1:0] {
    TK_DATA  = 2'd0,
    TK_RESET = 2'd1,
    TK_SET   = 2'd2
  } tok_kind_e;

  // One link beat: valid, kind of token, payload.
  typedef struct packed {
    logic              valid;
    tok_kind_e         kind;
    logic [DATA_W-1:0] data;
  } link_t;

  typedef enum logic [2:0] {
    FK_IADD    = 3'd0,
    FK_IMUL    = 3'd1,
    FK_FADD    = 3'd2,
    FK_FMUL    = 3'd3,
    FK_FDIVSQRT = 3'd4
  } fu_kind_e;

  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_IADD  = 4'd1,
    OP_ISUB  = 4'd2,
    OP_IMUL  = 4'd3,
    OP_FADD  = 4'd4,
    OP_FSUB  = 4'd5,
    OP_FMUL  = 4'd6,
    OP_FDIV  = 4'd7,
    OP_FSQRT = 4'd8
  } op_e;

  // Switch input ports.
  localparam int SI_N = 0, SI_E = 1, SI_S = 2, SI_W = 3, SI_FU = 4;
  localparam int SW_NIN = 5;
  // Switch output ports: four switch neighbours, four FU neighbours.
  localparam int SO_N = 0, SO_E = 1, SO_S = 2, SO_W = 3;
  localparam int SO_NW = 4, SO_NE = 5, SO_SW = 6, SO_SE = 7;
  localparam int SW_NOUT = 8;
  // FU operand sources: the switch at each corner of the FU.
  localparam int FS_NW = 0, FS_NE = 1, FS_SW = 2, FS_SE = 3;

  typedef struct packed {
    logic       en;
    logic [2:0] sel;   // SI_* input driving this output
  } sw_out_cfg_t;

  typedef sw_out_cfg_t [SW_NOUT-1:0] sw_cfg_t;

  typedef struct packed {
    logic       en;
    op_e        op;
    logic [1:0] src_a;  // FS_* corner switch of operand A
    logic [1:0] src_b;  // FS_* corner switch of operand B (unused by FSQRT)
  } fu_cfg_t;

  // One vector-map entry: element goes to / comes from DySER port `port`,
  // or is masked off when en is 0.
  typedef struct packed {
    logic       en;
    logic [5:0] port;
  } vmap_ent_t;

  function automatic logic op_is_unary(op_e op);
    return op == OP_FSQRT;
  endfunction

  // Latency of each FU kind in cycles (Table 2 of the DySER evaluation).
  function automatic int fu_latency(fu_kind_e k);
    case (k)
      FK_IADD:     return 1;
      FK_IMUL:     return 5;
      FK_FADD:     return 4;
      FK_FMUL:     return 7;
      default:     return 12;
    endcase
  endfunction

  // Whether an FU kind implements an opcode.
  function automatic logic fu_supports(fu_kind_e k, op_e op);
    case (k)
      FK_IADD:     return op == OP_IADD || op == OP_ISUB;
      FK_IMUL:     return op == OP_IMUL;
      FK_FADD:     return op == OP_FADD || op == OP_FSUB;
      FK_FMUL:     return op == OP_FMUL;
      default:     return op == OP_FDIV || op == OP_FSQRT;
    endcase
  endfunction

  // Placement of FU kinds. Even rows: IADD IMUL FADD FMUL IADD IMUL FADD DIVSQRT,
  // odd rows: IADD FMUL FADD IMUL IADD FMUL FADD DIVSQRT. An 8x8 grid then holds
  // 16 IADD, 12 IMUL, 16 FADD, 12 FMUL and 8 DIVSQRT units.
  function automatic fu_kind_e fu_kind_at(int r, int c);
    case (c % 8)
      0, 4:    return FK_IADD;
      2, 6:    return FK_FADD;
      1, 5:    return (r % 2 == 0) ? FK_IMUL : FK_FMUL;
      3:       return (r % 2 == 0) ? FK_FMUL : FK_IMUL;
      default: return FK_FDIVSQRT;
    endcase
  endfunction

endpackage
