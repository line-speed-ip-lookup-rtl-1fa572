// Shared types for the packet-processing ALU.
//
// The ALU executes one operation per cycle, chosen by an alu_op_e code. The
// codes fall into three groups, one per functional unit: the ordinary integer
// ALU, the Prefix unit (Hosm-Format prefix instructions cpr, vpr, lpr, mpr)
// and the Parse unit (bit-field instructions ebis, ebia, cbit). The instruction
// set of the two added units follows the published instruction table; the
// numeric encoding of the codes and the exact list of ordinary ALU operations
// are this design's own choice.
package alu_pkg;

  // Default data width: the units are 32-bit.
  localparam int unsigned XLEN = 32;

  typedef enum logic [4:0] {
    // ordinary ALU: logical
    OP_AND  = 5'd0,
    OP_OR   = 5'd1,
    OP_NOT  = 5'd2,   // bitwise NOT of input1
    OP_XOR  = 5'd3,
    OP_NOR  = 5'd4,
    // ordinary ALU: integer
    OP_ADD  = 5'd5,
    OP_SUB  = 5'd6,
    OP_MUL  = 5'd7,   // low half of the product
    // ordinary ALU: relational (result is 1 or 0)
    OP_EQ   = 5'd8,
    OP_NE   = 5'd9,
    OP_GT   = 5'd10,  // signed
    OP_GTU  = 5'd11,  // unsigned; compares Hosm-Format prefixes
    OP_LT   = 5'd12,  // signed
    OP_LTU  = 5'd13,  // unsigned
    // Parse unit
    OP_EBIS = 5'd16,  // extract bits in place
    OP_EBIA = 5'd17,  // extract bits and right-align
    OP_CBIT = 5'd18,  // test one bit
    // Prefix unit
    OP_CPR  = 5'd24,  // (value, length) -> Hosm-Format
    OP_VPR  = 5'd25,  // Hosm-Format -> zero-filled value
    OP_LPR  = 5'd26,  // Hosm-Format -> length
    OP_MPR  = 5'd27   // does the prefix match the address?
  } alu_op_e;

  // Which unit drives the result.
  typedef enum logic [1:0] {
    UNIT_ALU    = 2'd0,
    UNIT_PREFIX = 2'd1,
    UNIT_PARSE  = 2'd2,
    UNIT_NONE   = 2'd3   // unassigned code: result is zero
  } unit_sel_e;

  typedef enum logic [3:0] {
    AF_AND, AF_OR, AF_NOT, AF_XOR, AF_NOR,
    AF_ADD, AF_SUB, AF_MUL,
    AF_EQ, AF_NE, AF_GT, AF_GTU, AF_LT, AF_LTU
  } alu_func_e;

  typedef enum logic [1:0] {
    PF_CPR, PF_VPR, PF_LPR, PF_MPR
  } prefix_func_e;

  typedef enum logic [1:0] {
    XF_EBIS, XF_EBIA, XF_CBIT
  } parse_func_e;

  // Control bundle from the ALU controller to the three units and the
  // output multiplexer.
  typedef struct packed {
    unit_sel_e    unit;
    logic         alu_en;
    logic         prefix_en;
    logic         parse_en;
    alu_func_e    alu_func;
    prefix_func_e prefix_func;
    parse_func_e  parse_func;
  } alu_ctrl_t;

endpackage
