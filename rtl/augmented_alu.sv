// Augmented ALU: a W-bit ALU extended with a Prefix unit and a Parse unit so
// that a RISC processor can run software IP lookup and packet parsing with
// fewer instructions.
//
// Structure: the ALU controller decodes op and enables exactly one of the
// three units; the other two see zero operands. Each unit computes from the
// shared operands input1 and input2, and the output multiplexer returns the
// selected unit's word on result. For mpr the prefix unit also drives
// branch, the condition the processor uses to take the mpr jump; the jump
// target and the program counter belong to the processor, not to this block.
//
// Operands by instruction (input1, input2):
//   ordinary ALU   (x, y)
//   ebis, ebia     (Ra, {l, s})   s in bits SW-1:0, l in bits 2*SW:SW
//   cbit           (R1, b)        b in bits SW-1:0
//   cpr            (value, length)
//   vpr, lpr       (Hosm word, -)
//   mpr            (Hosm word, address)
//
// Timing: purely combinational, one operation per cycle, as an ALU in the
// execute stage of a single-issue pipeline.
//
// The three-unit organisation with independent, mutually exclusive units
// and controller-driven selects follows the published block diagram; the
// operation encoding and operand layout are this design's choice.
module augmented_alu
  import alu_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  alu_op_e      op,
  input  logic [W-1:0] input1,
  input  logic [W-1:0] input2,
  output logic [W-1:0] result,
  output logic         branch
);

  alu_ctrl_t    ctrl;
  logic [W-1:0] alu_result, prefix_result, parse_result;

  alu_controller u_ctrl (
    .op   (op),
    .ctrl (ctrl)
  );

  base_alu #(.W(W)) u_alu (
    .en     (ctrl.alu_en),
    .func   (ctrl.alu_func),
    .input1 (input1),
    .input2 (input2),
    .result (alu_result)
  );

  prefix_unit #(.W(W)) u_prefix (
    .en     (ctrl.prefix_en),
    .func   (ctrl.prefix_func),
    .a      (input1),
    .b      (input2),
    .result (prefix_result),
    .match  (branch)
  );

  parse_unit #(.W(W)) u_parse (
    .en     (ctrl.parse_en),
    .func   (ctrl.parse_func),
    .a      (input1),
    .imm    (input2),
    .result (parse_result)
  );

  always_comb begin
    unique case (ctrl.unit)
      UNIT_ALU:    result = alu_result;
      UNIT_PREFIX: result = prefix_result;
      UNIT_PARSE:  result = parse_result;
      default:     result = '0;
    endcase
  end

  // Only mpr may request a branch.
  always_comb begin
    assert final (!branch || op == OP_MPR) else $error("branch raised outside mpr");
  end

endmodule
