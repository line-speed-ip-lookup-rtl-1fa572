// Base ALU: the ordinary integer unit that the Prefix and Parse units sit
// beside.
//
// Logical (AND, OR, NOT, XOR, NOR), integer (ADD, SUB, MUL keeping the low W
// bits of the product) and relational operations (EQ, NE, signed GT/LT,
// unsigned GTU/LTU) on two W-bit inputs, one per cycle, combinational.
// Relational results are 1 or 0. Unsigned comparison of two Hosm-Format
// words is the prefix comparison of a prefix tree search, so no separate
// prefix-compare hardware is needed.
//
// Interface: input1, input2 and output as in a textbook single-cycle ALU;
// NOT uses input1 only. When en is low the operands are forced to zero.
// The operation groups follow the published description; the exact list of
// operations and the operand gating are this design's choice.
module base_alu
  import alu_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  logic         en,
  input  alu_func_e    func,
  input  logic [W-1:0] input1,
  input  logic [W-1:0] input2,
  output logic [W-1:0] result
);

  logic [W-1:0] x, y;

  assign x = en ? input1 : '0;
  assign y = en ? input2 : '0;

  always_comb begin
    unique case (func)
      AF_AND:  result = x & y;
      AF_OR:   result = x | y;
      AF_NOT:  result = ~x;
      AF_XOR:  result = x ^ y;
      AF_NOR:  result = ~(x | y);
      AF_ADD:  result = x + y;
      AF_SUB:  result = x - y;
      AF_MUL:  result = x * y;
      AF_EQ:   result = W'(x == y);
      AF_NE:   result = W'(x != y);
      AF_GT:   result = W'($signed(x) > $signed(y));
      AF_GTU:  result = W'(x > y);
      AF_LT:   result = W'($signed(x) < $signed(y));
      AF_LTU:  result = W'(x < y);
      default: result = '0;
    endcase
  end

endmodule
