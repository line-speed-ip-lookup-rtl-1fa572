// ALU controller: decodes one operation code into the control bundle of the
// augmented ALU.
//
// For each alu_op_e code it names the unit that produces the result, raises
// that unit's enable (the other two stay idle with their operands held at
// zero) and gives the unit its function code. The three units are mutually
// exclusive: exactly one enable is high for every assigned code, and none
// for an unassigned code, whose result is zero.
//
// Interface: combinational, op in, ctrl out. The extra control lines to the
// Prefix and Parse units follow the published block diagram; the encoding
// and the enables are this design's choice.
module alu_controller
  import alu_pkg::*;
(
  input  alu_op_e   op,
  output alu_ctrl_t ctrl
);

  always_comb begin
    ctrl             = '0;
    ctrl.unit        = UNIT_NONE;
    ctrl.alu_func    = AF_AND;
    ctrl.prefix_func = PF_CPR;
    ctrl.parse_func  = XF_EBIS;
    unique case (op)
      OP_AND:  begin ctrl.unit = UNIT_ALU; ctrl.alu_func = AF_AND; end
      OP_OR:   begin ctrl.unit = UNIT_ALU; ctrl.alu_func = AF_OR;  end
      OP_NOT:  begin ctrl.unit = UNIT_ALU; ctrl.alu_func = AF_NOT; end
      OP_XOR:  begin ctrl.unit = UNIT_ALU; ctrl.alu_func = AF_XOR; end
      OP_NOR:  begin ctrl.unit = UNIT_ALU; ctrl.alu_func = AF_NOR; end
      OP_ADD:  begin ctrl.unit = UNIT_ALU; ctrl.alu_func = AF_ADD; end
      OP_SUB:  begin ctrl.unit = UNIT_ALU; ctrl.alu_func = AF_SUB; end
      OP_MUL:  begin ctrl.unit = UNIT_ALU; ctrl.alu_func = AF_MUL; end
      OP_EQ:   begin ctrl.unit = UNIT_ALU; ctrl.alu_func = AF_EQ;  end
      OP_NE:   begin ctrl.unit = UNIT_ALU; ctrl.alu_func = AF_NE;  end
      OP_GT:   begin ctrl.unit = UNIT_ALU; ctrl.alu_func = AF_GT;  end
      OP_GTU:  begin ctrl.unit = UNIT_ALU; ctrl.alu_func = AF_GTU; end
      OP_LT:   begin ctrl.unit = UNIT_ALU; ctrl.alu_func = AF_LT;  end
      OP_LTU:  begin ctrl.unit = UNIT_ALU; ctrl.alu_func = AF_LTU; end
      OP_EBIS: begin ctrl.unit = UNIT_PARSE;  ctrl.parse_func  = XF_EBIS; end
      OP_EBIA: begin ctrl.unit = UNIT_PARSE;  ctrl.parse_func  = XF_EBIA; end
      OP_CBIT: begin ctrl.unit = UNIT_PARSE;  ctrl.parse_func  = XF_CBIT; end
      OP_CPR:  begin ctrl.unit = UNIT_PREFIX; ctrl.prefix_func = PF_CPR;  end
      OP_VPR:  begin ctrl.unit = UNIT_PREFIX; ctrl.prefix_func = PF_VPR;  end
      OP_LPR:  begin ctrl.unit = UNIT_PREFIX; ctrl.prefix_func = PF_LPR;  end
      OP_MPR:  begin ctrl.unit = UNIT_PREFIX; ctrl.prefix_func = PF_MPR;  end
      default: ;
    endcase
    ctrl.alu_en    = (ctrl.unit == UNIT_ALU);
    ctrl.prefix_en = (ctrl.unit == UNIT_PREFIX);
    ctrl.parse_en  = (ctrl.unit == UNIT_PARSE);
  end

  // The units are mutually exclusive: at most one enable at a time.
  always_comb begin
    assert final (2'(ctrl.alu_en) + 2'(ctrl.prefix_en) + 2'(ctrl.parse_en) <= 2'd1)
      else $error("more than one functional unit enabled");
  end

endmodule
