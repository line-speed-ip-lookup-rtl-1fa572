// Parse unit: bit-field instructions for packet header parsing.
//
// Three operations, one per cycle, purely combinational:
//   ebis  result = a & MASK[s,l]                 (field kept in place)
//   ebia  result = (a & MASK[s,l]) >> s          (field moved to bit 0)
//   cbit  result = a[b] ? 1 : 0
// MASK[s,l] has l ones starting at bit s (bit 0 is the least significant
// bit). Bits of the mask that would fall above bit W-1 are dropped, so a
// field that runs off the top of the word is truncated.
//
// Interface: a is the register operand. imm carries the instruction's
// immediates: imm[SW-1:0] is s (or b for cbit) and imm[2*SW:SW] is l, with
// SW = log2(W); for W = 32 that is s in bits 4:0 and l (0..32) in bits 10:5.
// When en is low the operands are forced to zero, so an idle unit does not
// toggle while another unit is in use.
//
// The operations come from the published instruction table; the immediate
// layout, the treatment of fields that overrun the word and the operand
// gating are choices of this design.
module parse_unit
  import alu_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  logic         en,
  input  parse_func_e  func,
  input  logic [W-1:0] a,
  input  logic [W-1:0] imm,
  output logic [W-1:0] result
);

  localparam int unsigned SW = $clog2(W);

  logic [W-1:0]  a_g;
  logic [2*SW:0] imm_g;
  logic [SW-1:0] s;
  logic [SW:0]   l;
  logic [W-1:0]  field_mask;
  logic [W-1:0]  field;

  assign a_g   = en ? a   : '0;
  assign imm_g = en ? imm[2*SW:0] : '0;
  assign s     = imm_g[SW-1:0];
  assign l     = imm_g[2*SW:SW];

  // MASK[s,l]: ones in bits s .. s+l-1.
  always_comb begin
    logic [2*W-1:0] ones;
    ones = (2*W)'(1) << l;
    ones = ones - 1'b1;
    field_mask = W'(ones << s);
  end

  assign field = a_g & field_mask;

  always_comb begin
    unique case (func)
      XF_EBIS: result = field;
      XF_EBIA: result = field >> s;
      XF_CBIT: result = W'(a_g[s]);
      default: result = '0;
    endcase
  end

endmodule
