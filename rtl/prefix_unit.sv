// Prefix unit: Hosm-Format prefix instructions for IP lookup.
//
// Hosm-Format writes a prefix of length L (0 <= L <= W-1) as one W-bit word:
// the L prefix bits at the top, then a single 0, then ones down to bit 0.
// Example (W = 32): 101* becomes 1010_1111_..._1111. Plain unsigned
// comparison of such words orders prefixes the way a prefix tree needs, so
// comparison is left to the ordinary ALU; this unit does the rest:
//   cpr  result = Hosm word of (value a, length b)
//   vpr  result = zero-filled value of the Hosm word a
//   lpr  result = length of the Hosm word a
//   mpr  result = 1 if the Hosm word a is a prefix of the address b, else 0;
//        the same bit is driven on match for the processor's branch logic
// The length of a Hosm word is W-1 minus its number of trailing ones. Match
// uses the test "(a XOR b) < 2^(W-L)", done here as "the top L bits of
// a XOR b are zero", which is the same condition.
//
// Interface: combinational, one operation per cycle. a is the first operand
// (value for cpr, Hosm word otherwise), b the second (length for cpr, address
// for mpr). When en is low the operands are forced to zero and result and match
// are zero.
//
// The format, the four operations and the match rule follow the published
// description. Design choices: cpr clears value bits below the prefix and
// clamps lengths above W-1 to W-1 (W-bit prefixes are meant to live in a
// separate exact-match table); the all-ones word, which no prefix encodes,
// decodes as the empty prefix (length 0), so mpr matches every address with
// it; the operand gating.
module prefix_unit
  import alu_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  logic         en,
  input  prefix_func_e func,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] result,
  output logic         match
);

  localparam int unsigned SW = $clog2(W);

  logic [W-1:0]  a_g, b_g;
  logic [SW-1:0] cpr_len;     // length requested by cpr, clamped to W-1
  logic [SW-1:0] hosm_len;    // length decoded from a Hosm word
  logic [W-1:0]  cpr_word;
  logic [W-1:0]  hosm_mask;   // ones on the top hosm_len bits
  logic          is_match;

  assign a_g = en ? a : '0;
  assign b_g = en ? b : '0;

  // Ones on the top len bits of a W-bit word.
  function automatic logic [W-1:0] top_mask(input logic [SW-1:0] len);
    logic [W:0] low;
    low = (W+1)'(1) << (W - 32'(len));   // 2^(W-len)
    low = low - 1'b1;
    return ~low[W-1:0];
  endfunction

  // cpr: keep the top bits, then a zero, then ones.
  always_comb begin
    logic [W-1:0] m;
    cpr_len  = (b_g >= W'(W-1)) ? SW'(W-1) : b_g[SW-1:0];
    m        = top_mask(cpr_len);
    cpr_word = (a_g & m) | (~m >> 1);
  end

  // Decode the length: count trailing ones, saturating at W-1.
  always_comb begin
    logic [SW:0] ones;
    logic        run;
    ones = '0;
    run  = 1'b1;
    for (int i = 0; i < W - 1; i++) begin
      run = run & a_g[i];
      if (run) ones = ones + 1'b1;
    end
    hosm_len  = SW'(W - 1 - 32'(ones));
    hosm_mask = top_mask(hosm_len);
  end

  assign is_match = ((a_g ^ b_g) & hosm_mask) == '0;

  always_comb begin
    if (!en) result = '0;
    else unique case (func)
      PF_CPR:  result = cpr_word;
      PF_VPR:  result = a_g & hosm_mask;
      PF_LPR:  result = W'(hosm_len);
      PF_MPR:  result = W'(is_match);
      default: result = '0;
    endcase
  end

  assign match = en && (func == PF_MPR) && is_match;

endmodule
