// Self-checking testbench for base_alu.
//
// Applies every function to directed corner operands (zero, one, all ones,
// the signed extremes) and to random operands, and compares with results
// computed in the testbench. Also checks that unsigned comparison of
// Hosm-Format words orders prefixes exactly as the prefix order defined for
// the tree (shorter prefix compared on its length, then the next bit of the
// longer one decides). Combinational: checked in the cycle of the operands.
module base_alu_tb;
  import alu_pkg::*;
  import alu_ref_pkg::*;

  logic        clk = 1'b0;
  logic        en;
  alu_func_e   func;
  logic [31:0] x, y, result;
  int checks = 0, failures = 0;

  base_alu dut (.en(en), .func(func), .input1(x), .input2(y), .result(result));

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] expect_of(alu_func_e f, logic [31:0] p, logic [31:0] q);
    int sp, sq;
    longint unsigned prod;
    sp = int'(p); sq = int'(q);
    prod = longint'(p) * longint'(q);
    case (f)
      AF_AND: return p & q;
      AF_OR:  return p | q;
      AF_NOT: return ~p;
      AF_XOR: return p ^ q;
      AF_NOR: return ~(p | q);
      AF_ADD: return p + q;
      AF_SUB: return p + ~q + 1;
      AF_MUL: return prod[31:0];
      AF_EQ:  return (p == q) ? 1 : 0;
      AF_NE:  return (p != q) ? 1 : 0;
      AF_GT:  return (sp > sq) ? 1 : 0;
      AF_GTU: return (p > q) ? 1 : 0;
      AF_LT:  return (sp < sq) ? 1 : 0;
      AF_LTU: return (p < q) ? 1 : 0;
      default: return 0;
    endcase
  endfunction

  task automatic apply(alu_func_e f, logic [31:0] p, logic [31:0] q);
    en = 1'b1; func = f; x = p; y = q;
    @(posedge clk); #1;
    check($sformatf("%s %h %h", f.name(), p, q), result, expect_of(f, p, q));
  endtask

  logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h7fff_ffff, 32'h8000_0000, 32'h1234_5678};

  initial begin
    en = 1'b0; func = AF_AND; x = '0; y = '0;
    for (int f = 0; f <= int'(AF_LTU); f++)
      foreach (corner[i]) foreach (corner[j])
        apply(alu_func_e'(f), corner[i], corner[j]);
    for (int n = 0; n < 3000; n++)
      apply(alu_func_e'($urandom_range(0, int'(AF_LTU))), $urandom, $urandom);
    // Unsigned compare of Hosm words equals the tree's prefix order.
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] av, bv, aw, bw;
      int al, bl, c;
      al = int'($urandom_range(0, 31));
      bl = int'($urandom_range(0, 31));
      av = $urandom;
      bv = ($urandom_range(0, 1) == 1) ? av : $urandom;   // often share bits
      aw = ref_cpr(av, 32'(al)); bw = ref_cpr(bv, 32'(bl));
      av = ref_vpr(aw); bv = ref_vpr(bw);
      c  = ref_def1_cmp(av, al, bv, bl);
      en = 1'b1; func = AF_GTU; x = aw; y = bw;
      @(posedge clk); #1;
      check($sformatf("order %h/%0d vs %h/%0d", av, al, bv, bl), result, (c > 0) ? 1 : 0);
    end
    en = 1'b0; func = AF_NOT; x = 32'h0; y = '0;
    @(posedge clk); #1;
    check("disabled NOT of gated zero", result, 32'hffff_ffff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
