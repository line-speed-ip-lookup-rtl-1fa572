// Self-checking testbench for parse_unit.
//
// Drives ebis, ebia and cbit with directed corner cases (empty field, full
// word, field running off the top, every bit for cbit) and random operands,
// and checks each result against the bit-by-bit reference model. Also checks
// that a disabled unit outputs zero. The unit is combinational: each result
// is checked in the same cycle its operands are applied.
module parse_unit_tb;
  import alu_pkg::*;
  import alu_ref_pkg::*;

  logic        clk = 1'b0;
  logic        en;
  parse_func_e func;
  logic [31:0] a, imm, result;
  int checks = 0, failures = 0;

  parse_unit dut (.en(en), .func(func), .a(a), .imm(imm), .result(result));

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic apply(parse_func_e f, logic [31:0] av, int s, int l);
    en   = 1'b1;
    func = f;
    a    = av;
    imm  = {21'b0, 6'(l), 5'(s)};
    @(posedge clk); #1;
    case (f)
      XF_EBIS: check($sformatf("ebis %h s=%0d l=%0d", av, s, l), result, ref_ebis(av, s, l));
      XF_EBIA: check($sformatf("ebia %h s=%0d l=%0d", av, s, l), result, ref_ebia(av, s, l));
      default: check($sformatf("cbit %h b=%0d", av, s), result, {31'b0, av[s]});
    endcase
  endtask

  initial begin
    en = 1'b0; func = XF_EBIS; a = '0; imm = '0;
    // IPv4 header word 0: version 4, IHL 5, DSCP/TOS 0xb8, total length 1500
    apply(XF_EBIA, 32'h45b8_05dc, 28, 4);
    check("version field", result, 32'd4);
    apply(XF_EBIA, 32'h45b8_05dc, 24, 4);
    check("ihl field", result, 32'd5);
    apply(XF_EBIA, 32'h45b8_05dc, 18, 6);
    check("dscp field", result, 32'd46);
    apply(XF_EBIS, 32'h45b8_05dc, 0, 16);
    check("length in place", result, 32'h0000_05dc);
    apply(XF_EBIS, 32'hffff_ffff, 0, 32);
    apply(XF_EBIS, 32'hffff_ffff, 7, 0);
    apply(XF_EBIA, 32'hdead_beef, 20, 32);
    apply(XF_EBIA, 32'hdead_beef, 31, 1);
    for (int b = 0; b < 32; b++) apply(XF_CBIT, 32'ha5c3_0f96, b, 0);
    for (int n = 0; n < 2000; n++) begin
      int s, l;
      s = int'($urandom_range(0, 31));
      l = int'($urandom_range(0, 32));
      apply(parse_func_e'($urandom_range(0, 2)), $urandom, s, l);
    end
    // disabled unit: operands gated, result zero
    en = 1'b0; func = XF_EBIS; a = 32'hffff_ffff; imm = {21'b0, 6'd32, 5'd0};
    @(posedge clk); #1;
    check("disabled", result, 32'h0);
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
