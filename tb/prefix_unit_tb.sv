// Self-checking testbench for prefix_unit.
//
// Checks cpr, vpr and lpr on every prefix length and on random values, the
// worked example 1101* from the format's definition, mpr against a bitwise
// reference on random addresses that do and do not share the prefix, the
// length clamp of cpr, the all-ones word and the match output. The unit is
// combinational: each result is checked in the cycle its operands are applied.
module prefix_unit_tb;
  import alu_pkg::*;
  import alu_ref_pkg::*;

  logic         clk = 1'b0;
  logic         en;
  prefix_func_e func;
  logic [31:0]  a, b, result;
  logic         match;
  int checks = 0, failures = 0;
  int n_match = 0, n_miss = 0;

  prefix_unit dut (.en(en), .func(func), .a(a), .b(b), .result(result), .match(match));

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic apply(prefix_func_e f, logic [31:0] av, logic [31:0] bv);
    en = 1'b1; func = f; a = av; b = bv;
    @(posedge clk); #1;
  endtask

  // Address that shares the top L bits of the Hosm word w.
  function automatic logic [31:0] matching_ip(logic [31:0] w, int L);
    logic [31:0] ip;
    ip = $urandom;
    for (int i = 0; i < L; i++) ip[31-i] = w[31-i];
    return ip;
  endfunction

  task automatic check_mpr(logic [31:0] w, logic [31:0] ip);
    bit exp;
    exp = ref_mpr(w, ip);
    apply(PF_MPR, w, ip);
    check($sformatf("mpr %h %h", w, ip), result, {31'b0, exp});
    check($sformatf("match %h %h", w, ip), {31'b0, match}, {31'b0, exp});
    if (exp) n_match++; else n_miss++;
  endtask

  initial begin
    en = 1'b0; func = PF_CPR; a = '0; b = '0;
    // 1101* has length 4 and Hosm word 1101_0111_..._1
    apply(PF_CPR, 32'hd000_0000, 32'd4);
    check("cpr 1101*", result, 32'hd7ff_ffff);
    apply(PF_LPR, 32'hd7ff_ffff, 32'd0);
    check("lpr 1101*", result, 32'd4);
    apply(PF_VPR, 32'hd7ff_ffff, 32'd0);
    check("vpr 1101*", result, 32'hd000_0000);
    check_mpr(32'hd7ff_ffff, 32'hd123_4567);
    check_mpr(32'hd7ff_ffff, 32'hc123_4567);
    // length clamp and the all-ones word
    apply(PF_CPR, 32'hffff_ffff, 32'd40);
    check("cpr clamp", result, ref_cpr(32'hffff_ffff, 32'd40));
    apply(PF_LPR, 32'hffff_ffff, 32'd0);
    check("lpr all ones", result, 32'd0);
    check_mpr(32'hffff_ffff, 32'h1234_5678);
    // every length, random values
    for (int L = 0; L < 32; L++) begin
      for (int k = 0; k < 40; k++) begin
        logic [31:0] v, w;
        v = $urandom;
        apply(PF_CPR, v, 32'(L));
        w = ref_cpr(v, 32'(L));
        check($sformatf("cpr %h %0d", v, L), result, w);
        apply(PF_LPR, w, $urandom);
        check($sformatf("lpr %h", w), result, 32'(L));
        apply(PF_VPR, w, $urandom);
        check($sformatf("vpr %h", w), result, ref_vpr(w));
        check_mpr(w, matching_ip(w, L));
        check_mpr(w, $urandom);
        if (L > 0) check_mpr(w, matching_ip(w, L) ^ (32'h1 << (32 - $urandom_range(1, L))));
      end
    end
    // random words on every function
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] w, x;
      w = $urandom; x = $urandom;
      apply(PF_LPR, w, x);
      check("lpr rnd", result, 32'(ref_lpr(w)));
      apply(PF_VPR, w, x);
      check("vpr rnd", result, ref_vpr(w));
      apply(PF_CPR, w, {27'b0, x[4:0]});
      check("cpr rnd", result, ref_cpr(w, {27'b0, x[4:0]}));
    end
    // disabled: zero result, no match
    en = 1'b0; func = PF_MPR; a = 32'h7fff_ffff; b = 32'h0;
    @(posedge clk); #1;
    check("disabled result", result, 32'h0);
    check("disabled match", {31'b0, match}, 32'h0);
    checks++;
    if (n_match == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL mpr outcomes not both seen: match=%0d miss=%0d", n_match, n_miss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
