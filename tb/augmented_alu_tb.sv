// End-to-end testbench for augmented_alu at its default width (32 bits).
//
// Part 1 applies random operands to every one of the 32 operation codes and
// checks result and branch against reference models (unassigned codes must
// give zero). Part 2 runs a software-style longest-prefix-match lookup in
// which every computation goes through the ALU: prefixes are converted with
// cpr, kept sorted by unsigned comparison of their Hosm words (the tree's
// prefix order), the address's place in the sorted bucket is found with LTU,
// each element is tested with mpr (branch), the winner's length comes from
// lpr and its next hop is extracted from the element's info word with ebia.
// The next hop is checked against a plain longest-match search. Part 3
// parses random IPv4 headers with ebia, ebis and cbit. The ALU is
// combinational, so every result is checked in the cycle its operands are
// applied (one operation per cycle). Each mechanism (each unit, taken and
// untaken mpr branch, cpr length clamp, unassigned code, lookup hit and miss)
// is counted, and one that never happened counts as a failure.
module augmented_alu_tb;
  import alu_pkg::*;
  import alu_ref_pkg::*;

  localparam int NPREF = 48;     // prefixes in the lookup bucket
  localparam int NLOOK = 400;    // lookups
  localparam int NHDR  = 300;    // parsed headers

  logic        clk = 1'b0;
  alu_op_e     op;
  logic [31:0] in1, in2, result;
  logic        branch;
  int checks = 0, failures = 0;
  int cycles = 0;

  // mechanism counters
  int n_alu = 0, n_prefix = 0, n_parse = 0, n_undef = 0;
  int n_taken = 0, n_untaken = 0, n_clamp = 0, n_hit = 0, n_miss = 0;

  augmented_alu dut (.op(op), .input1(in1), .input2(in2), .result(result), .branch(branch));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One ALU operation in one cycle; returns the result and the branch flag.
  task automatic exec(alu_op_e o, logic [31:0] p, logic [31:0] q,
                      output logic [31:0] r, output logic br);
    int c0;
    c0 = cycles;
    op = o; in1 = p; in2 = q;
    @(posedge clk); #1;
    r = result; br = branch;
    checks++;
    if (cycles - c0 != 1) begin
      failures++;
      $display("FAIL operation took %0d cycles", cycles - c0);
    end
    if (int'(o) <= 13) n_alu++;
    else if (int'(o) >= 16 && int'(o) <= 18) n_parse++;
    else if (int'(o) >= 24 && int'(o) <= 27) n_prefix++;
    else n_undef++;
    if (o == OP_MPR) begin
      if (br) n_taken++; else n_untaken++;
    end
    if (o == OP_CPR && q > 31) n_clamp++;
  endtask

  function automatic logic [31:0] model(int code, logic [31:0] p, logic [31:0] q);
    longint unsigned prod;
    prod = longint'(p) * longint'(q);
    case (code)
      0:  return p & q;
      1:  return p | q;
      2:  return ~p;
      3:  return p ^ q;
      4:  return ~(p | q);
      5:  return p + q;
      6:  return p - q;
      7:  return prod[31:0];
      8:  return 32'(p == q);
      9:  return 32'(p != q);
      10: return 32'($signed(p) > $signed(q));
      11: return 32'(p > q);
      12: return 32'($signed(p) < $signed(q));
      13: return 32'(p < q);
      16: return ref_ebis(p, int'(q[4:0]), int'(q[10:5]));
      17: return ref_ebia(p, int'(q[4:0]), int'(q[10:5]));
      18: return 32'(p[q[4:0]]);
      24: return ref_cpr(p, q);
      25: return ref_vpr(p);
      26: return 32'(ref_lpr(p));
      27: return 32'(ref_mpr(p, q));
      default: return 32'h0;
    endcase
  endfunction

  // routing bucket
  logic [31:0] pv   [NPREF];   // zero-filled values
  int          pl   [NPREF];   // lengths
  logic [7:0]  nh   [NPREF];   // next hops
  logic [31:0] hosm [NPREF];   // Hosm words, sorted
  logic [31:0] info [NPREF];   // info words: next hop in bits 15:8

  function automatic logic [31:0] imm_sl(int s, int l);
    return {21'b0, 6'(l), 5'(s)};
  endfunction

  initial begin
    logic [31:0] r, r2;
    logic        br;
    op = OP_AND; in1 = '0; in2 = '0;

    // ---------------- Part 1: every code, random operands
    for (int n = 0; n < 6000; n++) begin
      int code;
      logic [31:0] p, q;
      code = int'($urandom_range(0, 31));
      p = $urandom;
      q = $urandom;
      if (code == 24 && n % 2 == 0) q = q & 32'h1f;        // mostly legal lengths
      if (code == 27 && n % 2 == 0) begin                  // a matching address
        int L;
        L = ref_lpr(p);
        for (int i = 0; i < L; i++) q[31-i] = p[31-i];
      end
      exec(alu_op_e'(code), p, q, r, br);
      check($sformatf("code %0d %h %h", code, p, q), r, model(code, p, q));
      check($sformatf("branch code %0d", code), {31'b0, br},
            {31'b0, (code == 27) && ref_mpr(p, q)});
    end

    // ---------------- Part 2: longest-prefix-match lookup through the ALU
    for (int i = 0; i < NPREF; i++) begin
      // a third of the prefixes extend an earlier one, so matches nest
      if (i > 0 && i % 3 == 0) begin
        int j;
        j = int'($urandom_range(0, i - 1));
        pl[i] = (pl[j] < 31) ? int'($urandom_range(pl[j] + 1, 31)) : 31;
        pv[i] = $urandom;
        for (int b = 0; b < pl[j]; b++) pv[i][31-b] = pv[j][31-b];
      end else begin
        pl[i] = int'($urandom_range(1, 24));
        pv[i] = $urandom;
      end
      for (int b = 0; b < 32 - pl[i]; b++) pv[i][b] = 1'b0;
      nh[i] = 8'(i + 1);
      exec(OP_CPR, pv[i], 32'(pl[i]), r, br);
      check("cpr table", r, ref_cpr(pv[i], 32'(pl[i])));
      hosm[i] = r;
      info[i] = {16'($urandom), nh[i], 8'h5a};
    end
    // also exercise the length clamp on the way in
    exec(OP_CPR, 32'hffff_ffff, 32'd32, r, br);
    check("cpr clamp", r, 32'hffff_fffe);
    // insertion sort of the bucket, using the ALU's unsigned compare
    for (int i = 1; i < NPREF; i++) begin
      int j;
      logic [31:0] kh, ki;
      kh = hosm[i]; ki = info[i];
      j = i - 1;
      while (j >= 0) begin
        exec(OP_GTU, hosm[j], kh, r, br);
        if (r == 0) break;
        hosm[j+1] = hosm[j]; info[j+1] = info[j];
        j--;
      end
      hosm[j+1] = kh; info[j+1] = ki;
    end
    for (int i = 1; i < NPREF; i++) begin
      checks++;
      if (!(hosm[i-1] < hosm[i] ||
            ref_def1_cmp(ref_vpr(hosm[i-1]), ref_lpr(hosm[i-1]),
                         ref_vpr(hosm[i]),   ref_lpr(hosm[i])) <= 0)) begin
        failures++;
        $display("FAIL bucket not in prefix order at %0d", i);
      end
    end

    for (int n = 0; n < NLOOK; n++) begin
      logic [31:0] ip;
      int place, exp_place, best_len, exp_len, best_i;
      logic [7:0] got_nh, exp_nh;
      logic [31:0] best_len_w;
      // half the addresses are drawn from a table prefix
      ip = $urandom;
      if (n % 2 == 0) begin
        int k;
        k = int'($urandom_range(0, NPREF - 1));
        for (int b = 0; b < pl[k]; b++) ip[31-b] = pv[k][31-b];
      end
      // reference: plain longest match over the unsorted table
      exp_len = -1; exp_nh = 8'h0;
      for (int k = 0; k < NPREF; k++) begin
        bit m;
        m = 1'b1;
        for (int b = 0; b < pl[k]; b++) if (pv[k][31-b] != ip[31-b]) m = 1'b0;
        if (m && pl[k] > exp_len) begin exp_len = pl[k]; exp_nh = nh[k]; end
      end
      exp_place = 0;
      for (int k = 0; k < NPREF; k++) if (hosm[k] < ip) exp_place++;
      // finding place: count elements below the address
      place = 0;
      for (int k = 0; k < NPREF; k++) begin
        exec(OP_LTU, hosm[k], ip, r, br);
        if (r[0]) place++;
      end
      check("place", 32'(place), 32'(exp_place));
      // matching: mpr, lpr, compare lengths, extract next hop
      best_len_w = 32'hffff_ffff; best_i = -1;
      for (int k = 0; k < NPREF; k++) begin
        exec(OP_MPR, hosm[k], ip, r, br);
        if (br) begin
          exec(OP_LPR, hosm[k], 32'h0, r, br);
          exec(OP_GT, r, best_len_w, r2, br);    // signed: -1 means none yet
          if (r2[0]) begin best_len_w = r; best_i = k; end
        end
      end
      got_nh = 8'h0;
      if (best_i >= 0) begin
        exec(OP_EBIA, info[best_i], imm_sl(8, 8), r, br);
        got_nh = r[7:0];
        check("ebia next hop upper bits", r & 32'hffff_ff00, 32'h0);
        n_hit++;
      end else begin
        n_miss++;
      end
      best_len = (best_i >= 0) ? int'(best_len_w) : -1;
      check($sformatf("lpm length for %h", ip), 32'(best_len), 32'(exp_len));
      check($sformatf("lpm next hop for %h", ip), {24'h0, got_nh}, {24'h0, exp_nh});
    end

    // ---------------- Part 3: IPv4 header parsing
    for (int n = 0; n < NHDR; n++) begin
      logic [3:0]  ver, ihl;
      logic [5:0]  dscp;
      logic [15:0] tlen, ident;
      logic        df, mf;
      logic [12:0] foff;
      logic [7:0]  ttl, proto;
      logic [31:0] w0, w1, w2;
      ver = 4'd4; ihl = 4'($urandom_range(5, 15)); dscp = 6'($urandom); tlen = 16'($urandom);
      ident = 16'($urandom); df = 1'($urandom); mf = 1'($urandom); foff = 13'($urandom);
      ttl = 8'($urandom); proto = 8'($urandom);
      w0 = {ver, ihl, dscp, 2'b00, tlen};
      w1 = {ident, 1'b0, df, mf, foff};
      w2 = {ttl, proto, 16'($urandom)};
      exec(OP_EBIA, w0, imm_sl(28, 4), r, br);  check("version", r, 32'(ver));
      exec(OP_EBIA, w0, imm_sl(24, 4), r, br);  check("ihl", r, 32'(ihl));
      exec(OP_EBIA, w0, imm_sl(18, 6), r, br);  check("dscp", r, 32'(dscp));
      exec(OP_EBIS, w0, imm_sl(0, 16), r, br);  check("total length", r, 32'(tlen));
      exec(OP_EBIA, w1, imm_sl(16, 16), r, br); check("ident", r, 32'(ident));
      exec(OP_CBIT, w1, 32'd14, r, br);         check("df", r, 32'(df));
      exec(OP_CBIT, w1, 32'd13, r, br);         check("mf", r, 32'(mf));
      exec(OP_EBIS, w1, imm_sl(0, 13), r, br);  check("fragment offset", r, 32'(foff));
      exec(OP_EBIA, w2, imm_sl(24, 8), r, br);  check("ttl", r, 32'(ttl));
      exec(OP_EBIA, w2, imm_sl(16, 8), r, br);  check("protocol", r, 32'(proto));
    end

    // ---------------- mechanism coverage
    begin
      static string names [9] = '{"alu unit", "prefix unit", "parse unit", "unassigned code",
                           "mpr taken", "mpr not taken", "cpr length clamp",
                           "lookup hit", "lookup miss"};
      int counts [9];
      counts = '{n_alu, n_prefix, n_parse, n_undef, n_taken, n_untaken, n_clamp, n_hit, n_miss};
      for (int i = 0; i < 9; i++) begin
        $display("mechanism %-18s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", names[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
