// tb_cmp32_power_patterns: the 112-pattern average-case sequence used to
// judge the comparator's power, with a switching-activity count.
//
// 112 operand pairs are applied one after another. The deciding byte
// cycles through the four 8-bit sub-comparators, so that each decides 28
// times, 14 with A > B and 14 with B > A, alternating. Every result is
// checked against the integer comparison.
//
// Power in CMOS follows switching activity. The test counts bit toggles
// between consecutive patterns at two places: on the raw operand inputs,
// and on the bit pairs each 4-bit cell actually admits to its XOR stage
// (nine cells: two per sub-comparator and the second stage, including the
// nibble gate in front of each lower cell). It reports both and checks
// that shut-down kept the admitted activity below the raw activity of the
// 32 operand pairs plus the 4 flag pairs of the second stage.
module tb_cmp32_power_patterns
  import cmp_pkg::*;
;

  logic [31:0] a, b;
  cmp_result_t res;
  int unsigned checks = 0, failures = 0;
  longint unsigned raw_toggles = 0, admitted_toggles = 0;
  int unsigned n_a_big = 0, n_b_big = 0;

  cmp32 dut (.a(a), .b(b), .res(res));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // all bit pairs that reach an XOR stage, concatenated (9 cells x 8 bits)
  function automatic logic [71:0] admitted();
    return {dut.g_grp[3].u_cmp8.u_hi.a_g, dut.g_grp[3].u_cmp8.u_hi.b_g,
            dut.g_grp[3].u_cmp8.u_lo.a_g, dut.g_grp[3].u_cmp8.u_lo.b_g,
            dut.g_grp[2].u_cmp8.u_hi.a_g, dut.g_grp[2].u_cmp8.u_hi.b_g,
            dut.g_grp[2].u_cmp8.u_lo.a_g, dut.g_grp[2].u_cmp8.u_lo.b_g,
            dut.g_grp[1].u_cmp8.u_hi.a_g, dut.g_grp[1].u_cmp8.u_hi.b_g,
            dut.g_grp[1].u_cmp8.u_lo.a_g, dut.g_grp[1].u_cmp8.u_lo.b_g,
            dut.g_grp[0].u_cmp8.u_hi.a_g, dut.g_grp[0].u_cmp8.u_hi.b_g,
            dut.g_grp[0].u_cmp8.u_lo.a_g, dut.g_grp[0].u_cmp8.u_lo.b_g,
            dut.u_stage2.a_g, dut.u_stage2.b_g};
  endfunction

  // the same places before any shut-down: raw operands and raw byte flags
  function automatic logic [71:0] raw();
    return {a, b, dut.grp_a_big, dut.grp_b_big};
  endfunction

  initial begin
    logic [71:0] prev_adm, prev_raw;
    logic [31:0] va, vb, mask;
    int          pos;
    a = '0;
    b = '0;
    #1;
    prev_adm = admitted();
    prev_raw = raw();
    for (int n = 0; n < 112; n++) begin
      // byte n%4 decides; winner alternates on each visit of that byte
      pos  = 8 * (n % 4) + int'($urandom_range(7));
      va   = $urandom;
      vb   = $urandom;
      mask = (pos == 31) ? 32'h0 : (32'hFFFF_FFFF << (pos + 1));
      vb   = (va & mask) | (vb & ~mask);
      va[pos] = ~n[2];
      vb[pos] = n[2];
      a = va;
      b = vb;
      #1;
      checks++;
      if (res.a_big !== (a > b) || res.b_big !== (b > a) || res.equal !== (a == b)) begin
        failures++;
        $display("FAIL a=%h b=%h: a_big=%b b_big=%b equal=%b", a, b,
                 res.a_big, res.b_big, res.equal);
      end
      if (res.a_big) n_a_big++;
      if (res.b_big) n_b_big++;
      admitted_toggles += longint'($countones(admitted() ^ prev_adm));
      raw_toggles      += longint'($countones(raw() ^ prev_raw));
      prev_adm = admitted();
      prev_raw = raw();
    end
    $display("patterns: 112, A>B: %0d, B>A: %0d", n_a_big, n_b_big);
    $display("toggles on raw inputs: %0d, on admitted inputs: %0d", raw_toggles, admitted_toggles);
    checks++;
    if (n_a_big != 56 || n_b_big != 56) failures++;
    checks++;
    if (admitted_toggles >= raw_toggles) begin
      failures++;
      $display("FAIL shut-down did not reduce switching activity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
