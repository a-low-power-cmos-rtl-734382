// tb_cmp32: end-to-end self-checking test of the 32-bit comparator, run
// with the top at its default parameters.
//
// Three phases, every result checked against the integer comparison of the
// operands:
//   1. directed cases: equal operands, extremes, and a single differing bit
//      at each of the 32 positions in both directions;
//   2. a 112-pattern sequence in which each of the four 8-bit
//      sub-comparators decides 28 times, alternating A > B and B > A
//      (14 of each);
//   3. 20000 random pairs whose first differing bit is drawn uniformly from
//      the 32 positions, with random bits below it.
// For every pair the shut-down is also checked inside the design: the
// second-stage cell must see the flags of bytes below the deciding byte as
// 0, and each 8-bit sub-comparator whose upper nibbles differ must feed
// zeros to its lower cell. The test counts how often each mechanism
// happened (decision in each byte, lower nibble shut down, decision in a
// lower nibble, A > B, B > A, equal) and fails for any that never did.
module tb_cmp32
  import cmp_pkg::*;
;

  logic [31:0] a, b;
  cmp_result_t res;
  int unsigned checks = 0, failures = 0;
  int unsigned n_byte [4];
  int unsigned n_lo_shut = 0, n_lo_decide = 0;
  int unsigned n_a_big = 0, n_b_big = 0, n_equal = 0;

  cmp32 dut (.a(a), .b(b), .res(res));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // most significant differing bit position, -1 when a == b
  function automatic int first_diff(logic [31:0] x, logic [31:0] y);
    for (int i = 31; i >= 0; i--)
      if (x[i] != y[i]) return i;
    return -1;
  endfunction

  // checks one 8-bit sub-comparator's lower-nibble shut-down
  task automatic check_byte_shutdown(int g, logic [3:0] lo_a, logic [3:0] lo_b);
    logic [7:0] xa, xb;
    xa = a[8*g +: 8];
    xb = b[8*g +: 8];
    checks++;
    if (xa[7:4] != xb[7:4]) begin
      if (lo_a !== 4'h0 || lo_b !== 4'h0) begin
        failures++;
        $display("FAIL byte %0d lower nibble not shut down: a=%h b=%h", g, a, b);
      end
    end else if (lo_a !== xa[3:0] || lo_b !== xb[3:0]) begin
      failures++;
      $display("FAIL byte %0d lower nibble wrongly held: a=%h b=%h", g, a, b);
    end
  endtask

  task automatic apply(logic [31:0] va, logic [31:0] vb);
    int         top, grp;
    logic [3:0] keep;
    a = va;
    b = vb;
    #1;
    checks++;
    if (res.a_big !== (a > b) || res.b_big !== (b > a) || res.equal !== (a == b)) begin
      failures++;
      if (failures < 20)
        $display("FAIL a=%h b=%h: a_big=%b b_big=%b equal=%b", a, b,
                 res.a_big, res.b_big, res.equal);
    end
    top = first_diff(a, b);
    grp = (top < 0) ? -1 : top / 8;
    // second stage: byte flags below the deciding byte are shut out
    keep = (grp < 0) ? 4'hF : ~((4'(1) << grp) - 4'(1));
    checks++;
    if ((dut.u_stage2.a_g & ~keep) !== 4'h0 || (dut.u_stage2.b_g & ~keep) !== 4'h0) begin
      failures++;
      $display("FAIL second-stage shut-down a=%h b=%h", a, b);
    end
    check_byte_shutdown(0, dut.g_grp[0].u_cmp8.a_lo, dut.g_grp[0].u_cmp8.b_lo);
    check_byte_shutdown(1, dut.g_grp[1].u_cmp8.a_lo, dut.g_grp[1].u_cmp8.b_lo);
    check_byte_shutdown(2, dut.g_grp[2].u_cmp8.a_lo, dut.g_grp[2].u_cmp8.b_lo);
    check_byte_shutdown(3, dut.g_grp[3].u_cmp8.a_lo, dut.g_grp[3].u_cmp8.b_lo);
    if (top < 0) n_equal++;
    else begin
      n_byte[grp]++;
      if (top % 8 >= 4) n_lo_shut++;
      else              n_lo_decide++;
      if (a > b) n_a_big++;
      else       n_b_big++;
    end
  endtask

  // a pair whose first difference is at bit pos, A larger when a_wins
  task automatic apply_diff_at(int pos, bit a_wins);
    logic [31:0] va, vb, mask;
    va   = $urandom;
    vb   = $urandom;
    mask = (pos == 31) ? 32'h0 : (32'hFFFF_FFFF << (pos + 1));
    vb   = (va & mask) | (vb & ~mask);   // equal above pos
    va[pos] = a_wins;
    vb[pos] = ~a_wins;
    apply(va, vb);
  endtask

  initial begin
    foreach (n_byte[i]) n_byte[i] = 0;

    // phase 1: directed
    apply(32'h0, 32'h0);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    apply(32'hFFFF_FFFF, 32'h0);
    apply(32'h0, 32'hFFFF_FFFF);
    apply(32'h8000_0000, 32'h7FFF_FFFF);
    apply(32'h0000_0001, 32'h0000_0000);
    for (int i = 0; i < 32; i++) begin
      apply(32'(1) << i, 32'h0);
      apply(32'h0, 32'(1) << i);
      apply(32'hDEAD_BEEF ^ (32'(1) << i), 32'hDEAD_BEEF);
    end

    // phase 2: 112 patterns, 28 decided by each byte, alternating winner
    for (int n = 0; n < 112; n++)
      apply_diff_at(8 * (n % 4) + int'($urandom_range(7)), n[2]);

    // phase 3: random first-difference position
    for (int n = 0; n < 20000; n++) begin
      if (n % 64 == 0) begin
        a = $urandom;
        apply(a, a);
      end else
        apply_diff_at(int'($urandom_range(31)), 1'($urandom));
    end

    for (int g = 0; g < 4; g++) begin
      $display("decisions made by byte %0d: %0d", g, n_byte[g]);
      checks++;
      if (n_byte[g] == 0) failures++;
    end
    $display("lower nibble shut down: %0d, decided in lower nibble: %0d", n_lo_shut, n_lo_decide);
    $display("A>B: %0d, B>A: %0d, equal: %0d", n_a_big, n_b_big, n_equal);
    checks++;
    if (n_lo_shut == 0 || n_lo_decide == 0 || n_a_big == 0 || n_b_big == 0 || n_equal == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
