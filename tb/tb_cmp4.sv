// tb_cmp4: exhaustive self-checking test of the 4-bit comparator cell.
//
// All 256 operand pairs are applied. The result flags are checked against
// the integer comparison of the operands. The shut-down is checked too:
// every bit pair below the most significant differing pair must reach the
// feedback-selection part as 0 (observed on the cell's internal admitted
// nibbles). The test counts how often the decision came from each bit
// position and fails if any position never decided.
module tb_cmp4
  import cmp_pkg::*;
;

  logic [3:0]  a, b;
  cmp_result_t res;
  int unsigned checks = 0, failures = 0;
  int unsigned decided_at [4];
  int unsigned n_equal = 0;

  cmp4 dut (.a(a), .b(b), .res(res));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int         top;
    logic [3:0] keep;
    foreach (decided_at[i]) decided_at[i] = 0;
    for (int k = 0; k < 256; k++) begin
      {a, b} = 8'(k);
      #1;
      checks++;
      if (res.a_big !== (a > b) || res.b_big !== (b > a) || res.equal !== (a == b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d: a_big=%b b_big=%b equal=%b", a, b,
                 res.a_big, res.b_big, res.equal);
      end
      // position of the most significant differing bit, -1 if none
      top = -1;
      for (int i = 3; i >= 0; i--)
        if (a[i] != b[i]) begin
          top = i;
          break;
        end
      if (top < 0) n_equal++;
      else         decided_at[top]++;
      // bits at and above the deciding pair pass, lower ones are held at 0
      keep = (top < 0) ? 4'hF : ~((4'(1) << top) - 4'(1));
      checks++;
      if (dut.a_g !== (a & keep) || dut.b_g !== (b & keep)) begin
        failures++;
        $display("FAIL shut-down a=%b b=%b: admitted %b %b", a, b, dut.a_g, dut.b_g);
      end
    end
    for (int i = 0; i < 4; i++) begin
      $display("decisions at bit %0d: %0d", i, decided_at[i]);
      checks++;
      if (decided_at[i] == 0) failures++;
    end
    $display("equal results: %0d", n_equal);
    checks++;
    if (n_equal != 16) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
