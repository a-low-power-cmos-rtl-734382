// tb_cmp8: exhaustive self-checking test of the 8-bit sub-comparator.
//
// All 65536 operand pairs are applied and the result flags are checked
// against the integer comparison. When the upper nibbles differ, the lower
// cell must receive all-zero operands (shut down); when they match, it
// must receive the real lower nibbles. The test counts decisions made by
// the upper cell, by the lower cell and equal results, and fails if any
// of them never happened.
module tb_cmp8
  import cmp_pkg::*;
;

  logic [7:0]  a, b;
  cmp_result_t res;
  int unsigned checks = 0, failures = 0;
  int unsigned n_upper = 0, n_lower = 0, n_equal = 0;

  cmp8 dut (.a(a), .b(b), .res(res));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic shut;
    for (int k = 0; k < 65536; k++) begin
      {a, b} = 16'(k);
      #1;
      checks++;
      if (res.a_big !== (a > b) || res.b_big !== (b > a) || res.equal !== (a == b)) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%0d b=%0d: a_big=%b b_big=%b equal=%b", a, b,
                   res.a_big, res.b_big, res.equal);
      end
      shut = (a[7:4] != b[7:4]);
      checks++;
      if (shut ? (dut.a_lo !== 4'h0 || dut.b_lo !== 4'h0)
               : (dut.a_lo !== a[3:0] || dut.b_lo !== b[3:0])) begin
        failures++;
        if (failures < 10)
          $display("FAIL shut-down a=%h b=%h: lower cell sees %h %h", a, b, dut.a_lo, dut.b_lo);
      end
      if (shut)        n_upper++;
      else if (a != b) n_lower++;
      else             n_equal++;
    end
    $display("upper-nibble decisions (lower shut down): %0d", n_upper);
    $display("lower-nibble decisions: %0d, equal: %0d", n_lower, n_equal);
    checks++;
    if (n_upper == 0 || n_lower == 0 || n_equal == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
