// tb_cmp4_psd: exhaustive self-checking test of the priority-shut-down part.
//
// Every combination of the two nibbles and of the Uneq feedback (4096
// cases) is applied. The expected admitted nibbles are rebuilt bit by bit
// from the rule "pair i passes only if no higher Uneq flag is set", and
// EQUAL from "no Uneq flag set". A watchdog ends the run if it stalls.
module tb_cmp4_psd;

  logic [3:0] a, b, uneq, a_g, b_g;
  logic       equal;
  int unsigned checks = 0, failures = 0;

  cmp4_psd dut (.a(a), .b(b), .uneq(uneq), .a_g(a_g), .b_g(b_g), .equal(equal));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_a, exp_b;
    logic       blocked;
    for (int k = 0; k < 4096; k++) begin
      {uneq, a, b} = 12'(k);
      #1;
      blocked = 1'b0;
      for (int i = 3; i >= 0; i--) begin
        exp_a[i] = blocked ? 1'b0 : a[i];
        exp_b[i] = blocked ? 1'b0 : b[i];
        if (uneq[i]) blocked = 1'b1;
      end
      checks++;
      if (a_g !== exp_a || b_g !== exp_b || equal !== (uneq == 4'b0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%b b=%b uneq=%b: a_g=%b b_g=%b eq=%b, expected %b %b %b",
                   a, b, uneq, a_g, b_g, equal, exp_a, exp_b, uneq == 4'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
