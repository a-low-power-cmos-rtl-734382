// tb_cmp4_mux: exhaustive self-checking test of the MUX part.
//
// Every nibble pair is applied with every select vector (4096 cases).
// a_big must be 1 exactly when some selected position holds a 1 in A, and
// likewise b_big for B; the expectation is computed with a loop over the
// positions.
module tb_cmp4_mux;

  logic [3:0] a_g, b_g, sel;
  logic       a_big, b_big;
  int unsigned checks = 0, failures = 0;

  cmp4_mux dut (.a_g(a_g), .b_g(b_g), .sel(sel), .a_big(a_big), .b_big(b_big));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_a, exp_b;
    for (int k = 0; k < 4096; k++) begin
      {sel, a_g, b_g} = 12'(k);
      #1;
      exp_a = 1'b0;
      exp_b = 1'b0;
      for (int i = 0; i < 4; i++) begin
        if (sel[i] && a_g[i]) exp_a = 1'b1;
        if (sel[i] && b_g[i]) exp_b = 1'b1;
      end
      checks++;
      if (a_big !== exp_a || b_big !== exp_b) begin
        failures++;
        if (failures < 10)
          $display("FAIL sel=%b a=%b b=%b: got %b%b expected %b%b",
                   sel, a_g, b_g, a_big, b_big, exp_a, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
