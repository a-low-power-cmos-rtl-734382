// tb_cmp4_fs: exhaustive self-checking test of the feedback-selection part.
//
// All 256 pairs of admitted nibbles are applied. Uneq must be the bitwise
// difference, and sel must be one-hot on the most significant differing
// bit (found by a scan from bit 3 downwards), or zero when the nibbles are
// equal.
module tb_cmp4_fs;

  logic [3:0] a_g, b_g, uneq, sel;
  int unsigned checks = 0, failures = 0;

  cmp4_fs dut (.a_g(a_g), .b_g(b_g), .uneq(uneq), .sel(sel));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_sel;
    for (int k = 0; k < 256; k++) begin
      {a_g, b_g} = 8'(k);
      #1;
      exp_sel = '0;
      for (int i = 3; i >= 0; i--)
        if (a_g[i] != b_g[i]) begin
          exp_sel[i] = 1'b1;
          break;
        end
      checks++;
      if (uneq !== (a_g ^ b_g)) begin
        failures++;
        $display("FAIL uneq a=%b b=%b got %b", a_g, b_g, uneq);
      end
      checks++;
      if (sel !== exp_sel) begin
        failures++;
        $display("FAIL sel a=%b b=%b got %b expected %b", a_g, b_g, sel, exp_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
