// tb_seg7_decoder: all sixteen digits.
// The expected pattern of each digit is built from the list of segments
// (a..g) that the digit lights, written out independently as strings.
module tb_seg7_decoder;
  logic [3:0] digit;
  logic [6:0] seg;
  int checks = 0, failures = 0;
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  seg7_decoder dut (.*);

  initial begin
    for (int d = 0; d < 16; d++) begin
      logic [6:0] exp;
      exp = '1;
      foreach (lit[d][i]) exp[lit[d][i] - "a"] = 1'b0;
      digit = 4'(d); #1;
      checks++;
      if (seg !== exp) begin
        failures++;
        $display("FAIL digit %h: got %b exp %b", d, seg, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
