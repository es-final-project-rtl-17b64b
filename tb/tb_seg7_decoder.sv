// tb_seg7_decoder: checks the segment pattern of every code against a
// table written as lists of lit segment letters.
module tb_seg7_decoder;
  logic [3:0] code;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abefg", "def", "bcdfg", "bcefg", "bcdeg", "g"};

  seg7_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      logic [6:0] exp;
      exp = '1;
      foreach (lit[c][i]) exp[lit[c][i] - "a"] = 1'b0;   // active low
      code = 4'(c);
      #10;
      checks++;
      if (seg_n !== exp) begin
        failures++;
        $display("FAIL code %h: got %b expected %b", c, seg_n, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
