// Testbench for sort_cmp_lower: exhaustive over 4-bit tags and both values of
// swp; the tags must pass straight through without swp and cross with it.
module sort_cmp_lower_tb;
  logic swp;
  logic [3:0] c, d, yc, yd;
  int checks = 0, failures = 0;
  sort_cmp_lower #(.TAGW(4)) dut (.*);
  initial begin
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          swp = s[0]; c = 4'(i); d = 4'(j);
          #1;
          checks++;
          if (int'(yc) != (s ? j : i) || int'(yd) != (s ? i : j)) begin
            failures++;
            $display("FAIL swp=%0d c=%0d d=%0d", s, i, j);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
