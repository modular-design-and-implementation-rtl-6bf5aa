// Testbench for sort_cmp_upper: exhaustive over 6-bit keys for both sort
// directions; checks swp, and that the outputs are the inputs in the required
// order with equal keys left in place.
module sort_cmp_upper_tb;
  logic [5:0] a, b;
  logic swp_d, swp_a;
  logic [5:0] ya_d, yb_d, ya_a, yb_a;
  int checks = 0, failures = 0;
  sort_cmp_upper #(.KW(6), .DESCENDING(1'b1)) dut_d (.a, .b, .swp(swp_d), .ya(ya_d), .yb(yb_d));
  sort_cmp_upper #(.KW(6), .DESCENDING(1'b0)) dut_a (.a, .b, .swp(swp_a), .ya(ya_a), .yb(yb_a));
  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a = 6'(i); b = 6'(j);
        #1;
        checks++;
        if (swp_d != (i < j) || int'(ya_d) != ((i < j) ? j : i) || int'(yb_d) != ((i < j) ? i : j) ||
            swp_a != (i > j) || int'(ya_a) != ((i > j) ? j : i) || int'(yb_a) != ((i > j) ? i : j)) begin
          failures++;
          $display("FAIL a=%0d b=%0d", i, j);
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
