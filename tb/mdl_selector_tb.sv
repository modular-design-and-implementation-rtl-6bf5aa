// Testbench for mdl_selector: feeds sequences of ln(res_k), k = 1..16 (random,
// decreasing-then-flat shapes like a real sparse channel, and linear slopes
// close to the penalty slope), and checks every MDL(k) = 32 ln + 1.5 ln(32) k and K_hat =
// first arg min against values computed here. Also checks that done comes at
// most L + 4 cycles after the last input.
module mdl_selector_tb;
  import tsml_pkg::*;
  localparam int NK = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, in_valid = 1'b0;
  logic signed [LNW-1:0] in_ln = '0;
  logic done, sort_busy;
  logic [4:0] k_hat;
  logic signed [MW-1:0] mdl [NK];
  int checks = 0, failures = 0;

  mdl_selector #(.NK(NK), .SHIFT(5)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint pen;
    pen = longint'($rtoi(1.5 * $ln(32.0) * 65536.0 + 0.5));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      longint e [NK];
      int lnv [NK];
      int best, wait_c;
      @(negedge clk); clear = 1'b1;
      @(negedge clk); clear = 1'b0;
      for (int k = 0; k < NK; k++) begin
        case (t % 3)
          0: lnv[k] = $signed($urandom_range(400000, 0)) - 200000;
          1: lnv[k] = (k < 3) ? 200000 - 60000 * k : 20000 - 100 * k + $signed($urandom_range(200, 0));
          default: lnv[k] = -(k * (10640 + t)) + $signed($urandom_range(40, 0));  // near the penalty slope
        endcase
        e[k] = (longint'(lnv[k]) <<< 5) + longint'(k + 1) * pen;
      end
      best = 0;
      for (int k = 1; k < NK; k++) if (e[k] < e[best]) best = k;
      for (int k = 0; k < NK; k++) begin
        in_valid = 1'b1;
        in_ln = LNW'(lnv[k]);
        @(negedge clk);
        if ($urandom_range(3, 0) == 0) begin in_valid = 1'b0; @(negedge clk); end
      end
      in_valid = 1'b0;
      wait_c = 0;
      while (!done) begin @(posedge clk); #1; wait_c++; end
      checks++;
      if (wait_c > NK + 4) begin failures++; $display("FAIL slow %0d", wait_c); end
      for (int k = 0; k < NK; k++) begin
        checks++;
        if (longint'(mdl[k]) != e[k]) begin
          failures++;
          $display("FAIL t=%0d mdl[%0d]=%0d exp %0d", t, k, mdl[k], e[k]);
        end
      end
      checks++;
      if (int'(k_hat) != best + 1) begin
        failures++;
        $display("FAIL t=%0d k_hat=%0d exp %0d", t, k_hat, best + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
