// Testbench for norm_accumulator: for several blocks, sets a random ||x||^2,
// feeds 16 random powers (with gaps in in_valid), and compares each residual
// with ||x||^2 - 32 * running sum computed here, exactly. Checks the one-cycle
// latency and that clear restarts the sum, and counts negative residuals.
module norm_accumulator_tb;
  import tsml_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, in_valid = 1'b0;
  logic [PW-1:0] in_pwr = '0;
  logic [EW-1:0] energy_x = '0;
  logic out_valid;
  logic signed [RW-1:0] out_res;
  int checks = 0, failures = 0, negatives = 0;

  norm_accumulator #(.SHIFT(5)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 20; blk++) begin
      longint sum, e, expv;
      @(negedge clk); clear = 1'b1;
      energy_x = EW'({$urandom, $urandom}) >> 4;
      e = longint'(energy_x);
      sum = 0;
      @(negedge clk); clear = 1'b0;
      for (int k = 0; k < 16; k++) begin
        if ($urandom_range(3, 0) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
          checks++;
          if (out_valid) begin failures++; $display("FAIL spurious valid"); end
        end
        in_valid = 1'b1;
        in_pwr = (blk % 2 == 0) ? PW'($urandom) : PW'($urandom_range(1 << 20, 0));
        sum += longint'(in_pwr);
        expv = e - (sum <<< 5);
        @(posedge clk); #1;
        checks++;
        if (!out_valid || longint'(out_res) != expv) begin
          failures++;
          $display("FAIL blk %0d k %0d got %0d exp %0d", blk, k, out_res, expv);
        end
        if (out_res < 0) negatives++;
        @(negedge clk); in_valid = 1'b0;
      end
    end
    checks++;
    if (negatives == 0) begin failures++; $display("FAIL never negative"); end
    $display("negative residuals: %0d", negatives);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
