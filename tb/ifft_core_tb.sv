// Testbench for ifft_core: writes random blocks x(0..N-1), computes
// h(n) = (1/N) sum_k x(k) exp(+j 2 pi n k / N) for n < L in real arithmetic
// and compares (tolerance 2 LSB). Checks the output order and that point n
// appears N*(n+1) cycles after the clock edge that writes the last input, and the done pulse.
module ifft_core_tb;
  import tsml_pkg::*;
  localparam int NP = 32, NO = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0;
  logic [4:0] in_idx = '0;
  cplx_t in_x = '0;
  logic out_valid, busy, done;
  logic [3:0] out_idx;
  cplx_t out_h;
  int checks = 0, failures = 0;

  ifft_core #(.NPT(NP), .NOUT(NO)) dut (.*);
  always #5 clk = ~clk;
  function automatic real rabs(real v); return (v < 0.0) ? -v : v; endfunction

  real xr[NP], xi[NP];
  int cyc = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 4; blk++) begin
      int lim;
      lim = (blk == 0) ? 32767 : 4000 * (blk + 1);
      for (int k = 0; k < NP; k++) begin
        @(negedge clk);
        en = 1'b1;
        in_idx = 5'(k);
        in_x.re = 16'($signed($urandom_range(2 * lim, 0)) - lim);
        in_x.im = 16'($signed($urandom_range(2 * lim, 0)) - lim);
        if (blk == 1 && k == 3) begin in_x.re = 16'sd2048; in_x.im = 0; end
        xr[k] = real'(in_x.re); xi[k] = real'(in_x.im);
      end
      @(posedge clk); cyc = 0;   // edge that writes x(N-1)
      #1 en = 1'b0;
      for (int n = 0; n < NO; n++) begin
        real er, ei;
        int waited;
        er = 0.0; ei = 0.0;
        for (int k = 0; k < NP; k++) begin
          real a;
          a = 2.0 * PI * real'(n * k) / NP;
          er += (xr[k] * $cos(a) - xi[k] * $sin(a)) / NP;
          ei += (xr[k] * $sin(a) + xi[k] * $cos(a)) / NP;
        end
        do begin @(posedge clk); cyc++; #1; end while (!out_valid);
        checks++;
        if (out_idx != 4'(n) || rabs(real'(out_h.re) - er) > 2.0 || rabs(real'(out_h.im) - ei) > 2.0) begin
          failures++;
          $display("FAIL blk %0d n=%0d idx=%0d got %0d %0d exp %f %f", blk, n, out_idx, out_h.re, out_h.im, er, ei);
        end
        waited = cyc;
        checks++;
        if (waited != NP * (n + 1)) begin
          failures++;
          $display("FAIL latency n=%0d: %0d cycles", n, waited);
        end
        if (n == NO - 1) begin
          checks++;
          if (!done) begin failures++; $display("FAIL no done"); end
        end
      end
      @(posedge clk); #1;
      checks++;
      if (busy) begin failures++; $display("FAIL still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
