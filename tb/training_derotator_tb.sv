// Testbench for training_derotator: drives random r(k) for every k and
// compares x(k) with r(k) * conj(tau(k)) / N, where tau is computed here as an
// explicit DFT of the Chu sequence t(n) = exp(j*pi*n^2/N). Also checks the
// one-cycle latency.
module training_derotator_tb;
  import tsml_pkg::*;
  localparam int NP = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [4:0] in_idx = '0;
  cplx_t in_r = '0;
  logic out_valid;
  logic [4:0] out_idx;
  cplx_t out_x;
  int checks = 0, failures = 0;

  training_derotator #(.NPT(NP)) dut (.*);
  always #5 clk = ~clk;
  function automatic real rabs(real v); return (v < 0.0) ? -v : v; endfunction

  real tr[NP], ti[NP];
  initial begin
    for (int k = 0; k < NP; k++) begin
      tr[k] = 0.0; ti[k] = 0.0;
      for (int n = 0; n < NP; n++) begin
        real a;
        a = PI * real'(n * n) / NP - 2.0 * PI * real'(n * k) / NP;
        tr[k] += $cos(a); ti[k] += $sin(a);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 8; rep++) begin
      for (int k = 0; k < NP; k++) begin
        real rr, ri, er, ei;
        int lim;
        lim = (rep == 0) ? 32767 : 12000;
        @(negedge clk);
        in_valid = 1'b1;
        in_idx = 5'(k);
        in_r.re = 16'($signed($urandom_range(2 * lim, 0)) - lim);
        in_r.im = 16'($signed($urandom_range(2 * lim, 0)) - lim);
        rr = real'(in_r.re); ri = real'(in_r.im);
        // (rr + j ri) * (tr - j ti) / N
        er = (rr * tr[k] + ri * ti[k]) / NP;
        ei = (ri * tr[k] - rr * ti[k]) / NP;
        @(posedge clk); #1;
        checks++;
        if (!out_valid || out_idx != 5'(k) ||
            rabs(real'(out_x.re) - er) > 1.5 || rabs(real'(out_x.im) - ei) > 1.5) begin
          failures++;
          $display("FAIL k=%0d got %0d %0d exp %f %f v=%0d", k, out_x.re, out_x.im, er, ei, out_valid);
        end
      end
    end
    @(negedge clk); in_valid = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
