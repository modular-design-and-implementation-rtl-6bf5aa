// Workload testbench: mean-square error of the tap-selective estimate against
// the plain ML estimate, for the design case of a sparse channel with K = 3
// equal-power taps at random positions among L = 16, N = 32, noise variance
// 0.01 on x (20 dB per sample). Theory for correctly detected taps:
//   MSE_ML = L sigma^2 / N = 0.005,  MSE_TSML = K sigma^2 / N = 0.0009375,
// an improvement of L/K = 5.33. The ML estimate is the estimator's own h(n)
// buffer, so both errors include the same fixed-point effects. The test
// passes when the measured TSML MSE is within a factor 1.6 of K sigma^2 / N,
// the improvement is at least 3.5, and K_hat = 3 in at least 80 % of blocks
// (MDL sometimes picks one tap too many at this SNR).
module tsml_mse_tb;
  import tsml_pkg::*;
  localparam int NP = 32, LC = 16, KT = 3, BLOCKS = 120;
  localparam real SIG2 = 0.01;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  cplx_t in_r = '0;
  logic in_ready, out_valid, done;
  logic [3:0] out_idx;
  cplx_t out_h;
  logic [4:0] k_hat;
  int checks = 0, failures = 0;

  tsml_estimator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (BLOCKS * 800 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real taur[NP], taui[NP];
  initial begin
    for (int k = 0; k < NP; k++) begin
      taur[k] = 0.0; taui[k] = 0.0;
      for (int n = 0; n < NP; n++) begin
        real a;
        a = PI * real'(n * n) / NP - 2.0 * PI * real'(n * k) / NP;
        taur[k] += $cos(a); taui[k] += $sin(a);
      end
    end
  end

  function automatic real urand();
    return (real'($urandom_range(32'hFFFFFF, 1))) / 16777216.0;
  endfunction
  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand())) * $cos(2.0 * PI * urand());
  endfunction

  initial begin
    real se_ml = 0.0, se_ts = 0.0, mse_ml, mse_ts;
    int kok = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < BLOCKS; b++) begin
      real hr[LC], hi[LC];
      bit used[LC];
      for (int n = 0; n < LC; n++) begin hr[n] = 0.0; hi[n] = 0.0; used[n] = 0; end
      for (int t = 0; t < KT; t++) begin
        int q;
        real ph;
        do q = $urandom_range(LC - 1, 0); while (used[q]);
        used[q] = 1;
        ph = 2.0 * PI * urand();
        hr[q] = $cos(ph) / $sqrt(real'(KT));
        hi[q] = $sin(ph) / $sqrt(real'(KT));
      end
      for (int k = 0; k < NP; k++) begin
        real Hr, Hi, rr, ri;
        Hr = 0.0; Hi = 0.0;
        for (int n = 0; n < LC; n++) begin
          real a;
          a = -2.0 * PI * real'(n * k) / NP;
          Hr += hr[n] * $cos(a) - hi[n] * $sin(a);
          Hi += hr[n] * $sin(a) + hi[n] * $cos(a);
        end
        rr = Hr * taur[k] - Hi * taui[k] + gauss() * $sqrt(NP * SIG2 / 2.0);
        ri = Hr * taui[k] + Hi * taur[k] + gauss() * $sqrt(NP * SIG2 / 2.0);
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        in_valid = 1'b1;
        in_r.re = 16'($rtoi(rr * 2048.0));
        in_r.im = 16'($rtoi(ri * 2048.0));
      end
      @(posedge clk); #1 in_valid = 1'b0;
      for (int n = 0; n < LC; n++) begin
        real mr, mi;
        do begin @(posedge clk); #1; end while (!out_valid);
        if (n == 0 && k_hat == 5'(KT)) kok++;
        mr = real'(dut.h_buf[n].re) / 2048.0;
        mi = real'(dut.h_buf[n].im) / 2048.0;
        se_ml += (mr - hr[n]) ** 2 + (mi - hi[n]) ** 2;
        se_ts += (real'(out_h.re) / 2048.0 - hr[n]) ** 2 + (real'(out_h.im) / 2048.0 - hi[n]) ** 2;
      end
    end
    mse_ml = se_ml / BLOCKS;
    mse_ts = se_ts / BLOCKS;
    $display("MSE ML %g (theory %g), MSE TSML %g (theory %g), improvement %g (L/K = %g), K_hat = 3 in %0d of %0d blocks",
             mse_ml, LC * SIG2 / NP, mse_ts, KT * SIG2 / NP, mse_ml / mse_ts, real'(LC) / KT, kok, BLOCKS);
    checks += 4;
    if (mse_ts > 1.6 * KT * SIG2 / NP || mse_ts < KT * SIG2 / NP / 1.6) begin failures++; $display("FAIL TSML MSE"); end
    if (mse_ml > 1.6 * LC * SIG2 / NP || mse_ml < LC * SIG2 / NP / 1.6) begin failures++; $display("FAIL ML MSE"); end
    if (mse_ml / mse_ts < 3.5) begin failures++; $display("FAIL improvement"); end
    if (kok < BLOCKS * 8 / 10) begin failures++; $display("FAIL K_hat"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
