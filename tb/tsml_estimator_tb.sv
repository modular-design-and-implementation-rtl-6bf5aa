// End-to-end testbench for tsml_estimator at its default size (N = 32,
// L = 16). For each trial it draws a sparse channel (1 to 5 taps at random
// positions among the first 16, unit energy), forms the FFT of the received
// Chu training block r(k) = tau(k) H(k) + noise, streams r into the estimator
// and checks the result against a reference model of the whole algorithm in
// real arithmetic (derotation, IFFT, powers, stable descending sort, residual
// energies, MDL with the same 2^-5 .. 2^7 logarithm range, arg min, tap
// selection):
//   - K_hat must be a reference MDL minimiser (within 0.5 of the minimum),
//   - kept taps must match the reference estimate (3 LSB), all others be 0,
//   - at the higher SNR K_hat must equal the reference exactly (the number
//     of blocks where it also equals the true tap count is reported),
//   - the latency from the last input to the first output is bounded.
// It counts how often each mechanism occurred: sorter swaps, taps zeroed,
// left- and right-shift range-reduction segments, the unshifted segment,
// saturation of the logarithm input, gaps in the input stream. Each must
// occur at least once.
module tsml_estimator_tb;
  import tsml_pkg::*;
  localparam int NP = 32, LC = 16;
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
  function automatic real rabs(real v); return (v < 0.0) ? -v : v; endfunction

  // mechanism counters
  int n_swapstage = 0, n_zeroed = 0, n_left = 0, n_right = 0, n_mid = 0, n_sat = 0, n_gap = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.res_valid) begin
      if (dut.u_nlf.sel < 4)  n_left++;
      if (dut.u_nlf.sel > 4)  n_right++;
      if (dut.u_nlf.sel == 4) n_mid++;
      if (dut.res < (RW'(1) <<< 17) || dut.res >= (RW'(1) <<< 29)) n_sat++;
    end
    if (dut.sort_done && dut.sort_stages > 2) n_swapstage++;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
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
    int kexact = 0, khigh = 0, ktrue = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 24; trial++) begin
      real hr[LC], hi[LC], rr[NP], ri[NP], xr[NP], xi[NP], er[LC], ei[LC], p[LC];
      real ex, sig2, mdl[LC], e, acc, mn;
      int ntap, pos[LC], srt[LC], kref, t_last, lat, kd;
      bit used[LC], keep_ref[LC];
      bit high_snr;
      // channel
      ntap = (trial < 12) ? 3 : 1 + (trial % 5);
      high_snr = (trial % 4) != 3;
      sig2 = high_snr ? 0.003 : 0.03;              // noise variance of x
      for (int n = 0; n < LC; n++) begin hr[n] = 0.0; hi[n] = 0.0; used[n] = 0; end
      e = 0.0;
      for (int t = 0; t < ntap; t++) begin
        int q;
        do q = $urandom_range(LC - 1, 0); while (used[q]);
        used[q] = 1;
        hr[q] = gauss() + ((gauss() > 0.0) ? 1.0 : -1.0);
        hi[q] = gauss();
        e += hr[q] * hr[q] + hi[q] * hi[q];
      end
      for (int n = 0; n < LC; n++) begin hr[n] /= $sqrt(e); hi[n] /= $sqrt(e); end
      // received FFT-domain training block, quantised as the input
      for (int k = 0; k < NP; k++) begin
        real Hr, Hi, vr, vi;
        Hr = 0.0; Hi = 0.0;
        for (int n = 0; n < LC; n++) begin
          real a;
          a = -2.0 * PI * real'(n * k) / NP;
          Hr += hr[n] * $cos(a) - hi[n] * $sin(a);
          Hi += hr[n] * $sin(a) + hi[n] * $cos(a);
        end
        vr = gauss() * $sqrt(NP * sig2 / 2.0);
        vi = gauss() * $sqrt(NP * sig2 / 2.0);
        rr[k] = real'($rtoi((Hr * taur[k] - Hi * taui[k] + vr) * 2048.0)) / 2048.0;
        ri[k] = real'($rtoi((Hr * taui[k] + Hi * taur[k] + vi) * 2048.0)) / 2048.0;
      end
      // reference model
      ex = 0.0;
      for (int k = 0; k < NP; k++) begin
        xr[k] = (rr[k] * taur[k] + ri[k] * taui[k]) / NP;
        xi[k] = (ri[k] * taur[k] - rr[k] * taui[k]) / NP;
        ex += xr[k] * xr[k] + xi[k] * xi[k];
      end
      for (int n = 0; n < LC; n++) begin
        er[n] = 0.0; ei[n] = 0.0;
        for (int k = 0; k < NP; k++) begin
          real a;
          a = 2.0 * PI * real'(n * k) / NP;
          er[n] += (xr[k] * $cos(a) - xi[k] * $sin(a)) / NP;
          ei[n] += (xr[k] * $sin(a) + xi[k] * $cos(a)) / NP;
        end
        p[n] = er[n] * er[n] + ei[n] * ei[n];
        used[n] = 0;
      end
      for (int o = 0; o < LC; o++) begin
        int b;
        b = -1;
        for (int n = 0; n < LC; n++) if (!used[n] && (b < 0 || p[n] > p[b])) b = n;
        used[b] = 1; srt[o] = b;
      end
      acc = 0.0; mn = 1e30; kref = 1;
      for (int k = 1; k <= LC; k++) begin
        real res;
        acc += p[srt[k-1]];
        res = ex - NP * acc;
        if (res < 2.0 ** -5) res = 2.0 ** -5;
        if (res > 128.0) res = 128.0;
        mdl[k-1] = NP * $ln(res) + 1.5 * $ln(real'(NP)) * k;
        if (mdl[k-1] < mn) begin mn = mdl[k-1]; kref = k; end
      end
      // drive the block, with gaps
      for (int k = 0; k < NP; k++) begin
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        if ($urandom_range(7, 0) == 0) begin in_valid = 1'b0; n_gap++; @(negedge clk); end
        in_valid = 1'b1;
        in_r.re = 16'($rtoi(rr[k] * 2048.0));
        in_r.im = 16'($rtoi(ri[k] * 2048.0));
      end
      @(posedge clk); #1 t_last = cyc;
      in_valid = 1'b0;
      // collect the result
      for (int n = 0; n < LC; n++) begin
        do begin @(posedge clk); #1; end while (!out_valid);
        if (n == 0) begin
          lat = cyc - t_last;
          kd = int'(k_hat);
          for (int j = 0; j < LC; j++) keep_ref[j] = 0;
          for (int j = 0; j < kd && j < LC; j++) keep_ref[srt[j]] = 1;
          checks++;
          if (kd < 1 || kd > LC || mdl[kd-1] > mn + 0.5) begin
            failures++;
            $display("FAIL trial %0d: K_hat %0d (MDL %f), reference %0d (MDL %f)", trial, kd, mdl[kd-1], kref, mn);
          end
          if (kd == kref) kexact++;
          checks++;
          if (lat > NP * LC + 3 * LC + 100) begin failures++; $display("FAIL latency %0d", lat); end
          if (high_snr) begin
            khigh++;
            checks++;
            if (kd != kref) begin failures++; $display("FAIL trial %0d: K_hat %0d, reference %0d", trial, kd, kref); end
            if (kd == ntap) ktrue++;
          end
          if (kd < LC) n_zeroed++;
        end
        checks++;
        if (int'(out_idx) != n ||
            (keep_ref[n] && (rabs(real'(out_h.re) / 2048.0 - er[n]) > 3.0 / 2048.0 ||
                             rabs(real'(out_h.im) / 2048.0 - ei[n]) > 3.0 / 2048.0)) ||
            (!keep_ref[n] && (out_h.re != 0 || out_h.im != 0))) begin
          failures++;
          $display("FAIL trial %0d tap %0d: got %0d %0d keep=%0d ref %f %f", trial, n, $signed(out_h.re), $signed(out_h.im), keep_ref[n], er[n] * 2048, ei[n] * 2048);
        end
        if (n == LC - 1) begin checks++; if (!done) begin failures++; $display("FAIL no done"); end end
      end
      $display("trial %0d: taps %0d, K_hat %0d (reference %0d), latency %0d cycles", trial, ntap, k_hat, kref, lat);
    end
    $display("mechanisms: sorts with swaps %0d, blocks with taps zeroed %0d, left-shift segments %0d, right-shift segments %0d, unshifted %0d, log saturation %0d, input gaps %0d",
             n_swapstage, n_zeroed, n_left, n_right, n_mid, n_sat, n_gap);
    checks += 7;
    if (n_swapstage == 0) failures++;
    if (n_zeroed == 0) failures++;
    if (n_left == 0) failures++;
    if (n_right == 0) failures++;
    if (n_mid == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_gap == 0) failures++;
    $display("K_hat equal to the floating-point reference in %0d of 24 blocks", kexact);
    $display("K_hat equal to the true tap count in %0d of %0d high-SNR blocks", ktrue, khigh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
