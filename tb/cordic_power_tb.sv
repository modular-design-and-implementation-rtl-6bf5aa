// Testbench for cordic_power: streams random complex samples (all quadrants,
// full scale and small values, one per cycle) and compares out_pwr with
// re^2 + im^2 computed in real arithmetic (relative tolerance 5e-4 plus a few
// LSB of the magnitude), and out_ang with atan2(im, re) (tolerance 1e-3 rad
// plus the quantisation of small inputs, compared modulo 2 pi). Checks the
// tag, the ITER+3 cycle latency and full throughput.
module cordic_power_tb;
  import tsml_pkg::*;
  localparam int ITER = 14, LAT = ITER + 3, NS = 400;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  cplx_t in_z = '0;
  logic [8:0] in_tag = '0;
  logic out_valid;
  logic [PW-1:0] out_pwr;
  logic signed [15:0] out_ang;
  logic [8:0] out_tag;
  int checks = 0, failures = 0;

  cordic_power #(.ITER(ITER), .TAG_W(9)) dut (.*);
  always #5 clk = ~clk;
  function automatic real rabs(real v); return (v < 0.0) ? -v : v; endfunction

  real exp_p[NS];
  real exp_a[NS];
  real mag_l[NS];
  int  t_in[NS];
  int  cyc = 0, nout = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      real got, e, tol;
      got = real'(out_pwr) / (2.0 ** 22);
      e   = exp_p[out_tag];
      tol = 5e-4 * e + 2.0 * $sqrt(e) * (2.0 ** -12) + 2.0 ** -20;
      checks++;
      if (rabs(got - e) > tol || int'(out_tag) != nout) begin
        failures++;
        $display("FAIL tag %0d: got %f exp %f", out_tag, got, e);
      end
      checks++;
      if (cyc - t_in[out_tag] != LAT) begin
        failures++;
        $display("FAIL latency %0d", cyc - t_in[out_tag]);
      end
      begin
        real ga, da;
        ga = real'(out_ang) / 32768.0 * PI;
        da = ga - exp_a[out_tag];
        while (da > PI) da -= 2.0 * PI;
        while (da < -PI) da += 2.0 * PI;
        checks++;
        if (rabs(da) > 1e-3 + 3.0 / mag_l[out_tag]) begin
          failures++;
          $display("FAIL angle tag %0d: got %f exp %f", out_tag, ga, exp_a[out_tag]);
        end
      end
      nout++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; s++) begin
      int lim;
      @(negedge clk);
      lim = (s % 4 == 0) ? 32767 : (s % 4 == 1) ? 300 : 8000;
      in_valid = 1'b1;
      in_tag = 9'(s);
      in_z.re = 16'($signed($urandom_range(2 * lim, 0)) - lim);
      in_z.im = 16'($signed($urandom_range(2 * lim, 0)) - lim);
      if (s == 1) begin in_z.re = -16'sd32768; in_z.im = -16'sd32768; end
      if (s == 2) begin in_z.re = 16'sd0; in_z.im = -16'sd5; end
      exp_p[s] = (real'(in_z.re) ** 2 + real'(in_z.im) ** 2) / (2.0 ** 22);
      exp_a[s] = $atan2(real'(in_z.im), real'(in_z.re));
      mag_l[s] = $sqrt(real'(in_z.re) ** 2 + real'(in_z.im) ** 2) + 1e-9;
      t_in[s] = cyc;
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
