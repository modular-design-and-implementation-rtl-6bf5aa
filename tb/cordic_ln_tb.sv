// Testbench for cordic_ln: streams inputs u in [0.5, 1) (random, plus the
// interval ends) one per cycle and compares out_ln with ln(u) computed in real
// arithmetic (tolerance 6e-5). Checks the tag and the ITER+2 cycle latency.
module cordic_ln_tb;
  import tsml_pkg::*;
  localparam int ITER = 18, LAT = ITER + 2, NS = 500;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [23:0] in_u = 24'h800000;
  logic [9:0] in_tag = '0;
  logic out_valid;
  logic signed [LNW-1:0] out_ln;
  logic [9:0] out_tag;
  int checks = 0, failures = 0;

  cordic_ln #(.UW(24), .ITER(ITER), .TAG_W(10)) dut (.*);
  always #5 clk = ~clk;
  function automatic real rabs(real v); return (v < 0.0) ? -v : v; endfunction

  real exp_l[NS];
  int t_in[NS];
  int cyc = 0, nout = 0;
  real maxerr = 0.0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      real got, err;
      got = real'(out_ln) / 65536.0;
      err = rabs(got - exp_l[out_tag]);
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > 6e-5 || int'(out_tag) != nout) begin
        failures++;
        $display("FAIL tag %0d: got %f exp %f", out_tag, got, exp_l[out_tag]);
      end
      checks++;
      if (cyc - t_in[out_tag] != LAT) begin
        failures++;
        $display("FAIL latency %0d", cyc - t_in[out_tag]);
      end
      nout++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; s++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_tag = 10'(s);
      in_u = (s == 0) ? 24'h800000 : (s == 1) ? 24'hFFFFFF : {1'b1, 23'($urandom)};   // [0.5, 1)
      exp_l[s] = $ln(real'(in_u) / (2.0 ** 24));
      t_in[s] = cyc;
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("FAIL count %0d", nout); end
    $display("max |error| = %g", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
