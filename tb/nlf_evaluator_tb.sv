// Testbench for nlf_evaluator: streams inputs spread log-uniformly over the
// covered range [2^-5, 2^7) (so every segment of the range reduction is used),
// plus zero, negative and too large values, one per cycle, and compares out_ln
// with ln(u) computed in real arithmetic, ln of the saturation bound for
// inputs outside the range (tolerance 1e-4). Checks order and the 22-cycle
// latency of the default 18-step CORDIC.
module nlf_evaluator_tb;
  import tsml_pkg::*;
  localparam int LAT = 22, NS = 600;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [RW-1:0] in_u = '0;
  logic out_valid;
  logic signed [LNW-1:0] out_ln;
  int checks = 0, failures = 0;

  nlf_evaluator dut (.*);
  always #5 clk = ~clk;
  function automatic real rabs(real v); return (v < 0.0) ? -v : v; endfunction

  real exp_l[NS];
  int t_in[NS];
  int cyc = 0, nout = 0, nin = 0;
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
      err = rabs(got - exp_l[nout]);
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > 1e-4) begin
        failures++;
        $display("FAIL #%0d: got %f exp %f", nout, got, exp_l[nout]);
      end
      checks++;
      if (cyc - t_in[nout] != LAT) begin
        failures++;
        $display("FAIL latency %0d", cyc - t_in[nout]);
      end
      nout++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; s++) begin
      longint v;
      real rv;
      @(negedge clk);
      in_valid = 1'b1;
      case (s)
        0: v = 0;
        1: v = -12345;
        2: v = longint'(1) << 35;
        3: v = longint'(1) << 17;           // exactly 2^-5
        4: v = (longint'(1) << 29) - 1;     // just below 2^7
        default: begin
          int e;
          e = $urandom_range(28, 17);
          v = (longint'(1) << e) | (longint'({$urandom, $urandom}) & ((longint'(1) << e) - 1));
        end
      endcase
      in_u = RW'(v);
      rv = real'(v) / (2.0 ** 22);
      if (rv < 2.0 ** -5) rv = 2.0 ** -5;
      if (rv >= 128.0) rv = 128.0;
      exp_l[s] = $ln(rv);
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
