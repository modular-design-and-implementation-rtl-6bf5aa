// Testbench for range_reduction: applies inputs spread log-uniformly over
// [2^-5, 2^7), the exact segment bounds and their neighbours, and values
// outside the range. For each it checks sel, m and u' against values worked
// out here: m is the exponent that puts u * 2^-m in [0.5, 1), sel = m + 4, and
// u' = u * 2^-m truncated to 24 fraction bits; out-of-range inputs saturate.
// Counts how often each of the 12 segments was selected.
module range_reduction_tb;
  localparam int UW = 42, UFRAC = 22, OFRAC = 24;
  logic signed [UW-1:0] u;
  logic [OFRAC-1:0] u_red;
  logic [3:0] sel;
  logic signed [4:0] m;
  int checks = 0, failures = 0;
  int seg_hits [12];

  range_reduction #(.UW(UW), .UFRAC(UFRAC), .OFRAC(OFRAC)) dut (.*);

  task automatic check(input longint v);
    int em;
    longint eu;
    u = UW'(v);
    #1;
    if (v < (longint'(1) << (UFRAC - 5))) begin
      em = -4; eu = longint'(1) << (OFRAC - 1);
    end else if (v >= (longint'(1) << (UFRAC + 7))) begin
      em = 7; eu = (longint'(1) << OFRAC) - 1;
    end else begin
      em = -4;
      while (v >= (longint'(1) << (UFRAC + em))) em++;
      // now 2^(em-1) <= u < 2^em
      eu = (OFRAC - UFRAC - em >= 0) ? (v <<< (OFRAC - UFRAC - em)) : (v >>> (em - OFRAC + UFRAC));
      seg_hits[em + 4]++;
    end
    checks++;
    if (int'(m) != em || int'(sel) != em + 4 || longint'(u_red) != eu) begin
      failures++;
      $display("FAIL u=%0d: got m=%0d sel=%0d u'=%0d exp m=%0d u'=%0d", v, m, sel, u_red, em, eu);
    end
  endtask

  initial begin
    for (int i = 0; i < 12; i++) seg_hits[i] = 0;
    for (int i = -6; i <= 8; i++) begin
      longint b;
      b = longint'(1) << (UFRAC + i);
      check(b); check(b - 1); check(b + 1);
    end
    check(0); check(-1); check(-(longint'(1) << 30)); check((longint'(1) << 40) - 1);
    for (int t = 0; t < 3000; t++) begin
      int e;
      longint v;
      e = $urandom_range(UFRAC + 7, UFRAC - 6);
      v = (longint'(1) << e) | (longint'({$urandom, $urandom}) & ((longint'(1) << e) - 1));
      check(v);
    end
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (seg_hits[i] == 0) begin failures++; $display("FAIL segment %0d never used", i); end
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
