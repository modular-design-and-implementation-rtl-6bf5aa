// Testbench for parallel_sorter: sorts random key sets (with many equal keys)
// on a descending and an ascending instance and compares keys and tags with a
// stable reference sort done here. Checks the stage bound (CNT + 2), that a
// sorted array finishes after 2 stages, and the start-to-done cycle count.
module parallel_sorter_tb;
  localparam int CNT = 16, KW = 12, TW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [KW-1:0] key_in [CNT];
  logic [TW-1:0] tag_in [CNT];
  logic busy_d, done_d, busy_a, done_a;
  logic [KW-1:0] key_d [CNT], key_a [CNT];
  logic [TW-1:0] tag_d [CNT], tag_a [CNT];
  logic [7:0] st_d, st_a;
  int checks = 0, failures = 0;

  parallel_sorter #(.CNT(CNT), .KW(KW), .TAGW(TW), .DESCENDING(1'b1)) dut_d (
    .clk, .rst_n, .start, .key_in, .tag_in, .busy(busy_d), .done(done_d),
    .key_out(key_d), .tag_out(tag_d), .stages(st_d));
  parallel_sorter #(.CNT(CNT), .KW(KW), .TAGW(TW), .DESCENDING(1'b0)) dut_a (
    .clk, .rst_n, .start, .key_in, .tag_in, .busy(busy_a), .done(done_a),
    .key_out(key_a), .tag_out(tag_a), .stages(st_a));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stable reference: selection of the best remaining key, first one on ties
  task automatic ref_sort(input bit desc, output logic [KW-1:0] rk [CNT], output logic [TW-1:0] rt [CNT]);
    bit used [CNT];
    for (int i = 0; i < CNT; i++) used[i] = 0;
    for (int o = 0; o < CNT; o++) begin
      int best;
      best = -1;
      for (int i = 0; i < CNT; i++)
        if (!used[i] && (best < 0 || (desc ? key_in[i] > key_in[best] : key_in[i] < key_in[best])))
          best = i;
      used[best] = 1;
      rk[o] = key_in[best];
      rt[o] = tag_in[best];
    end
  endtask

  initial begin
    logic [KW-1:0] rk [CNT];
    logic [TW-1:0] rt [CNT];
    for (int i = 0; i < CNT; i++) begin key_in[i] = '0; tag_in[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      int cyc_d, cyc_a;
      for (int i = 0; i < CNT; i++) begin
        tag_in[i] = TW'(i);
        case (t)
          0: key_in[i] = KW'(CNT - i);          // already descending
          1: key_in[i] = KW'(i);                // already ascending
          default: key_in[i] = (t % 3 == 0) ? KW'($urandom_range(5, 0)) : KW'($urandom);
        endcase
      end
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc_d = 1; cyc_a = 1;
      fork
        begin while (!done_d) begin @(posedge clk); #1; cyc_d++; end end
        begin while (!done_a) begin @(posedge clk); #1; cyc_a++; end end
      join
      // descending
      ref_sort(1'b1, rk, rt);
      for (int i = 0; i < CNT; i++) begin
        checks++;
        if (key_d[i] != rk[i] || tag_d[i] != rt[i]) begin
          failures++;
          $display("FAIL desc t=%0d i=%0d got %0d/%0d exp %0d/%0d", t, i, key_d[i], tag_d[i], rk[i], rt[i]);
        end
      end
      ref_sort(1'b0, rk, rt);
      for (int i = 0; i < CNT; i++) begin
        checks++;
        if (key_a[i] != rk[i] || tag_a[i] != rt[i]) begin
          failures++;
          $display("FAIL asc t=%0d i=%0d got %0d/%0d exp %0d/%0d", t, i, key_a[i], tag_a[i], rk[i], rt[i]);
        end
      end
      checks++;
      if (st_d > CNT + 2 || st_a > CNT + 2 || cyc_d != int'(st_d) + 1 || cyc_a != int'(st_a) + 1) begin
        failures++;
        $display("FAIL stages %0d %0d cycles %0d %0d", st_d, st_a, cyc_d, cyc_a);
      end
      if (t == 0) begin checks++; if (st_d != 2) begin failures++; $display("FAIL sorted desc took %0d", st_d); end end
      if (t == 1) begin checks++; if (st_a != 2) begin failures++; $display("FAIL sorted asc took %0d", st_a); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
