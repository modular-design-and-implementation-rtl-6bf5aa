// parallel_sorter: iterative odd-even transposition sorter with position tags.
//
// CNT keys are sorted (descending when DESCENDING = 1, ascending otherwise)
// together with a tag per key. The array sits in registers; every clock one
// comparator stage works on it: alternately all pairs (0,1),(2,3),... and all
// pairs (1,2),(3,4),... Each pair has an upper cell (sort_cmp_upper) that
// compares and swaps the keys and raises a swp flag, and a lower cell
// (sort_cmp_lower) that moves the tags by the same flag. The sort is finished
// once every swp flag stayed low for two consecutive stages (one of each
// kind): then no neighbouring pair is out of order. The cells and the stop rule
// (all swp flags low) follow the estimator's sorter; the register-and-iterate
// arrangement, one stage per clock, is this design's choice. Equal keys are not
// swapped, so ties keep their input order.
//
// Interface: pulse start with key_in/tag_in valid; busy stays high while
// sorting; done pulses for one cycle when key_out/tag_out hold the result,
// which then stays until the next start. stages counts the comparator stages
// of the last sort.
// Timing: at most CNT + 2 stages (CNT + 3 cycles from start to done); an
// already sorted array takes 2 stages.
module parallel_sorter #(
  parameter int unsigned CNT        = 16,
  parameter int unsigned KW         = 32,
  parameter int unsigned TAGW       = 4,
  parameter bit          DESCENDING = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [KW-1:0]        key_in  [CNT],
  input  logic [TAGW-1:0]      tag_in  [CNT],
  output logic                 busy,
  output logic                 done,
  output logic [KW-1:0]        key_out [CNT],
  output logic [TAGW-1:0]      tag_out [CNT],
  output logic [7:0]           stages
);
  logic [CNT-1:0]  swp;
  logic            odd;        // current stage works on the odd pairs
  logic            quiet_prev; // previous stage made no swap

  // comparator cells of every neighbouring pair; pair i joins elements i, i+1
  logic [CNT-1:0]  act;
  logic [KW-1:0]   pka [CNT];
  logic [KW-1:0]   pkb [CNT];
  logic [TAGW-1:0] pta [CNT];
  logic [TAGW-1:0] ptb [CNT];
  for (genvar i = 0; i + 1 < CNT; i++) begin : g_pair
    logic s;
    assign act[i] = (((i % 2) == 1) == odd);
    sort_cmp_upper #(.KW(KW), .DESCENDING(DESCENDING)) u_up (
      .a(key_out[i]), .b(key_out[i+1]), .swp(s), .ya(pka[i]), .yb(pkb[i]));
    sort_cmp_lower #(.TAGW(TAGW)) u_lo (
      .swp(s), .c(tag_out[i]), .d(tag_out[i+1]), .yc(pta[i]), .yd(ptb[i]));
    assign swp[i] = act[i] & s;
  end
  assign act[CNT-1]  = 1'b0;
  assign swp[CNT-1]  = 1'b0;
  assign pka[CNT-1]  = '0;
  assign pkb[CNT-1]  = '0;
  assign pta[CNT-1]  = '0;
  assign ptb[CNT-1]  = '0;

  // next state: each element belongs to at most one active pair per stage
  logic [KW-1:0]   key_st [CNT];
  logic [TAGW-1:0] tag_st [CNT];
  always_comb begin
    for (int j = 0; j < CNT; j++) begin
      if (act[j]) begin
        key_st[j] = pka[j];
        tag_st[j] = pta[j];
      end else if (j > 0 && act[(j > 0) ? j - 1 : 0]) begin
        key_st[j] = pkb[(j > 0) ? j - 1 : 0];
        tag_st[j] = ptb[(j > 0) ? j - 1 : 0];
      end else begin
        key_st[j] = key_out[j];
        tag_st[j] = tag_out[j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      odd        <= 1'b0;
      quiet_prev <= 1'b0;
      stages     <= '0;
      for (int j = 0; j < CNT; j++) begin
        key_out[j] <= '0;
        tag_out[j] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start) begin
        busy       <= 1'b1;
        odd        <= 1'b0;
        quiet_prev <= 1'b0;
        stages     <= '0;
        for (int j = 0; j < CNT; j++) begin
          key_out[j] <= key_in[j];
          tag_out[j] <= tag_in[j];
        end
      end else if (busy) begin
        for (int j = 0; j < CNT; j++) begin
          key_out[j] <= key_st[j];
          tag_out[j] <= tag_st[j];
        end
        odd        <= ~odd;
        stages     <= stages + 1'b1;
        quiet_prev <= (swp == '0);
        if (swp == '0 && quiet_prev) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
