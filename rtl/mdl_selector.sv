// mdl_selector: MDL model-order selection of the sparse channel.
//
//   MDL(k) = N * ln(res_k) + (3/2) * k * ln(N),  k = 1 .. NK
//   K_hat  = arg min_k MDL(k)
//
// res_k is the residual energy ||x||^2 - N ||h_k||^2; its logarithm arrives
// from the logarithm unit, one value per k in increasing k. Multiplication by
// N = 2^LOG2N is a left shift; the penalty term is built by an adder-based
// accumulator that adds (3/2) ln(N) once per k. When all NK metrics are in,
// they are sorted in ascending order by a parallel_sorter (the same sorter as
// for the tap powers) with k - 1 as tag, and the tag of the first element
// gives K_hat. These three components follow the estimator. Signed metrics are
// handed to the unsigned sorter in offset binary (sign bit inverted), which
// keeps their order; this and the widths are this design's choices. Ties go
// to the smaller k.
//
// Interface: clear (one cycle) before a block; in_valid/in_ln deliver
// ln(res_k), signed with LNFRAC fraction bits; done pulses when k_hat is
// valid; k_hat and mdl[] then hold until the next clear.
// Timing: the sort starts the cycle after the NK-th value and takes at most
// NK + 3 cycles.
module mdl_selector
  import tsml_pkg::*;
#(
  parameter int unsigned NK    = tsml_pkg::L,
  parameter int unsigned SHIFT = tsml_pkg::LOG2N
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   in_valid,
  input  logic signed [LNW-1:0]  in_ln,
  output logic                   done,
  output logic [$clog2(NK):0]    k_hat,
  output logic signed [MW-1:0]   mdl [NK],
  output logic                   sort_busy
);
  localparam int unsigned TAGW = $clog2(NK);
  // (3/2) * ln(2^SHIFT) with LNFRAC fraction bits
  localparam logic signed [MW-1:0] PEN = MW'(round_r(1.5 * real'(SHIFT) * $ln(2.0) * real'(2 ** LNFRAC)));

  logic signed [MW-1:0] pen;
  logic signed [MW-1:0] pen_nx;
  logic [TAGW:0]        cnt;
  logic                 start;

  logic [MW-1:0]        key_in  [NK];
  logic [TAGW-1:0]      tag_in  [NK];
  logic [MW-1:0]        key_out [NK];
  logic [TAGW-1:0]      tag_out [NK];
  logic                 s_done;
  logic [7:0]           s_stages;

  always_comb begin
    pen_nx = pen + PEN;
    for (int j = 0; j < NK; j++) begin
      key_in[j] = {~mdl[j][MW-1], mdl[j][MW-2:0]};
      tag_in[j] = TAGW'(j);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pen   <= '0;
      cnt   <= '0;
      start <= 1'b0;
      done  <= 1'b0;
      k_hat <= '0;
      for (int j = 0; j < NK; j++) mdl[j] <= '0;
    end else begin
      start <= 1'b0;
      done  <= 1'b0;
      if (clear) begin
        pen <= '0;
        cnt <= '0;
      end else if (in_valid && cnt < (TAGW + 1)'(NK)) begin
        pen      <= pen_nx;
        cnt      <= cnt + 1'b1;
        mdl[cnt[TAGW-1:0]] <= (MW'(in_ln) <<< SHIFT) + pen_nx;
        if (cnt == (TAGW + 1)'(NK - 1)) start <= 1'b1;
      end
      if (s_done) begin
        done  <= 1'b1;
        k_hat <= (TAGW + 1)'(tag_out[0]) + 1'b1;
      end
    end
  end

  parallel_sorter #(.CNT(NK), .KW(MW), .TAGW(TAGW), .DESCENDING(1'b0)) u_sort (
    .clk(clk), .rst_n(rst_n), .start(start), .key_in(key_in), .tag_in(tag_in),
    .busy(sort_busy), .done(s_done), .key_out(key_out), .tag_out(tag_out),
    .stages(s_stages));

  logic unused_sort;
  always_comb begin
    unused_sort = ^s_stages;
    for (int j = 1; j < NK; j++) unused_sort = unused_sort ^ (^key_out[j]) ^ (^tag_out[j]);
    unused_sort = unused_sort ^ (^key_out[0]);
  end
endmodule
