// tsml_estimator: tap-selective maximum-likelihood (TSML) channel estimator.
//
// Input: the N-point FFT r(k) of one received training block (a Chu sequence
// of length N behind a cyclic prefix of length L). Output: the channel
// estimate h_TSML(n), n = 0 .. L-1, in which only the K_hat strongest taps of
// the ML estimate are kept and all others are zeroed, and K_hat itself,
// chosen by the minimum description length (MDL) criterion.
//
// Data flow, one module per step of the algorithm:
//   1 training_derotator  x(k) = r(k) conj(tau(k)) / N
//   1 ifft_core           h_hat(n), n < L: first L points of IFFT(x)
//   2 cordic_power (x2)   |x(k)|^2 summed into ||x||^2, and |h_hat(n)|^2
//   3 parallel_sorter     tap powers in descending order with tap positions
//   4 norm_accumulator    res_k = ||x||^2 - N * sum_{j<=k} |h_hat(n_j)|^2
//   5 nlf_evaluator       ln(res_k) (range reduction + CORDIC + reconstruction)
//   6 mdl_selector        MDL(k) and K_hat = arg min MDL(k)
// then the taps at the first K_hat sorted positions are passed, the rest
// zeroed. The module split and the operations are the estimator's; the
// sequencing controller below, the buffers and the handshakes are this
// design's own. The angle outputs of the two CORDIC units are not needed by
// the estimator and are left open (the lint notes these two empty pins).
//
// Interface: in_ready is high while a block is being accepted; r(0)..r(N-1)
// are given in order with in_valid (gaps allowed). The result streams out as
// out_valid/out_idx/out_h for n = 0 .. L-1, one per cycle, with k_hat valid
// throughout; done pulses with the last tap. A new block is accepted after
// that. Samples are Q4.11 (tsml_pkg).
// Timing (defaults): about N*L + 2L + 90 cycles from the last input sample
// to the first output tap, dominated by the single-MAC transform (N*L cycles).
module tsml_estimator
  import tsml_pkg::*;
#(
  parameter int unsigned NPT = tsml_pkg::N,
  parameter int unsigned LCP = tsml_pkg::L
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  cplx_t                    in_r,
  output logic                     in_ready,
  output logic                     out_valid,
  output logic [$clog2(LCP)-1:0]   out_idx,
  output cplx_t                    out_h,
  output logic [$clog2(LCP):0]     k_hat,
  output logic                     done
);
  localparam int unsigned AW = $clog2(NPT);
  localparam int unsigned LW = $clog2(LCP);

  typedef enum logic [2:0] {S_IN, S_WAIT, S_SORT, S_MDL, S_WAIT_MDL, S_OUT} state_t;
  state_t state;

  // ---------------- step 1: derotation ----------------
  logic [AW-1:0] in_cnt;
  logic          acc_in;
  logic          x_valid;
  logic [AW-1:0] x_idx;
  cplx_t         x;

  assign in_ready = (state == S_IN);
  assign acc_in   = in_valid & in_ready;

  training_derotator #(.NPT(NPT)) u_derot (
    .clk(clk), .rst_n(rst_n), .in_valid(acc_in), .in_idx(in_cnt), .in_r(in_r),
    .out_valid(x_valid), .out_idx(x_idx), .out_x(x));

  // ---------------- step 1: IFFT ----------------
  logic          h_valid, ifft_busy, ifft_done;
  logic [LW-1:0] h_idx;
  cplx_t         h;

  ifft_core #(.NPT(NPT), .NOUT(LCP)) u_ifft (
    .clk(clk), .rst_n(rst_n), .en(x_valid), .in_idx(x_idx), .in_x(x),
    .out_valid(h_valid), .out_idx(h_idx), .out_h(h), .busy(ifft_busy), .done(ifft_done));

  // ---------------- step 2: powers ----------------
  logic          xp_valid, hp_valid;
  logic [PW-1:0] xp, hp;
  logic [0:0]    xp_tag;
  logic [LW-1:0] hp_tag;

  cordic_power #(.TAG_W(1)) u_pwr_x (
    .clk(clk), .rst_n(rst_n), .in_valid(x_valid), .in_z(x), .in_tag(1'b0),
    .out_valid(xp_valid), .out_pwr(xp), .out_ang(), .out_tag(xp_tag));

  cordic_power #(.TAG_W(LW)) u_pwr_h (
    .clk(clk), .rst_n(rst_n), .in_valid(h_valid), .in_z(h), .in_tag(h_idx),
    .out_valid(hp_valid), .out_pwr(hp), .out_ang(), .out_tag(hp_tag));

  logic [EW-1:0] energy_x;
  logic [AW:0]   xp_cnt;
  logic [LW:0]   hp_cnt;
  cplx_t         h_buf   [LCP];
  logic [PW-1:0] pwr_buf [LCP];

  // ---------------- step 3: sorting ----------------
  logic          sort_start, sort_busy, sort_done;
  logic [LW-1:0] tag_in  [LCP];
  logic [PW-1:0] key_out [LCP];
  logic [LW-1:0] tag_out [LCP];
  logic [7:0]    sort_stages;

  always_comb for (int j = 0; j < LCP; j++) tag_in[j] = LW'(j);

  parallel_sorter #(.CNT(LCP), .KW(PW), .TAGW(LW), .DESCENDING(1'b1)) u_sort (
    .clk(clk), .rst_n(rst_n), .start(sort_start), .key_in(pwr_buf), .tag_in(tag_in),
    .busy(sort_busy), .done(sort_done), .key_out(key_out), .tag_out(tag_out),
    .stages(sort_stages));

  // ---------------- step 4: residual energy ----------------
  logic                 na_clear, na_valid, res_valid;
  logic [LW:0]          k_cnt;
  logic signed [RW-1:0] res;

  norm_accumulator #(.SHIFT(AW)) u_norm (
    .clk(clk), .rst_n(rst_n), .clear(na_clear), .in_valid(na_valid),
    .in_pwr(key_out[k_cnt[LW-1:0]]), .energy_x(energy_x),
    .out_valid(res_valid), .out_res(res));

  // ---------------- step 5: logarithm ----------------
  logic                  ln_valid;
  logic signed [LNW-1:0] ln_res;

  nlf_evaluator #(.UW(RW), .UFRAC(PFRAC)) u_nlf (
    .clk(clk), .rst_n(rst_n), .in_valid(res_valid), .in_u(res),
    .out_valid(ln_valid), .out_ln(ln_res));

  // ---------------- step 6: MDL ----------------
  logic                 mdl_done, mdl_busy;
  logic [LW:0]          k_sel;
  logic signed [MW-1:0] mdl [LCP];

  mdl_selector #(.NK(LCP), .SHIFT(AW)) u_mdl (
    .clk(clk), .rst_n(rst_n), .clear(na_clear), .in_valid(ln_valid), .in_ln(ln_res),
    .done(mdl_done), .k_hat(k_sel), .mdl(mdl), .sort_busy(mdl_busy));

  // ---------------- controller and tap selection ----------------
  logic [LCP-1:0] keep;
  logic [LW:0]    o_cnt;

  always_comb begin
    sort_start = (state == S_WAIT) && (xp_cnt == (AW + 1)'(NPT)) && (hp_cnt == (LW + 1)'(LCP));
    na_clear   = sort_start;
    na_valid   = (state == S_MDL);
  end

  always_ff @(posedge clk) begin
    if (h_valid)  h_buf[h_idx]    <= h;
    if (hp_valid) pwr_buf[hp_tag] <= hp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IN;
      in_cnt    <= '0;
      energy_x  <= '0;
      xp_cnt    <= '0;
      hp_cnt    <= '0;
      k_cnt     <= '0;
      o_cnt     <= '0;
      keep      <= '0;
      k_hat     <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_h     <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (xp_valid) begin
        energy_x <= energy_x + EW'(xp);
        xp_cnt   <= xp_cnt + 1'b1;
      end
      if (hp_valid) hp_cnt <= hp_cnt + 1'b1;
      unique case (state)
        S_IN: if (acc_in) begin
          in_cnt <= in_cnt + 1'b1;
          if (in_cnt == AW'(NPT - 1)) state <= S_WAIT;
        end
        S_WAIT: if (sort_start) state <= S_SORT;
        S_SORT: if (sort_done) begin
          state <= S_MDL;
          k_cnt <= '0;
        end
        S_MDL: begin
          k_cnt <= k_cnt + 1'b1;
          if (k_cnt == (LW + 1)'(LCP - 1)) state <= S_WAIT_MDL;
        end
        S_WAIT_MDL: if (mdl_done) begin
          k_hat <= k_sel;
          for (int j = 0; j < LCP; j++) keep[tag_out[j]] <= ((LW + 1)'(j) < k_sel);
          o_cnt <= '0;
          state <= S_OUT;
        end
        S_OUT: begin
          out_valid <= 1'b1;
          out_idx   <= o_cnt[LW-1:0];
          out_h     <= keep[o_cnt[LW-1:0]] ? h_buf[o_cnt[LW-1:0]] : '0;
          o_cnt     <= o_cnt + 1'b1;
          if (o_cnt == (LW + 1)'(LCP - 1)) begin
            done     <= 1'b1;
            state    <= S_IN;
            in_cnt   <= '0;
            energy_x <= '0;
            xp_cnt   <= '0;
            hp_cnt   <= '0;
          end
        end
        default: state <= S_IN;
      endcase
    end
  end

  // handshake and ordering rules, checked once out of reset
  logic chk_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chk_en <= 1'b0;
    else        chk_en <= 1'b1;
  end
  a_no_write_while_busy: assert property (@(posedge clk) disable iff (!chk_en)
    x_valid |-> !ifft_busy);
  a_single_sort: assert property (@(posedge clk) disable iff (!chk_en)
    sort_start |-> !sort_busy && !mdl_busy);

  logic unused_top;
  always_comb unused_top = ^xp_tag ^ ifft_done ^ (^sort_stages) ^ (^mdl[0]);
endmodule
