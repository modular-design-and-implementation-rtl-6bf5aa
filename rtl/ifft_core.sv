// ifft_core: first NOUT points of the NPT-point inverse DFT, scaled by 1/NPT.
//
//   h_hat(n) = (1/NPT) * sum_{k=0}^{NPT-1} x(k) * exp(+j*2*pi*n*k/NPT),
//   n = 0 .. NOUT-1
//
// This is the ML (least-squares) channel estimate: only the first L points of
// the IFFT are needed. The module buffers the NPT input samples written with
// the enable 'en' (the enable that paces the transform to the sample rate),
// then evaluates each output with one complex multiply-accumulate per cycle,
// the twiddle index advancing by n every cycle (n*k mod NPT, NPT a power of
// two). What it computes is the estimator's; the architecture (a direct DFT
// with a single MAC, NPT cycles per output point, instead of a pipelined
// streaming FFT) is this design's own choice, picked for simplicity.
//
// Interface: write x(k) with en=1, in_idx=k; writing index NPT-1 starts the
// transform. While busy, en is ignored. Each h_hat(n) appears for one cycle on
// out_valid/out_idx/out_h; done pulses with the last one.
// Timing: out_valid for point n is high NPT*(n+1) cycles after the clock edge
// that writes x(NPT-1); a block takes NPT*NOUT cycles after its last input.
// Rounding: round half up, saturation to DW bits.
module ifft_core
  import tsml_pkg::*;
#(
  parameter int unsigned NPT  = tsml_pkg::N,
  parameter int unsigned NOUT = tsml_pkg::L,
  parameter int unsigned TW   = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic [$clog2(NPT)-1:0]      in_idx,
  input  cplx_t                       in_x,
  output logic                        out_valid,
  output logic [$clog2(NOUT)-1:0]     out_idx,
  output cplx_t                       out_h,
  output logic                        busy,
  output logic                        done
);
  localparam int unsigned AW    = $clog2(NPT);
  localparam int unsigned TFRAC = TW - 2;
  localparam int unsigned SH    = TFRAC + AW;       // twiddle scale and 1/NPT
  localparam int unsigned ACCW  = DW + TW + AW + 1;

  typedef logic signed [TW-1:0] tw_t [NPT];
  function automatic tw_t mk_tw(input bit imag);
    tw_t t;
    for (int m = 0; m < NPT; m++) begin
      real ph;
      ph = 2.0 * PI * real'(m) / real'(NPT);
      t[m] = TW'(round_r((imag ? $sin(ph) : $cos(ph)) * real'(2 ** TFRAC)));
    end
    return t;
  endfunction
  localparam tw_t W_RE = mk_tw(1'b0);
  localparam tw_t W_IM = mk_tw(1'b1);

  cplx_t xbuf [NPT];

  logic [AW-1:0]          k, ph;
  logic [$clog2(NOUT)-1:0] n;
  logic signed [ACCW-1:0] acc_re, acc_im;
  logic signed [ACCW-1:0] sum_re, sum_im;
  cplx_t                  xk;
  logic signed [TW-1:0]   wr, wi;

  function automatic logic signed [DW-1:0] rnd_sat(input logic signed [ACCW-1:0] v);
    logic signed [ACCW-1:0] r;
    r = (v + (ACCW'(1) <<< (SH - 1))) >>> SH;
    if (r > ACCW'(2 ** (DW - 1) - 1))      return DW'(2 ** (DW - 1) - 1);
    else if (r < -ACCW'(2 ** (DW - 1)))    return DW'(-(2 ** (DW - 1)));
    else                                   return r[DW-1:0];
  endfunction

  always_comb begin
    xk     = xbuf[k];
    wr     = W_RE[ph];
    wi     = W_IM[ph];
    sum_re = acc_re + ACCW'(xk.re * wr) - ACCW'(xk.im * wi);
    sum_im = acc_im + ACCW'(xk.re * wi) + ACCW'(xk.im * wr);
  end

  always_ff @(posedge clk) begin
    if (en && !busy) xbuf[in_idx] <= in_x;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_h     <= '0;
      k         <= '0;
      ph        <= '0;
      n         <= '0;
      acc_re    <= '0;
      acc_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (!busy) begin
        if (en && in_idx == AW'(NPT - 1)) begin
          busy   <= 1'b1;
          k      <= '0;
          ph     <= '0;
          n      <= '0;
          acc_re <= '0;
          acc_im <= '0;
        end
      end else begin
        k  <= k + 1'b1;
        ph <= ph + AW'(n);
        if (k == AW'(NPT - 1)) begin
          out_valid <= 1'b1;
          out_idx   <= n;
          out_h.re  <= rnd_sat(sum_re);
          out_h.im  <= rnd_sat(sum_im);
          acc_re    <= '0;
          acc_im    <= '0;
          ph        <= '0;
          n         <= n + 1'b1;
          if (n == $clog2(NOUT)'(NOUT - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          acc_re <= sum_re;
          acc_im <= sum_im;
        end
      end
    end
  end
endmodule
