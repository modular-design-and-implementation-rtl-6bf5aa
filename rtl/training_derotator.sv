// training_derotator: x(k) = r(k) * conj(tau(k)) / N.
//
// r is the FFT of the received training block and tau the FFT of the Chu
// training sequence t(n) = exp(j*pi*n^2/N) (N even). Multiplying r by
// conj(tau)/N removes the training modulation, so x is a raw estimate of the
// channel frequency response. For a Chu sequence of even length the DFT has the
// closed form tau(k) = sqrt(N) * exp(j*pi/4) * exp(-j*pi*k^2/N), so the
// coefficient is
//     c(k) = exp(j*(pi*k^2/N - pi/4)) / sqrt(N),
// which this module tabulates at elaboration (N entries, CW-bit signed,
// CW-1 fraction bits). The Chu training sequence and the operation follow the
// estimator algorithm; the closed-form table, the word widths and rounding
// (round half up, saturation to DW bits) are this design's choices.
//
// Interface: one sample per cycle when in_valid is high; in_idx is k.
// Timing: result registered, one cycle latency, full throughput.
module training_derotator
  import tsml_pkg::*;
#(
  parameter int unsigned NPT   = tsml_pkg::N,
  parameter int unsigned CW    = 18
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [$clog2(NPT)-1:0]    in_idx,
  input  cplx_t                     in_r,
  output logic                      out_valid,
  output logic [$clog2(NPT)-1:0]    out_idx,
  output cplx_t                     out_x
);
  localparam int unsigned CFRAC = CW - 1;
  typedef logic signed [CW-1:0] coef_t [NPT];

  function automatic coef_t mk_coef(input bit imag);
    coef_t t;
    for (int k = 0; k < NPT; k++) begin
      real ph;
      ph = PI * real'((k * k) % (2 * NPT)) / real'(NPT) - PI / 4.0;
      t[k] = CW'(round_r((imag ? $sin(ph) : $cos(ph)) / $sqrt(real'(NPT)) * real'(2 ** CFRAC)));
    end
    return t;
  endfunction

  localparam coef_t C_RE = mk_coef(1'b0);
  localparam coef_t C_IM = mk_coef(1'b1);

  localparam int unsigned PRW = DW + CW + 1;

  logic signed [CW-1:0]  c_re, c_im;
  logic signed [PRW-1:0] p_re, p_im;

  function automatic logic signed [DW-1:0] rnd_sat(input logic signed [PRW-1:0] v);
    logic signed [PRW-1:0] r;
    r = (v + (PRW'(1) <<< (CFRAC - 1))) >>> CFRAC;
    if (r > PRW'(2 ** (DW - 1) - 1))       return DW'(2 ** (DW - 1) - 1);
    else if (r < -PRW'(2 ** (DW - 1)))     return DW'(-(2 ** (DW - 1)));
    else                                   return r[DW-1:0];
  endfunction

  always_comb begin
    c_re = C_RE[in_idx];
    c_im = C_IM[in_idx];
    p_re = PRW'(in_r.re * c_re) - PRW'(in_r.im * c_im);
    p_im = PRW'(in_r.re * c_im) + PRW'(in_r.im * c_re);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_x     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx   <= in_idx;
        out_x.re  <= rnd_sat(p_re);
        out_x.im  <= rnd_sat(p_im);
      end
    end
  end
endmodule
