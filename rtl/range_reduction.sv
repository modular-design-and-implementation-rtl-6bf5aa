// range_reduction: multiplicative range reduction for the natural logarithm.
//
// The CORDIC logarithm only converges for inputs in [a, b) = [0.5, 1). The
// input range [2^-5, 2^7) is cut into SEGS = 12 segments
//     [s_i, e_i) = [a * 2^(i-4), b * 2^(i-4)),  i = 0 .. 11,
// and a segment index encoder finds the segment of u with 12 parallel
// comparators u >= s_i. Those of i = 1 .. 11 each add one to a sum, which is
// the multiplexer select sel; the correction index is m = sel + (-4). The
// comparator of s_0 flags inputs below the covered range. A 12-to-1 multiplexer picks, out of the
// twelve bit-shifted copies of u (4-bit left shift for segment 0 down to 7-bit
// right shift for segment 11), the one that lies in [0.5, 1), so that
//     u = u' * 2^m   and   ln(u) = ln(u') + m * ln(2).
// Segments, comparators, the constant -4 and the shifted-copy multiplexer are
// the estimator's. Saturation outside the covered range is this design's
// choice: u < 2^-5 (zero and negative included) gives u' = 0.5, m = -4, and
// u >= 2^7 gives the largest u' below 1 with m = 7.
//
// Interface: u is signed, UW bits, UFRAC fraction bits. u_red is unsigned
// Q0.OFRAC (OFRAC bits, value in [0.5, 1), so its MSB is set); sel is 0..11;
// m is signed.
// Timing: combinational.
module range_reduction #(
  parameter int unsigned UW    = 42,
  parameter int unsigned UFRAC = 22,
  parameter int unsigned OFRAC = 24
) (
  input  logic signed [UW-1:0] u,
  output logic [OFRAC-1:0]     u_red,
  output logic [3:0]           sel,
  output logic signed [4:0]    m
);
  localparam int unsigned SEGS = 12;
  localparam int unsigned XW   = UW + OFRAC + 8;

  // lower segment bounds s_i = 2^(i-5) in the input format
  function automatic logic signed [UW-1:0] seg_lo(input int i);
    return UW'(1) <<< (i - 5 + int'(UFRAC));
  endfunction

  logic [SEGS-1:0] ge;            // comparator outputs, u >= s_i
  logic [OFRAC-1:0] cand [SEGS];   // shifted copies of u


  for (genvar i = 0; i < SEGS; i++) begin : g_seg
    // u' = u * 2^(4-i); in bits: move from UFRAC to OFRAC fraction bits too
    localparam int SH = int'(OFRAC) - int'(UFRAC) + 4 - i;
    assign ge[i] = (u >= seg_lo(i));
    if (SH >= 0) begin : g_l
      assign cand[i] = OFRAC'(XW'(unsigned'(u)) << SH);
    end else begin : g_r
      assign cand[i] = OFRAC'(XW'(unsigned'(u)) >> (-SH));
    end
  end

  logic [3:0] cnt;
  always_comb begin
    cnt = '0;
    for (int i = 1; i < SEGS; i++) cnt = cnt + 4'(ge[i]);
    sel = cnt;
    m   = signed'(5'(cnt)) + (-5'sd4);
    if (!ge[0]) begin
      u_red = OFRAC'(1) << (OFRAC - 1);                // u below 2^-5: 0.5
    end else if (u >= (seg_lo(SEGS - 1) <<< 1)) begin
      u_red = '1;                                      // u at or above 2^7: 1 - 2^-OFRAC
    end else begin
      u_red = cand[cnt];
    end
  end
endmodule
