// cordic_ln: natural logarithm on [0.5, 1) by hyperbolic CORDIC.
//
// Uses ln(u) = 2 * atanh((u - 1) / (u + 1)). A hyperbolic CORDIC in vectoring
// mode starts from x = u + 1, y = u - 1, z = 0 and drives y to zero with
// micro-rotations by atanh(2^-i); z then holds atanh(y0/x0) and the output is
// 2z. The shift sequence i = 1, 2, 3, 4, 4, 5, ..., 13, 13, 14, ... repeats
// steps 4 and 13 as hyperbolic CORDIC needs for convergence. The estimator
// specifies a CORDIC logarithm valid on [0.5, 1); the iteration count, word
// widths and the unrolled pipeline (one register per micro-rotation) are this
// design's choices. The atanh constants are computed at elaboration.
//
// Interface: in_u is unsigned Q0.UW (all bits fraction), expected in [0.5, 1); out_ln is
// signed with LNFRAC (16) fraction bits. The tag travels with its sample.
// Timing: latency ITER + 2 cycles, full throughput.
module cordic_ln
  import tsml_pkg::*;
#(
  parameter int unsigned UW    = 24,
  parameter int unsigned ITER  = 18,
  parameter int unsigned TAG_W = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [UW-1:0]          in_u,
  input  logic [TAG_W-1:0]       in_tag,
  output logic                   out_valid,
  output logic signed [LNW-1:0]  out_ln,
  output logic [TAG_W-1:0]       out_tag
);
  localparam int unsigned F  = UW + 1;      // internal fraction bits
  localparam int unsigned IW = F + 3;       // internal width, signed

  typedef int unsigned shift_t [ITER];
  typedef logic signed [IW-1:0] atab_t [ITER];

  function automatic shift_t mk_shift();
    shift_t s;
    int unsigned k, rep4, rep13;
    k = 1; rep4 = 0; rep13 = 0;
    for (int j = 0; j < ITER; j++) begin
      s[j] = k;
      if (k == 4 && rep4 == 0)        rep4 = 1;
      else if (k == 13 && rep13 == 0) rep13 = 1;
      else                            k = k + 1;
    end
    return s;
  endfunction
  localparam shift_t SH = mk_shift();

  function automatic atab_t mk_atanh();
    atab_t a;
    for (int j = 0; j < ITER; j++) begin
      real t;
      t = 2.0 ** (-real'(SH[j]));
      a[j] = IW'(round_r(0.5 * $ln((1.0 + t) / (1.0 - t)) * (2.0 ** real'(F))));
    end
    return a;
  endfunction
  localparam atab_t ATANH = mk_atanh();

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic signed [IW-1:0] zs [ITER+1];
  logic                 vs [ITER+1];
  logic [TAG_W-1:0]     ts [ITER+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[0] <= 1'b0;
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
      ts[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      ts[0] <= in_tag;
      xs[0] <= (IW'(in_u) << (F - UW)) + (IW'(1) << F);
      ys[0] <= (IW'(in_u) << (F - UW)) - (IW'(1) << F);
      zs[0] <= '0;
    end
  end

  for (genvar j = 0; j < ITER; j++) begin : g_rot
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[j+1] <= 1'b0;
        xs[j+1] <= '0;
        ys[j+1] <= '0;
        zs[j+1] <= '0;
        ts[j+1] <= '0;
      end else begin
        vs[j+1] <= vs[j];
        ts[j+1] <= ts[j];
        if (ys[j] < 0) begin
          xs[j+1] <= xs[j] + (ys[j] >>> SH[j]);
          ys[j+1] <= ys[j] + (xs[j] >>> SH[j]);
          zs[j+1] <= zs[j] - ATANH[j];
        end else begin
          xs[j+1] <= xs[j] - (ys[j] >>> SH[j]);
          ys[j+1] <= ys[j] - (xs[j] >>> SH[j]);
          zs[j+1] <= zs[j] + ATANH[j];
        end
      end
    end
  end

  // ln = 2 z, rounded from F to LNFRAC fraction bits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ln    <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= vs[ITER];
      out_tag   <= ts[ITER];
      out_ln    <= LNW'((zs[ITER] + (IW'(1) <<< (F - LNFRAC - 2))) >>> (F - LNFRAC - 1));
    end
  end
endmodule
