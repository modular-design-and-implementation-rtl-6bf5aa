// cordic_power: power |z|^2 of a complex sample, computed the CORDIC way.
//
// Step 1, magnitude: a circular CORDIC in vectoring mode rotates (re, im)
// onto the positive real axis with shift-and-add micro-rotations; the final x
// equals K*|z| with the CORDIC gain K = prod sqrt(1 + 2^-2i) ~ 1.6468. The
// rotator does not remove the gain itself: a constant-coefficient multiplier
// by 1/K follows it. Step 2, power: a multiplier squares the magnitude.
// This is the structure the estimator uses for both h_hat and x. As in any
// rectangular-to-polar CORDIC, the rotator also accumulates the angle of the
// sample from a table of atan(2^-i); it comes out with the power (the
// estimator itself only needs the power). A pre-stage folds the left
// half-plane onto the right one (negating both components, which keeps the
// magnitude and adds pi to the angle) so the rotations converge for any
// input. Guard bits, iteration count, angle format and the unrolled
// one-stage-per-iteration pipeline are this design's choices.
//
// Interface: in_valid/in_z/in_tag, one sample per cycle; out_valid/out_pwr/
// out_ang/out_tag. in_z is Q4.11, out_pwr is unsigned with PFRAC (22)
// fraction bits, saturated to PW bits. out_ang is the angle in [-pi, pi) as a
// signed AGW-bit fraction of pi (2^(AGW-1) stands for pi, so it wraps like an
// angle). The tag travels with its sample.
// Timing: latency ITER + 3 cycles, full throughput.
module cordic_power
  import tsml_pkg::*;
#(
  parameter int unsigned ITER  = 14,
  parameter int unsigned TAG_W = 5,
  parameter int unsigned AGW   = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  cplx_t              in_z,
  input  logic [TAG_W-1:0]   in_tag,
  output logic               out_valid,
  output logic [PW-1:0]      out_pwr,
  output logic signed [AGW-1:0] out_ang,
  output logic [TAG_W-1:0]   out_tag
);
  localparam int unsigned G     = 5;            // guard fraction bits
  localparam int unsigned IW    = DW + 2 + G;   // rotator width
  localparam int unsigned KFRAC = 17;
  // 1/K for ITER micro-rotations
  function automatic longint mk_kinv();
    real k;
    k = 1.0;
    for (int i = 0; i < ITER; i++) k = k * $sqrt(1.0 + 2.0 ** (-2.0 * real'(i)));
    return round_r(real'(2 ** KFRAC) / k);
  endfunction
  localparam logic [KFRAC:0] KINV = (KFRAC + 1)'(mk_kinv());
  // angle accumulator: ZW bits, 2^(ZW-1) = pi
  localparam int unsigned ZW = AGW + 4;
  typedef logic signed [ZW-1:0] ang_t;
  function automatic ang_t mk_atan(int i);
    return ang_t'(round_r($atan(2.0 ** (-real'(i))) / PI * (2.0 ** (ZW - 1))));
  endfunction
  localparam int unsigned MAGW  = IW + KFRAC + 1;
  localparam int unsigned SQW   = 2 * IW;

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic                 vs [ITER+1];
  logic [TAG_W-1:0]     ts [ITER+1];
  ang_t                 zs [ITER+1];

  // fold into the right half-plane
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[0] <= 1'b0;
      xs[0] <= '0;
      ys[0] <= '0;
      ts[0] <= '0;
      zs[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      ts[0] <= in_tag;
      if (in_z.re < 0) begin
        xs[0] <= -(IW'(in_z.re) <<< G);
        ys[0] <= -(IW'(in_z.im) <<< G);
        zs[0] <= ang_t'(1) <<< (ZW - 1);   // pi (= -pi)
      end else begin
        xs[0] <= IW'(in_z.re) <<< G;
        ys[0] <= IW'(in_z.im) <<< G;
        zs[0] <= '0;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_rot
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[i+1] <= 1'b0;
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        ts[i+1] <= '0;
        zs[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        ts[i+1] <= ts[i];
        if (ys[i] >= 0) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + mk_atan(i);
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - mk_atan(i);
        end
      end
    end
  end

  // gain compensation and squaring
  logic             v_m;
  logic [TAG_W-1:0] t_m;
  ang_t             z_m;
  logic [IW-1:0]    mag;
  logic [MAGW-1:0]  mag_full;
  logic [SQW-1:0]   sq;

  always_comb begin
    mag_full = MAGW'(unsigned'(xs[ITER])) * MAGW'(KINV);
    sq       = SQW'(mag) * SQW'(mag);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_m       <= 1'b0;
      t_m       <= '0;
      z_m       <= '0;
      mag       <= '0;
      out_valid <= 1'b0;
      out_pwr   <= '0;
      out_ang   <= '0;
      out_tag   <= '0;
    end else begin
      v_m <= vs[ITER];
      t_m <= ts[ITER];
      z_m <= zs[ITER];
      // round to AGW bits; a carry past pi wraps to -pi, as an angle should
      out_ang <= AGW'((z_m + (ang_t'(1) <<< (ZW - AGW - 1))) >>> (ZW - AGW));
      mag <= IW'((mag_full + (MAGW'(1) << (KFRAC - 1))) >> KFRAC);
      out_valid <= v_m;
      out_tag   <= t_m;
      // sq has 2*(DFRAC+G) fraction bits; keep PFRAC = 2*DFRAC of them
      if (((sq + (SQW'(1) << (2 * G - 1))) >> (2 * G)) > SQW'({PW{1'b1}}))
        out_pwr <= '1;
      else
        out_pwr <= PW'((sq + (SQW'(1) << (2 * G - 1))) >> (2 * G));
    end
  end
endmodule
