// norm_accumulator: residual energy ||x||^2 - N * ||h_k||^2 for k = 1, 2, ...
//
// The sorted tap powers |h(n_k)|^2 arrive one per valid cycle, strongest
// first. An adder-based accumulator forms ||h_k||^2 = ||h_{k-1}||^2 +
// |h(n_k)|^2 from ||h_0||^2 = 0; the product with N = 2^LOG2N is a left shift
// by LOG2N bits; the result is subtracted from the block energy ||x||^2.
// This is the recursion of the estimator's MDL criterion. Powers and energy
// share PFRAC fraction bits. The output is signed: rounding in earlier stages
// can make the last residuals slightly negative, and the logarithm stage
// saturates such values.
//
// Interface: clear (one cycle, before the first power of a block) zeroes the
// accumulator; in_valid/in_pwr deliver the powers; energy_x must be stable
// while they arrive. out_valid/out_res give the residual for each power.
// Timing: one cycle latency, one power per cycle.
module norm_accumulator
  import tsml_pkg::*;
#(
  parameter int unsigned SHIFT = tsml_pkg::LOG2N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  logic [PW-1:0]        in_pwr,
  input  logic [EW-1:0]        energy_x,
  output logic                 out_valid,
  output logic signed [RW-1:0] out_res
);
  localparam int unsigned ACCW = RW - 1 - SHIFT;

  logic [ACCW-1:0] acc, acc_nx;
  always_comb acc_nx = acc + ACCW'(in_pwr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_res   <= '0;
    end else begin
      out_valid <= in_valid & ~clear;
      if (clear) begin
        acc <= '0;
      end else if (in_valid) begin
        acc     <= acc_nx;
        out_res <= signed'(RW'(energy_x)) - signed'(RW'({acc_nx, SHIFT'(0)}));
      end
    end
  end
endmodule
