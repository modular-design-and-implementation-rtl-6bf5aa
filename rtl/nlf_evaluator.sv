// nlf_evaluator: natural logarithm over a wide input range.
//
// Three steps: range reduction (range_reduction) maps u to u' in [0.5, 1)
// with u = u' * 2^m; the CORDIC function approximation (cordic_ln) computes
// ln(u') on that interval; range reconstruction adds m * ln(2) (a constant
// coefficient multiplier and an adder):
//     ln(u) = ln(u') + m * ln(2).
// This is the estimator's logarithm unit. The input range covered is
// [2^-5, 2^7); inputs outside it saturate (see range_reduction). The register
// after range reduction and the widths are this design's choices.
//
// Interface: in_valid/in_u, u signed with UFRAC fraction bits; out_valid/
// out_ln, ln(u) signed with LNFRAC (16) fraction bits.
// Timing: latency ITER + 4 cycles (18-step CORDIC: 22 cycles), full throughput.
module nlf_evaluator
  import tsml_pkg::*;
#(
  parameter int unsigned UW    = tsml_pkg::RW,
  parameter int unsigned UFRAC = tsml_pkg::PFRAC,
  parameter int unsigned ITER  = 18
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [UW-1:0]   in_u,
  output logic                   out_valid,
  output logic signed [LNW-1:0]  out_ln
);
  localparam int unsigned OFRAC = 24;
  // ln(2) with LNFRAC fraction bits
  localparam logic signed [LNW-1:0] LN2 = LNW'(round_r($ln(2.0) * real'(2 ** LNFRAC)));

  logic [OFRAC-1:0]     u_red, u_red_q;
  logic [3:0]           sel;
  logic signed [4:0]    m;
  logic signed [4:0]    m_q;
  logic                 v_q;

  range_reduction #(.UW(UW), .UFRAC(UFRAC), .OFRAC(OFRAC)) u_rr (
    .u(in_u), .u_red(u_red), .sel(sel), .m(m));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q     <= 1'b0;
      u_red_q <= OFRAC'(1) << (OFRAC - 1);
      m_q     <= '0;
    end else begin
      v_q     <= in_valid;
      u_red_q <= u_red;
      m_q     <= m;
    end
  end

  logic                  v_c;
  logic signed [LNW-1:0] ln_c;
  logic [4:0]            m_c;

  cordic_ln #(.UW(OFRAC), .ITER(ITER), .TAG_W(5)) u_ln (
    .clk(clk), .rst_n(rst_n), .in_valid(v_q), .in_u(u_red_q), .in_tag(m_q),
    .out_valid(v_c), .out_ln(ln_c), .out_tag(m_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ln    <= '0;
    end else begin
      out_valid <= v_c;
      out_ln    <= ln_c + LNW'(signed'(m_c) * LN2);
    end
  end

  // the segment index itself is only used inside the reduction
  logic unused_sel;
  assign unused_sel = ^sel;
endmodule
