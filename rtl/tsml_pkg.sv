// tsml_pkg: sizes, fixed-point formats and shared types of the tap-selective
// maximum-likelihood (TSML) channel estimator.
//
// The block sizes N = 32 (training length / FFT size) and L = 16 (cyclic-prefix
// length = channel length) are the configuration evaluated for the design.
// All word widths and fraction lengths are choices of this implementation:
//   complex samples r, x, h_hat : signed 16 bit, 11 fraction bits (Q4.11)
//   tap power |h|^2             : unsigned 32 bit, 22 fraction bits
//   block energy ||x||^2        : unsigned 40 bit, 22 fraction bits
//   residual / log input        : signed 42 bit, 22 fraction bits
//   natural logarithm           : signed 20 bit, 16 fraction bits (Q3.16)
//   MDL metric                  : signed 28 bit, 16 fraction bits
package tsml_pkg;

  localparam int unsigned N      = 32;
  localparam int unsigned LOG2N  = 5;
  localparam int unsigned L      = 16;

  localparam int unsigned DW     = 16;   // complex component width
  localparam int unsigned DFRAC  = 11;
  localparam int unsigned PW     = 32;   // power width
  localparam int unsigned PFRAC  = 2 * DFRAC;
  localparam int unsigned EW     = 40;   // energy width
  localparam int unsigned RW     = EW + 2;  // signed residual width
  localparam int unsigned LNW    = 20;   // logarithm width
  localparam int unsigned LNFRAC = 16;
  localparam int unsigned MW     = 28;   // MDL width

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  localparam real PI = 3.14159265358979323846;

  // Round a real to the nearest integer (ties away from zero).
  function automatic longint round_r(real v);
    return (v >= 0.0) ? longint'($rtoi($floor(v + 0.5))) : -longint'($rtoi($floor(-v + 0.5)));
  endfunction

endpackage
