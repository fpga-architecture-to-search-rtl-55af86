// conj_pair_mult: multiplies one spectrum value by a template coefficient and
// by the complex conjugate of that coefficient, for a +a/-a filter pair.
//
// The filter that removes a negative acceleration is, in the FFT domain of the
// convolution, the complex conjugate of the filter for the matching positive
// acceleration. Both products come from the same four real multiplications:
//   x*t       = (xr*tr - xi*ti) + j(xr*ti + xi*tr)
//   x*conj(t) = (xr*tr + xi*ti) + j(xi*tr - xr*ti)
// so one stored template and one multiplier serve two filters. Using the
// conjugate for the negative filters follows the design; sharing the products
// and the fixed-point format are this design's own choices.
//
// Interface and timing: combinational. `t` is a signed fraction with
// 2**(TW-1) = 1.0; the products are rounded back to W bits.
module conj_pair_mult #(
  parameter int unsigned W  = 32, // spectrum width per component
  parameter int unsigned TW = 16  // template width per component
) (
  input  logic signed [W-1:0]  x_re,
  input  logic signed [W-1:0]  x_im,
  input  logic signed [TW-1:0] t_re,
  input  logic signed [TW-1:0] t_im,
  output logic signed [W-1:0]  pos_re, // x * t
  output logic signed [W-1:0]  pos_im,
  output logic signed [W-1:0]  neg_re, // x * conj(t)
  output logic signed [W-1:0]  neg_im
);
  localparam int unsigned PW = W + TW + 1;
  localparam int unsigned SH = TW - 1;

  logic signed [PW-1:0] rr, ii, ri, ir;
  logic signed [PW-1:0] s_pr, s_pi, s_nr, s_ni;

  always_comb begin
    rr = PW'(x_re) * PW'(t_re);
    ii = PW'(x_im) * PW'(t_im);
    ri = PW'(x_re) * PW'(t_im);
    ir = PW'(x_im) * PW'(t_re);
    s_pr = rr - ii + PW'(1 << (SH - 1));
    s_pi = ri + ir + PW'(1 << (SH - 1));
    s_nr = rr + ii + PW'(1 << (SH - 1));
    s_ni = ir - ri + PW'(1 << (SH - 1));
    pos_re = W'(s_pr >>> SH);
    pos_im = W'(s_pi >>> SH);
    neg_re = W'(s_nr >>> SH);
    neg_im = W'(s_ni >>> SH);
  end
endmodule
