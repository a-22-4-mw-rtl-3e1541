// Fuzzy classifier with a linearized membership function.
//
// The membership of a gradient vector g to a class with threshold vector c is
// u = max(0, t - (SAD(g, c) << s)), where SAD is the sum over the four
// directions of |g_d - c_d|. This is the piecewise-linear (pyramid) form of
// the Epanechnikov function w^2 - ||g - c||^2: the square and the division
// by w^2 are replaced by a shift by s and a subtraction from the offset t,
// so no multiplier or divider is needed. s and t are configuration inputs.
// In one dimension t - (|x - c| << s) is the rising branch (x << s) + t0 for
// x < c and the falling branch -(x << s) + t1 for x > c, with
// t0 = t - (c << s) and t1 = t + (c << s); summing the four dimensions before
// the shift, with one s and t for all classes, is this design's choice.
// The four absolute differences use carry generator / XOR pairs as in the GCU,
// then an adder, a shifter, a subtractor and a clamp to zero. The result is
// FW (10) bits wide. Purely combinational.
module fuzzy_classifier
  import cfed_pkg::*;
(
  input  gvec_t          grad,
  input  gvec_t          cvec,
  input  logic [SHW-1:0] shift,
  input  memb_t          offset,
  output memb_t          memb
);

  localparam int SW = GW + 2;                 // SAD of four 9-bit values
  localparam int XW = SW + (1 << SHW) - 1;    // after the largest shift

  logic [SW-1:0] sad;
  logic [XW-1:0] scaled;

  always_comb begin
    sad = '0;
    for (int d = 0; d < NDIR; d++) begin
      if (grad[d] >= cvec[d]) sad = sad + SW'(grad[d] - cvec[d]);
      else                    sad = sad + SW'(cvec[d] - grad[d]);
    end
    scaled = XW'(sad) << shift;
    // Subtract and clamp at zero (the MUX after the subtractor).
    if (scaled >= XW'(offset)) memb = '0;
    else                       memb = offset - FW'(scaled);
  end

endmodule
