// module_a: inversion decision of the Scheme II encoder (odd, full or none).
//
// Inputs are the counts, over the w-1 line pairs of a W-line link, of the Ty, T2 and T4**
// detectors. With the self-switching term neglected, the link power of each option,
// relative to sending the flit unchanged, is
//   odd  inversion:  (w-1) - 2*Ty
//   full inversion:  2*(T4** - T2)
// so odd inversion is chosen when Ty > (w-1)/2 and 2(T2 - T4**) < 2Ty - w + 1, and full
// inversion when T2 > T4** and 2(T2 - T4**) > 2Ty - w + 1. These are the document's
// conditions; the two are mutually exclusive. At most one output is high; both low means
// "send unchanged". Combinational, built from adders and comparators.
module module_a #(
  parameter int unsigned W = 32
) (
  input  logic [$clog2(W)-1:0] n_ty,
  input  logic [$clog2(W)-1:0] n_t2,
  input  logic [$clog2(W)-1:0] n_t4,
  output logic                 odd_inv,
  output logic                 full_inv
);
  localparam int unsigned SW = $clog2(W) + 3;
  typedef logic signed [SW-1:0] sval_t;

  sval_t d, e;

  always_comb begin
    d = sval_t'(2) * (sval_t'(n_t2) - sval_t'(n_t4));        // 2(T2 - T4**)
    e = sval_t'(2) * sval_t'(n_ty) - sval_t'(W - 1);        // 2Ty - w + 1
    odd_inv  = (e > 0) && (d < e);
    full_inv = (n_t2 > n_t4) && (d > e);
  end
endmodule
