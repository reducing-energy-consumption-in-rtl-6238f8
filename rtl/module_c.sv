// module_c: inversion decision of the Scheme III encoder (odd, even, full or none).
//
// Inputs are the counts, over the w-1 line pairs, of the Ty, Te, T2 and T4** detectors.
// The coupling power of each option relative to sending the flit unchanged is
//   odd:  (w-1) - 2*Ty     even: (w-1) - 2*Te     full: 2*(T4** - T2)
// and the option with the lowest value is taken. On a tie the earlier of none, odd, full,
// even wins, so the encoder only inverts for a strict saving; that order is this design's
// choice. At most one output is high. Combinational.
module module_c #(
  parameter int unsigned W = 32
) (
  input  logic [$clog2(W)-1:0] n_ty,
  input  logic [$clog2(W)-1:0] n_te,
  input  logic [$clog2(W)-1:0] n_t2,
  input  logic [$clog2(W)-1:0] n_t4,
  output logic                 odd_inv,
  output logic                 even_inv,
  output logic                 full_inv
);
  localparam int unsigned SW = $clog2(W) + 3;
  typedef logic signed [SW-1:0] sval_t;

  sval_t d_odd, d_even, d_full, best;

  always_comb begin
    d_odd  = sval_t'(W - 1) - sval_t'(2) * sval_t'(n_ty);
    d_even = sval_t'(W - 1) - sval_t'(2) * sval_t'(n_te);
    d_full = sval_t'(2) * (sval_t'(n_t4) - sval_t'(n_t2));
    odd_inv  = 1'b0;
    even_inv = 1'b0;
    full_inv = 1'b0;
    best     = '0;
    if (d_odd < best) begin
      best = d_odd; odd_inv = 1'b1;
    end
    if (d_full < best) begin
      best = d_full; odd_inv = 1'b0; full_inv = 1'b1;
    end
    if (d_even < best) begin
      odd_inv = 1'b0; full_inv = 1'b0; even_inv = 1'b1;
    end
  end
endmodule
