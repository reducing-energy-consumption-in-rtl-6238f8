// te_block: per-pair detector for even inversion (the "Te" block of the Scheme III encoder).
//
// Mirror of ty_block for the even line of the pair: raises te when the transition of the
// pair (y at time t-1 to raw x at time t) is Type II, or Type I but not one that inverting
// the even line turns into Type II. Summed over all w-1 pairs this gives Te, and even
// inversion lowers the coupling power exactly when Te > (w-1)/2.
//
// Parameter PAIR is the index i of the lower line (line i is even when i is even).
// Combinational.
module te_block
  import nocenc_pkg::*;
#(
  parameter int unsigned PAIR = 0
) (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic       te
);
  localparam logic [1:0] EVEN_MASK = (PAIR % 2 == 0) ? 2'b01 : 2'b10;

  always_comb begin
    te = is_type2(y, x) || (is_type1(y, x) && !is_type2(y, x ^ EVEN_MASK));
  end
endmodule
