// ty_block: per-pair detector for odd inversion (the "Ty" block of the encoders).
//
// Looks at one pair of adjacent link lines (i, i+1): the raw flit bits x at time t and
// the link word y already on the wires (time t-1). It raises ty when inverting the odd
// line of the pair would not make the pair's coupling worse than Type I, i.e. when the
// transition is Type II, or Type I but not one that odd inversion turns into Type II
// (the T1* case). Summed over all w-1 pairs this gives Ty, and odd inversion lowers the
// link's coupling power exactly when Ty > (w-1)/2.
//
// Parameter PAIR is the index i of the lower line; it decides which line of the pair is
// the odd one (line i+1 when i is even, line i when i is odd). Combinational.
module ty_block
  import nocenc_pkg::*;
#(
  parameter int unsigned PAIR = 0
) (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic       ty
);
  localparam logic [1:0] ODD_MASK = (PAIR % 2 == 0) ? 2'b10 : 2'b01;

  always_comb begin
    ty = is_type2(y, x) || (is_type1(y, x) && !is_type2(y, x ^ ODD_MASK));
  end
endmodule
