// t2_t4_block: per-pair detector of the Type II and T4** transitions (Schemes II and III).
//
// For one pair of adjacent lines, t2 is high for a Type II transition (01 <-> 10), which
// full inversion turns into Type IV, and t4 is high for a Type IV transition whose pair
// holds 01 or 10 (T4**), which full inversion would turn into Type II. Full inversion pays
// off when the count of the first exceeds the count of the second. Combinational; the
// same for every pair, so it has no parameter.
module t2_t4_block
  import nocenc_pkg::*;
(
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic       t2,
  output logic       t4
);
  always_comb begin
    t2 = is_type2(y, x);
    t4 = (x == y) && (x[0] != x[1]);
  end
endmodule
