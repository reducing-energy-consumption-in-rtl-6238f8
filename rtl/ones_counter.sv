// ones_counter: the "Ones" block of the encoders. Counts how many of its N inputs are 1.
//
// Interface: bits[N-1:0] in, count out ($clog2(N+1) bits; 5 bits for the 31 line pairs of
// a 32-bit link, matching the log2(w) output width the encoder architecture calls for).
// Timing: purely combinational. The adder structure is left to synthesis; the counter
// is written as a plain sum, which is this design's choice.
module ones_counter #(
  parameter int unsigned N = 31
) (
  input  logic [N-1:0]             bits,
  output logic [$clog2(N+1)-1:0]   count
);
  always_comb begin
    count = '0;
    for (int i = 0; i < N; i++) count = count + ($clog2(N+1))'(bits[i]);
  end
endmodule
