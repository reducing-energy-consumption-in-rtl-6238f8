// tb_te_block: exhaustive check of the te pair detector, for a pair starting on an even
// line (PAIR=0) and one starting on an odd line (PAIR=1). The expected flag is 1 exactly
// when inverting the even line of the pair lowers the pair's coupling cost |d(t)-d(t-1)|.
module tb_te_block;
  import tb_ref_pkg::*;
  logic [1:0] x, y;
  logic       f0, f1;
  int checks = 0, failures = 0;

  te_block #(.PAIR(0)) dut0 (.x(x), .y(y), .te(f0));
  te_block #(.PAIR(1)) dut1 (.x(x), .y(y), .te(f1));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e0, e1;
    for (int i = 0; i < 16; i++) begin
      y = 2'(i >> 2);
      x = 2'(i);
      #1;
      e0 = pair_cost(y, x ^ 2'b01) < pair_cost(y, x);
      e1 = pair_cost(y, x ^ 2'b10) < pair_cost(y, x);
      checks += 2;
      if (f0 !== e0) begin failures++; $display("FAIL PAIR=0 y=%b x=%b got %b", y, x, f0); end
      if (f1 !== e1) begin failures++; $display("FAIL PAIR=1 y=%b x=%b got %b", y, x, f1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
