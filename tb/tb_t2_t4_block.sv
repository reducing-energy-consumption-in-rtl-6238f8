// tb_t2_t4_block: exhaustive check of the T2 / T4** detector. t2 must be 1 when full
// inversion lowers the pair's coupling cost, t4 when it raises it (cost |d(t)-d(t-1)|).
module tb_t2_t4_block;
  import tb_ref_pkg::*;
  logic [1:0] x, y;
  logic       t2, t4;
  int checks = 0, failures = 0;

  t2_t4_block dut (.x(x), .y(y), .t2(t2), .t4(t4));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      y = 2'(i >> 2);
      x = 2'(i);
      #1;
      checks += 2;
      if (t2 !== (pair_cost(y, ~x) < pair_cost(y, x))) begin
        failures++; $display("FAIL t2 y=%b x=%b", y, x);
      end
      if (t4 !== (pair_cost(y, ~x) > pair_cost(y, x))) begin
        failures++; $display("FAIL t4 y=%b x=%b", y, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
