// tb_module_a: exhaustive check of the Scheme II decision for W = 32 over all count values.
// The expected choice is the cheapest of: unchanged (relative power 0), odd inversion
// ((w-1) - 2Ty) and full inversion (2(T4** - T2)), preferring unchanged, then odd, on ties.
module tb_module_a;
  localparam int W = 32;
  logic [4:0] n_ty, n_t2, n_t4;
  logic       odd_inv, full_inv;
  int checks = 0, failures = 0;

  module_a #(.W(W)) dut (.n_ty(n_ty), .n_t2(n_t2), .n_t4(n_t4), .odd_inv(odd_inv), .full_inv(full_inv));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p_odd, p_full, best, choice;
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++)
        for (int c = 0; c < 32; c++) begin
          n_ty = 5'(a); n_t2 = 5'(b); n_t4 = 5'(c);
          #1;
          p_odd  = (W - 1) - 2 * a;
          p_full = 2 * (c - b);
          best = 0; choice = 0;
          if (p_odd < best)  begin best = p_odd;  choice = 1; end
          if (p_full < best) begin best = p_full; choice = 2; end
          checks++;
          if (odd_inv !== (choice == 1) || full_inv !== (choice == 2)) begin
            failures++;
            if (failures < 10) $display("FAIL ty=%0d t2=%0d t4=%0d odd=%b full=%b expected %0d", a, b, c, odd_inv, full_inv, choice);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
