// tb_module_c: checks the Scheme III decision for W = 32 on all (Ty, Te) pairs with random
// (T2, T4**), and on random count sets. The expected choice is the cheapest of unchanged,
// odd ((w-1)-2Ty), full (2(T4**-T2)) and even ((w-1)-2Te), computed here from a table of
// option costs, with ties going to the earlier option in that order.
module tb_module_c;
  localparam int W = 32;
  logic [4:0] n_ty, n_te, n_t2, n_t4;
  logic       odd_inv, even_inv, full_inv;
  int checks = 0, failures = 0;

  module_c #(.W(W)) dut (.n_ty(n_ty), .n_te(n_te), .n_t2(n_t2), .n_t4(n_t4),
                         .odd_inv(odd_inv), .even_inv(even_inv), .full_inv(full_inv));

  task automatic check(int a, int e, int b, int c);
    int cost[4];
    int choice;
    n_ty = 5'(a); n_te = 5'(e); n_t2 = 5'(b); n_t4 = 5'(c);
    #1;
    cost[0] = 0;
    cost[1] = (W - 1) - 2 * a;
    cost[2] = 2 * (c - b);
    cost[3] = (W - 1) - 2 * e;
    choice = 0;
    for (int k = 1; k < 4; k++) if (cost[k] < cost[choice]) choice = k;
    checks++;
    if (odd_inv !== (choice == 1) || full_inv !== (choice == 2) || even_inv !== (choice == 3)) begin
      failures++;
      if (failures < 10)
        $display("FAIL ty=%0d te=%0d t2=%0d t4=%0d got odd=%b full=%b even=%b expected %0d",
                 a, e, b, c, odd_inv, full_inv, even_inv, choice);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++)
      for (int e = 0; e < 32; e++)
        for (int k = 0; k < 8; k++) check(a, e, $urandom % 32, $urandom % 32);
    for (int i = 0; i < 20000; i++) check($urandom % 32, $urandom % 32, $urandom % 32, $urandom % 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
