// tb_ones_counter: checks the Ones block against $countones on edge and random inputs,
// for the 31-input size the 32-bit link encoders use.
module tb_ones_counter;
  localparam int unsigned N = 31;
  logic [N-1:0] bits;
  logic [4:0]   count;
  int checks = 0, failures = 0;

  ones_counter #(.N(N)) dut (.bits(bits), .count(count));

  task automatic check(logic [N-1:0] v);
    bits = v;
    #1;
    checks++;
    if (int'(count) != $countones(v)) begin
      failures++;
      $display("FAIL bits=%h count=%0d expected=%0d", v, count, $countones(v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check('1);
    for (int i = 0; i < N; i++) check(N'(1) << i);
    for (int i = 0; i < 3000; i++) check(N'({$urandom, $urandom}) & N'({$urandom, $urandom}));
    for (int i = 0; i < 3000; i++) check(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
