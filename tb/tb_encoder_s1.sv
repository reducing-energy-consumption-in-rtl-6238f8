// tb_encoder_s1: self-checking testbench of the Scheme I encoder at W = 32.
//
// Packets of eight flits (head, six body, tail) with random payloads and a few directed
// patterns are pushed through the encoder while the link side stalls at random. A
// reference model (tb_ref_pkg) tries every inversion the scheme allows against the last
// word on the link and keeps the cheapest; each link word must match it. Also checked:
// head flits are unchanged, the word appears one cycle after it is accepted, one flit per
// cycle when nothing stalls, and the coupling cost of an encoded flit never exceeds that
// of the raw flit. Each inversion kind the scheme has must occur at least once.
module tb_encoder_s1;
  import nocenc_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 32;
  localparam int NC = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, link_valid, link_ready = 1'b0;
  flit_kind_e in_kind = KIND_BODY, link_kind;
  logic [W-1:0] in_data = '0, link_data;

  int checks = 0, failures = 0;
  int n_kind[4];               // 0 none, 1 odd, 2 full, 3 even
  int n_head = 0, n_stall = 0;
  longint cost_raw = 0, cost_enc = 0;
  logic [MAXW-1:0] ref_prev = '0;
  logic [W-1:0] exp_q[$];
  flit_kind_e   expk_q[$];
  logic         chk_next = 1'b0;
  logic [W-1:0] chk_word;
  int           stall_pct = 30;
  logic         acc = 1'b0;

  encoder_s1 #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  // Monitor: model and scoreboard, sampled on the rising edge.
  always @(posedge clk) if (rst_n) begin
    if (chk_next) begin
      checks++;
      if (!link_valid || link_data !== chk_word) fail($sformatf("latency: word not on link one cycle after accept (%h)", chk_word));
    end
    chk_next <= 1'b0;
    if (link_valid && !link_ready) n_stall++;
    if (link_valid && link_ready) begin
      checks++;
      if (exp_q.size() == 0) fail("unexpected link word");
      else begin
        logic [W-1:0] e; flit_kind_e k;
        e = exp_q.pop_front(); k = expk_q.pop_front();
        if (link_data !== e || link_kind !== k) fail($sformatf("link %h/%0d expected %h/%0d", link_data, link_kind, e, k));
      end
    end
    acc = in_valid && in_ready;
    if (acc) begin
      logic [MAXW-1:0] raw, enc;
      if (is_head(in_kind)) begin
        enc = MAXW'(in_data);
        n_head++;
      end else begin
        raw = MAXW'(in_data) & ~(all_mask(W) & ~((MAXW'(1) << (W - NC)) - 1));
        enc = ref_encode(1, W, raw, ref_prev);
        cost_raw += link_cost(W, ref_prev, raw);
        cost_enc += link_cost(W, ref_prev, enc);
        checks++;
        if (link_cost(W, ref_prev, enc) > link_cost(W, ref_prev, raw)) fail("encoding raised the cost");
        if (enc == raw) n_kind[0]++;
        else if (enc == (raw ^ odd_mask(W))) n_kind[1]++;
        else if (enc == (raw ^ all_mask(W))) n_kind[2]++;
        else n_kind[3]++;
      end
      exp_q.push_back(W'(enc));
      expk_q.push_back(in_kind);
      ref_prev = enc;
      chk_next <= 1'b1;
      chk_word <= W'(enc);
    end
  end

  // Sink: random backpressure.
  always @(negedge clk) link_ready <= ($urandom % 100) >= stall_pct;

  // Offer one flit from a falling edge; the monitor flags the rising edge that takes it.
  task automatic send(flit_kind_e k, logic [W-1:0] d);
    @(negedge clk);
    in_valid = 1'b1; in_kind = k; in_data = d;
    do @(negedge clk); while (!acc);
    in_valid = 1'b0;
  endtask

  initial begin
    for (int k = 0; k < 4; k++) n_kind[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Directed: alternating patterns give all Type II transitions (full inversion helps),
    // and a single-line change pattern exercises the odd/even choice.
    send(KIND_HEAD, 32'h0000_0000);
    send(KIND_BODY, 32'h1555_5555);
    send(KIND_BODY, 32'h2AAA_AAAA);
    send(KIND_BODY, 32'h1555_5555);
    send(KIND_BODY, 32'h0000_0001);
    send(KIND_BODY, 32'h0000_0002);
    send(KIND_TAIL, 32'h3333_3333);
    send(KIND_HEADTAIL, 32'hFFFF_0000);
    for (int p = 0; p < 300; p++) begin
      send(KIND_HEAD, $urandom);
      for (int f = 0; f < 6; f++) send(KIND_BODY, $urandom);
      send(KIND_TAIL, $urandom);
    end
    // Throughput: no stalls, one flit accepted per cycle.
    stall_pct = 0;
    repeat (3) @(posedge clk);
    begin
      int n_acc = 0;
      @(negedge clk);
      in_valid = 1'b1; in_kind = KIND_BODY;
      for (int c = 0; c < 64; c++) begin
        in_data = $urandom;
        @(negedge clk);
        if (acc) n_acc++;
      end
      in_valid = 1'b0;
      checks++;
      if (n_acc != 64) fail($sformatf("throughput: %0d flits in 64 cycles", n_acc));
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) fail("words left undelivered");
    $display("heads=%0d none=%0d odd=%0d full=%0d even=%0d stalls=%0d coupling raw=%0d encoded=%0d",
             n_head, n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_stall, cost_raw, cost_enc);
    checks++;
    if (n_head == 0 || n_kind[0] == 0 || n_kind[1] == 0 || n_stall == 0) fail("a mechanism never occurred");
    if (1 >= 2 && n_kind[2] == 0) fail("full inversion never occurred");
    if (1 == 3 && n_kind[3] == 0) fail("even inversion never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
