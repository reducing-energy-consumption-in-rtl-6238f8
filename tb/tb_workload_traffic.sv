// tb_workload_traffic: runs the kinds of traffic the encoding is evaluated on through all
// three schemes of nocenc_top, at its default 32-bit link width, and reports the link
// activity against an unencoded link carrying the same flits.
//
// Two traffic sets are used, each of NPKT packets of eight flits (head, six body, tail):
//   uniform  independent random payloads (synthetic traffic);
//   stream   a correlated data stream: small signed samples doing a random walk, the kind
//            of data an application core sends. This stream is the testbench's own choice;
//            no application trace is used.
// All payloads are 30 bits wide, so the three schemes carry the same information. Each
// encoder's link output is wired straight to its decoder: a path of any length carries the
// same word sequence. For every scheme the testbench counts coupling activity T1 + 2*T2
// and rising edges, and forms the link power figure rises*Cs + coupling*Cc with the
// line-to-substrate and coupling capacitances 0.237 and 0.947 (fF per unit length).
// It checks that every flit is decoded intact, that Schemes II and III lower the coupling
// activity on both traffic sets and Scheme I never raises it, and that on uniform traffic
// Scheme III does at least as well as Scheme II, and Scheme II as well as Scheme I.
module tb_workload_traffic;
  import nocenc_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 32;
  localparam int FLITS = 8;
  localparam int NPKT = 500;
  localparam real CS = 0.237, CC = 0.947;
  localparam logic [W-1:0] PMASK2 = {2'b00, {(W-2){1'b1}}};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  flit_kind_e in_kind = KIND_BODY;
  logic [W-1:0] in_data = '0;
  logic s1_in_ready, s1_tx_valid, s1_out_valid;
  flit_kind_e s1_tx_kind, s1_out_kind;
  logic [W-1:0] s1_tx_data, s1_out_data;
  logic s2_in_ready, s2_tx_valid, s2_out_valid;
  flit_kind_e s2_tx_kind, s2_out_kind;
  logic [W-1:0] s2_tx_data, s2_out_data;
  logic s3_in_ready, s3_tx_valid, s3_out_valid;
  flit_kind_e s3_tx_kind, s3_out_kind;
  logic [W-1:0] s3_tx_data, s3_out_data;

  int checks = 0, failures = 0;
  longint cpl[4], ris[4];        // index 0: unencoded reference link
  logic [MAXW-1:0] prev[4];
  logic [W-1:0] exp_q[$];
  logic [W-1:0] last_raw;

  nocenc_top dut (
    .clk(clk), .rst_n(rst_n),
    .s1_in_valid(in_valid), .s1_in_ready(s1_in_ready), .s1_in_kind(in_kind), .s1_in_data(in_data),
    .s1_tx_valid(s1_tx_valid), .s1_tx_ready(1'b1), .s1_tx_kind(s1_tx_kind), .s1_tx_data(s1_tx_data),
    .s1_rx_valid(s1_tx_valid), .s1_rx_ready(), .s1_rx_kind(s1_tx_kind), .s1_rx_data(s1_tx_data),
    .s1_out_valid(s1_out_valid), .s1_out_ready(1'b1), .s1_out_kind(s1_out_kind), .s1_out_data(s1_out_data),
    .s2_in_valid(in_valid), .s2_in_ready(s2_in_ready), .s2_in_kind(in_kind), .s2_in_data(in_data),
    .s2_tx_valid(s2_tx_valid), .s2_tx_ready(1'b1), .s2_tx_kind(s2_tx_kind), .s2_tx_data(s2_tx_data),
    .s2_rx_valid(s2_tx_valid), .s2_rx_ready(), .s2_rx_kind(s2_tx_kind), .s2_rx_data(s2_tx_data),
    .s2_out_valid(s2_out_valid), .s2_out_ready(1'b1), .s2_out_kind(s2_out_kind), .s2_out_data(s2_out_data),
    .s3_in_valid(in_valid), .s3_in_ready(s3_in_ready), .s3_in_kind(in_kind), .s3_in_data(in_data),
    .s3_tx_valid(s3_tx_valid), .s3_tx_ready(1'b1), .s3_tx_kind(s3_tx_kind), .s3_tx_data(s3_tx_data),
    .s3_rx_valid(s3_tx_valid), .s3_rx_ready(), .s3_rx_kind(s3_tx_kind), .s3_rx_data(s3_tx_data),
    .s3_out_valid(s3_out_valid), .s3_out_ready(1'b1), .s3_out_kind(s3_out_kind), .s3_out_data(s3_out_data)
  );

  always #5 clk = ~clk;

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The decoders see the word one cycle after it was offered (encoder register).
  always @(posedge clk) if (rst_n) begin
    if (s1_tx_valid && exp_q.size() == 0) fail("no expected flit");
    else begin
    if (s1_tx_valid) begin
      cpl[1] += link_cost(W, prev[1], MAXW'(s1_tx_data));
      ris[1] += rises(W, prev[1], MAXW'(s1_tx_data));
      prev[1] = MAXW'(s1_tx_data);
      checks++;
      if (s1_out_data !== exp_q[0])
        fail($sformatf("scheme 1: decoded %h expected %h", s1_out_data, exp_q[0]));
    end
    if (s2_tx_valid) begin
      cpl[2] += link_cost(W, prev[2], MAXW'(s2_tx_data));
      ris[2] += rises(W, prev[2], MAXW'(s2_tx_data));
      prev[2] = MAXW'(s2_tx_data);
      checks++;
      if (s2_out_data !== exp_q[0])
        fail($sformatf("scheme 2: decoded %h expected %h", s2_out_data, exp_q[0]));
    end
    if (s3_tx_valid) begin
      cpl[3] += link_cost(W, prev[3], MAXW'(s3_tx_data));
      ris[3] += rises(W, prev[3], MAXW'(s3_tx_data));
      prev[3] = MAXW'(s3_tx_data);
      checks++;
      if (s3_out_data !== exp_q[0])
        fail($sformatf("scheme 3: decoded %h expected %h", s3_out_data, exp_q[0]));
    end
      if (s1_tx_valid) void'(exp_q.pop_front());
    end
    if (in_valid) begin
      logic [MAXW-1:0] raw;
      raw = is_head(in_kind) ? MAXW'(in_data) : MAXW'(in_data & PMASK2);
      cpl[0] += link_cost(W, prev[0], raw);
      ris[0] += rises(W, prev[0], raw);
      prev[0] = raw;
      exp_q.push_back(in_data);
    end
  end

  function automatic real pwr(int s);
    return real'(ris[s]) * CS + real'(cpl[s]) * CC;
  endfunction

  task automatic run(string name, bit corr);
    int sample = 0;
    for (int i = 0; i < 4; i++) begin cpl[i] = 0; ris[i] = 0; end
    for (int p = 0; p < NPKT; p++)
      for (int f = 0; f < FLITS; f++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_kind  = (f == 0) ? KIND_HEAD : (f == FLITS - 1) ? KIND_TAIL : KIND_BODY;
        if (f == 0) in_data = {16'h0, 8'(p), 8'($urandom)};
        else if (!corr) in_data = $urandom & PMASK2;
        else begin
          sample = sample + int'($urandom % 33) - 16;
          if (sample > 2000 || sample < -2000) sample = 0;
          in_data = W'(sample) & PMASK2;
        end
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    $display("%s traffic, %0d flits: coupling raw=%0d s1=%0d s2=%0d s3=%0d", name, NPKT * FLITS,
             cpl[0], cpl[1], cpl[2], cpl[3]);
    $display("%s traffic: rising edges raw=%0d s1=%0d s2=%0d s3=%0d", name, ris[0], ris[1], ris[2], ris[3]);
    $display("%s traffic: link power figure saving s1=%0.1f%% s2=%0.1f%% s3=%0.1f%%", name,
             100.0 * (1.0 - pwr(1) / pwr(0)), 100.0 * (1.0 - pwr(2) / pwr(0)), 100.0 * (1.0 - pwr(3) / pwr(0)));
    for (int s = 1; s <= 3; s++) begin
      checks++;
      if (s == 1 ? cpl[s] > cpl[0] : cpl[s] >= cpl[0])
        fail($sformatf("%s: scheme %0d did not lower coupling", name, s));
    end
    if (!corr) begin
      checks++;
      if (!(cpl[3] <= cpl[2] && cpl[2] <= cpl[1])) fail("uniform: schemes not ordered III <= II <= I");
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) prev[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run("uniform", 1'b0);
    run("stream", 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
