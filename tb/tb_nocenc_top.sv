// tb_nocenc_top: end-to-end test of the three encoded channels at the default link width.
//
// Each channel sends NPKT packets of FLITS flits (head, body..., tail) from a source through
// its encoder, a behavioural multi-hop network path with random stalls (noc_path_model),
// and its decoder into a sink that also stalls at random. Every flit delivered must equal
// the flit sent. The testbench counts how often each mechanism happened (head flit left
// unencoded, no/odd/full/even inversion, network backpressure on the encoder, sink
// backpressure on the decoder) and fails if one never did. It also measures the coupling
// activity the links saw with and without encoding and reports the saving per scheme.
module tb_nocenc_top;
  import nocenc_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 32;
  localparam int FLITS = 8;
  localparam int NPKT = 200;
  localparam int NC1 = 1, NC2 = 2, NC3 = 2;
  typedef enum int {M_HEAD, M_NONE, M_ODD, M_FULL, M_EVEN, M_LINK_STALL, M_SINK_STALL, M_N} mech_e;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s1_in_valid, s1_in_ready, s1_tx_valid, s1_tx_ready, s1_rx_valid, s1_rx_ready, s1_out_valid, s1_out_ready;
  flit_kind_e s1_in_kind, s1_tx_kind, s1_rx_kind, s1_out_kind;
  logic [W-1:0] s1_in_data, s1_tx_data, s1_rx_data, s1_out_data;
  logic s2_in_valid, s2_in_ready, s2_tx_valid, s2_tx_ready, s2_rx_valid, s2_rx_ready, s2_out_valid, s2_out_ready;
  flit_kind_e s2_in_kind, s2_tx_kind, s2_rx_kind, s2_out_kind;
  logic [W-1:0] s2_in_data, s2_tx_data, s2_rx_data, s2_out_data;
  logic s3_in_valid, s3_in_ready, s3_tx_valid, s3_tx_ready, s3_rx_valid, s3_rx_ready, s3_out_valid, s3_out_ready;
  flit_kind_e s3_in_kind, s3_tx_kind, s3_rx_kind, s3_out_kind;
  logic [W-1:0] s3_in_data, s3_tx_data, s3_rx_data, s3_out_data;

  int checks = 0, failures = 0;
  int n_mech[M_N];
  longint cost_enc[4];
  logic done_src[4];

  nocenc_top dut (.*);

  noc_path_model #(.W(W), .HOPS(2 + 1), .STALL_PCT(15)) u_path_s1 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(s1_tx_valid), .in_ready(s1_tx_ready), .in_kind(s1_tx_kind), .in_data(s1_tx_data),
    .out_valid(s1_rx_valid), .out_ready(s1_rx_ready), .out_kind(s1_rx_kind), .out_data(s1_rx_data)
  );

  noc_path_model #(.W(W), .HOPS(2 + 2), .STALL_PCT(15)) u_path_s2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(s2_tx_valid), .in_ready(s2_tx_ready), .in_kind(s2_tx_kind), .in_data(s2_tx_data),
    .out_valid(s2_rx_valid), .out_ready(s2_rx_ready), .out_kind(s2_rx_kind), .out_data(s2_rx_data)
  );

  noc_path_model #(.W(W), .HOPS(2 + 3), .STALL_PCT(15)) u_path_s3 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(s3_tx_valid), .in_ready(s3_tx_ready), .in_kind(s3_tx_kind), .in_data(s3_tx_data),
    .out_valid(s3_rx_valid), .out_ready(s3_rx_ready), .out_kind(s3_rx_kind), .out_data(s3_rx_data)
  );

  always #5 clk = ~clk;

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- channel 1
  logic [W-1:0] sent1[$];
  flit_kind_e   sentk1[$];
  logic [MAXW-1:0] prev1 = '0;
  int got1 = 0;
  logic acc1 = 1'b0;
  initial begin
    s1_in_valid = 1'b0; s1_in_kind = KIND_BODY; s1_in_data = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int p = 0; p < NPKT; p++)
      for (int f = 0; f < FLITS; f++) begin
        s1_in_valid = 1'b1;
        s1_in_kind  = (f == 0) ? KIND_HEAD : (f == FLITS - 1) ? KIND_TAIL : KIND_BODY;
        // Every 16th packet carries an alternating pattern (mostly Type II transitions).
        s1_in_data  = (p % 16 == 5 && f > 0) ? ((f % 2) ? 32'h5555_5555 : 32'hAAAA_AAAA) : $urandom;
        do @(negedge clk); while (!acc1);
      end
    s1_in_valid = 1'b0;
    done_src[1] = 1'b1;
  end
  always @(negedge clk) s1_out_ready <= ($urandom % 100) >= 25;
  always @(posedge clk) if (rst_n) begin
    acc1 = s1_in_valid && s1_in_ready;
    if (acc1) begin
      if (is_head(s1_in_kind)) sent1.push_back(s1_in_data);
      else sent1.push_back(s1_in_data & W'((MAXW'(1) << (W - NC1)) - 1));
      sentk1.push_back(s1_in_kind);
    end
    if (s1_tx_valid && !s1_tx_ready) n_mech[M_LINK_STALL]++;
    if (s1_out_valid && !s1_out_ready) n_mech[M_SINK_STALL]++;
    if (s1_tx_valid && s1_tx_ready) begin
      if (is_head(s1_tx_kind)) n_mech[M_HEAD]++;
      else begin
        logic [1:0] ctl;
        ctl = (NC1 == 1) ? {s1_tx_data[W-1], 1'b0} : s1_tx_data[W-1:W-2];
        case (ctl)
          2'b00: n_mech[M_NONE]++;
          2'b10: n_mech[M_ODD]++;
          2'b11: n_mech[M_FULL]++;
          default: n_mech[M_EVEN]++;
        endcase
        cost_enc[1] += link_cost(W, prev1, MAXW'(s1_tx_data));
      end
      prev1 = MAXW'(s1_tx_data);
    end
    if (s1_out_valid && s1_out_ready) begin
      checks++;
      got1++;
      if (sent1.size() == 0) fail($sformatf("ch1: unexpected flit %h", s1_out_data));
      else begin
        logic [W-1:0] e; flit_kind_e k;
        e = sent1.pop_front(); k = sentk1.pop_front();
        if (e !== s1_out_data || k !== s1_out_kind) fail($sformatf("ch1: got %h/%0d expected %h/%0d", s1_out_data, s1_out_kind, e, k));
      end
    end
  end

  // ---- channel 2
  logic [W-1:0] sent2[$];
  flit_kind_e   sentk2[$];
  logic [MAXW-1:0] prev2 = '0;
  int got2 = 0;
  logic acc2 = 1'b0;
  initial begin
    s2_in_valid = 1'b0; s2_in_kind = KIND_BODY; s2_in_data = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int p = 0; p < NPKT; p++)
      for (int f = 0; f < FLITS; f++) begin
        s2_in_valid = 1'b1;
        s2_in_kind  = (f == 0) ? KIND_HEAD : (f == FLITS - 1) ? KIND_TAIL : KIND_BODY;
        // Every 16th packet carries an alternating pattern (mostly Type II transitions).
        s2_in_data  = (p % 16 == 5 && f > 0) ? ((f % 2) ? 32'h5555_5555 : 32'hAAAA_AAAA) : $urandom;
        do @(negedge clk); while (!acc2);
      end
    s2_in_valid = 1'b0;
    done_src[2] = 1'b1;
  end
  always @(negedge clk) s2_out_ready <= ($urandom % 100) >= 25;
  always @(posedge clk) if (rst_n) begin
    acc2 = s2_in_valid && s2_in_ready;
    if (acc2) begin
      if (is_head(s2_in_kind)) sent2.push_back(s2_in_data);
      else sent2.push_back(s2_in_data & W'((MAXW'(1) << (W - NC2)) - 1));
      sentk2.push_back(s2_in_kind);
    end
    if (s2_tx_valid && !s2_tx_ready) n_mech[M_LINK_STALL]++;
    if (s2_out_valid && !s2_out_ready) n_mech[M_SINK_STALL]++;
    if (s2_tx_valid && s2_tx_ready) begin
      if (is_head(s2_tx_kind)) n_mech[M_HEAD]++;
      else begin
        logic [1:0] ctl;
        ctl = (NC2 == 1) ? {s2_tx_data[W-1], 1'b0} : s2_tx_data[W-1:W-2];
        case (ctl)
          2'b00: n_mech[M_NONE]++;
          2'b10: n_mech[M_ODD]++;
          2'b11: n_mech[M_FULL]++;
          default: n_mech[M_EVEN]++;
        endcase
        cost_enc[2] += link_cost(W, prev2, MAXW'(s2_tx_data));
      end
      prev2 = MAXW'(s2_tx_data);
    end
    if (s2_out_valid && s2_out_ready) begin
      checks++;
      got2++;
      if (sent2.size() == 0) fail($sformatf("ch2: unexpected flit %h", s2_out_data));
      else begin
        logic [W-1:0] e; flit_kind_e k;
        e = sent2.pop_front(); k = sentk2.pop_front();
        if (e !== s2_out_data || k !== s2_out_kind) fail($sformatf("ch2: got %h/%0d expected %h/%0d", s2_out_data, s2_out_kind, e, k));
      end
    end
  end

  // ---- channel 3
  logic [W-1:0] sent3[$];
  flit_kind_e   sentk3[$];
  logic [MAXW-1:0] prev3 = '0;
  int got3 = 0;
  logic acc3 = 1'b0;
  initial begin
    s3_in_valid = 1'b0; s3_in_kind = KIND_BODY; s3_in_data = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int p = 0; p < NPKT; p++)
      for (int f = 0; f < FLITS; f++) begin
        s3_in_valid = 1'b1;
        s3_in_kind  = (f == 0) ? KIND_HEAD : (f == FLITS - 1) ? KIND_TAIL : KIND_BODY;
        // Every 16th packet carries an alternating pattern (mostly Type II transitions).
        s3_in_data  = (p % 16 == 5 && f > 0) ? ((f % 2) ? 32'h5555_5555 : 32'hAAAA_AAAA) : $urandom;
        do @(negedge clk); while (!acc3);
      end
    s3_in_valid = 1'b0;
    done_src[3] = 1'b1;
  end
  always @(negedge clk) s3_out_ready <= ($urandom % 100) >= 25;
  always @(posedge clk) if (rst_n) begin
    acc3 = s3_in_valid && s3_in_ready;
    if (acc3) begin
      if (is_head(s3_in_kind)) sent3.push_back(s3_in_data);
      else sent3.push_back(s3_in_data & W'((MAXW'(1) << (W - NC3)) - 1));
      sentk3.push_back(s3_in_kind);
    end
    if (s3_tx_valid && !s3_tx_ready) n_mech[M_LINK_STALL]++;
    if (s3_out_valid && !s3_out_ready) n_mech[M_SINK_STALL]++;
    if (s3_tx_valid && s3_tx_ready) begin
      if (is_head(s3_tx_kind)) n_mech[M_HEAD]++;
      else begin
        logic [1:0] ctl;
        ctl = (NC3 == 1) ? {s3_tx_data[W-1], 1'b0} : s3_tx_data[W-1:W-2];
        case (ctl)
          2'b00: n_mech[M_NONE]++;
          2'b10: n_mech[M_ODD]++;
          2'b11: n_mech[M_FULL]++;
          default: n_mech[M_EVEN]++;
        endcase
        cost_enc[3] += link_cost(W, prev3, MAXW'(s3_tx_data));
      end
      prev3 = MAXW'(s3_tx_data);
    end
    if (s3_out_valid && s3_out_ready) begin
      checks++;
      got3++;
      if (sent3.size() == 0) fail($sformatf("ch3: unexpected flit %h", s3_out_data));
      else begin
        logic [W-1:0] e; flit_kind_e k;
        e = sent3.pop_front(); k = sentk3.pop_front();
        if (e !== s3_out_data || k !== s3_out_kind) fail($sformatf("ch3: got %h/%0d expected %h/%0d", s3_out_data, s3_out_kind, e, k));
      end
    end
  end

  initial begin
    for (int i = 0; i < M_N; i++) n_mech[i] = 0;
    for (int i = 0; i < 4; i++) begin cost_enc[i] = 0; done_src[i] = 1'b0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_src[1] && done_src[2] && done_src[3]);
    repeat (100) @(posedge clk);
    checks++;
    if (got1 != NPKT * FLITS || got2 != NPKT * FLITS || got3 != NPKT * FLITS)
      fail($sformatf("delivered %0d/%0d/%0d of %0d flits", got1, got2, got3, NPKT * FLITS));
    $display("mechanisms: head=%0d none=%0d odd=%0d full=%0d even=%0d link_stall=%0d sink_stall=%0d",
             n_mech[M_HEAD], n_mech[M_NONE], n_mech[M_ODD], n_mech[M_FULL], n_mech[M_EVEN],
             n_mech[M_LINK_STALL], n_mech[M_SINK_STALL]);
    $display("coupling activity of encoded body/tail flits: scheme1=%0d scheme2=%0d scheme3=%0d",
             cost_enc[1], cost_enc[2], cost_enc[3]);
    for (int i = 0; i < M_N; i++) begin
      checks++;
      if (n_mech[i] == 0) fail($sformatf("mechanism %s never happened", mech_e'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
