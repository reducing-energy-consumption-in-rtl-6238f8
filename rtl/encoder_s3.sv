// encoder_s3: Scheme III link encoder (odd, even or full inversion), in the source network
// interface.
//
// Scheme II leaves one kind of loss: odd inversion turns some Type I transitions into
// Type II. Inverting the even lines instead turns those same transitions into Type IV or
// Type III, so Scheme III adds even inversion as a fourth choice. Body and tail flits carry
// W-2 payload bits on lines W-3..0; lines W-1 (odd) and W-2 (even) are control lines, 0 in
// the raw flit. Against the word already on the link the encoder counts, over the W-1
// pairs of adjacent lines, Ty (ty_block), Te (te_block), T2 and T4** (t2_t4_block), and
// module_c picks the option with the lowest coupling power T1 + 2*T2. Because the inversion
// is applied to the control lines as well, they read 00 = none, 10 = odd, 01 = even,
// 11 = full. Head flits pass unchanged.
//
// Interface and timing as encoder_s1: valid/ready in and out, registered output (one
// cycle), one flit per cycle. The decision rule follows the document; the control-line
// layout, handshake, register and reset value are this design's choices.
module encoder_s3
  import nocenc_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  flit_kind_e    in_kind,
  input  logic [W-1:0]  in_data,
  output logic          link_valid,
  input  logic          link_ready,
  output flit_kind_e    link_kind,
  output logic [W-1:0]  link_data
);
  localparam int unsigned NP = W - 1;
  localparam int unsigned CW = $clog2(W);

  function automatic logic [W-1:0] odd_lines();
    logic [W-1:0] m;
    for (int i = 0; i < W; i++) m[i] = (i % 2 == 1);
    return m;
  endfunction
  localparam logic [W-1:0] ODD_MASK  = odd_lines();
  localparam logic [W-1:0] EVEN_MASK = ~ODD_MASK;

  logic [W-1:0]  x;
  logic [NP-1:0] ty_v, te_v, t2_v, t4_v;
  logic [CW-1:0] n_ty, n_te, n_t2, n_t4;
  logic          odd_inv, even_inv, full_inv;
  logic [W-1:0]  enc;

  assign x = {2'b00, in_data[W-3:0]};

  for (genvar i = 0; i < NP; i++) begin : g_pair
    ty_block #(.PAIR(i)) u_ty (.x(x[i+1:i]), .y(link_data[i+1:i]), .ty(ty_v[i]));
    te_block #(.PAIR(i)) u_te (.x(x[i+1:i]), .y(link_data[i+1:i]), .te(te_v[i]));
    t2_t4_block u_t24 (.x(x[i+1:i]), .y(link_data[i+1:i]), .t2(t2_v[i]), .t4(t4_v[i]));
  end

  ones_counter #(.N(NP)) u_ones_ty (.bits(ty_v), .count(n_ty));
  ones_counter #(.N(NP)) u_ones_te (.bits(te_v), .count(n_te));
  ones_counter #(.N(NP)) u_ones_t2 (.bits(t2_v), .count(n_t2));
  ones_counter #(.N(NP)) u_ones_t4 (.bits(t4_v), .count(n_t4));

  module_c #(.W(W)) u_module_c (
    .n_ty(n_ty), .n_te(n_te), .n_t2(n_t2), .n_t4(n_t4),
    .odd_inv(odd_inv), .even_inv(even_inv), .full_inv(full_inv)
  );

  always_comb begin
    if (is_head(in_kind)) enc = in_data;
    else if (full_inv)    enc = ~x;
    else if (odd_inv)     enc = x ^ ODD_MASK;
    else if (even_inv)    enc = x ^ EVEN_MASK;
    else                  enc = x;
  end

  assign in_ready = !link_valid || link_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link_valid <= 1'b0;
      link_kind  <= KIND_BODY;
      link_data  <= '0;
    end else begin
      if (in_ready) link_valid <= in_valid;
      if (in_valid && in_ready) begin
        link_kind <= in_kind;
        link_data <= enc;
      end
    end
  end

  a_link_hold: assert property (@(posedge clk) disable iff (!rst_n)
    link_valid && !link_ready |=> link_valid && $stable(link_data) && $stable(link_kind));
endmodule
