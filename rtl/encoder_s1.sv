// encoder_s1: Scheme I link encoder (odd inversion), placed in the source network interface.
//
// Body and tail flits carry W-1 payload bits on lines W-2..0; line W-1 is the "inv" line.
// For each such flit the encoder compares the raw flit with the word already on the link
// (the last word it sent). For every pair of adjacent lines a ty_block flags transitions
// that odd inversion makes no worse than Type I; a ones_counter adds them into Ty. If
// Ty > (W-1)/2, inverting all odd-numbered lines (inv, at odd position W-1, included, so
// inv becomes 1) lowers the coupling power T1 + 2*T2 of the link, and the flit is sent
// odd-inverted. Head flits pass unchanged, since routers read them.
//
// Interface: valid/ready stream in (in_*) and out (link_*); in_kind / link_kind carry the
// flit kind. For body/tail flits in_data[W-1] is ignored (treated as 0).
// Timing: the encoded word is registered; a flit accepted in cycle n is on the link from
// cycle n+1, one flit per cycle when link_ready stays high. Reset clears the link word.
// The decision rule and line layout follow the document; the handshake, the registered
// output, the kind sideband and the reset value are this design's choices.
module encoder_s1
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
  localparam int unsigned NP = W - 1;          // line pairs
  localparam int unsigned CW = $clog2(W);

  function automatic logic [W-1:0] odd_lines();
    logic [W-1:0] m;
    for (int i = 0; i < W; i++) m[i] = (i % 2 == 1);
    return m;
  endfunction
  localparam logic [W-1:0] ODD_MASK = odd_lines();

  logic [W-1:0]  x;          // raw flit with the inv line at 0
  logic [NP-1:0] ty_v;
  logic [CW-1:0] n_ty;
  logic          odd_inv;
  logic [W-1:0]  enc;

  assign x = {1'b0, in_data[W-2:0]};

  for (genvar i = 0; i < NP; i++) begin : g_pair
    ty_block #(.PAIR(i)) u_ty (.x(x[i+1:i]), .y(link_data[i+1:i]), .ty(ty_v[i]));
  end

  ones_counter #(.N(NP)) u_ones_ty (.bits(ty_v), .count(n_ty));

  always_comb begin
    odd_inv = (2 * int'(n_ty)) > int'(W - 1);
    if (is_head(in_kind)) enc = in_data;
    else                  enc = odd_inv ? (x ^ ODD_MASK) : x;
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

  // A word offered on the link stays there, unchanged, until it is taken.
  a_link_hold: assert property (@(posedge clk) disable iff (!rst_n)
    link_valid && !link_ready |=> link_valid && $stable(link_data) && $stable(link_kind));
endmodule
