// nocenc_top: end-to-end link encoding for a wormhole network-on-chip, all three schemes.
//
// Power on long on-chip links is dominated by coupling between neighbouring wires, so each
// flit is re-coded in the source network interface so that fewer adjacent wire pairs switch
// against each other, and restored in the destination network interface. Because every link
// of a wormhole path carries the same flit sequence, one decision at the source saves power
// on every hop, and the routers are untouched. Three encoders trade logic for saving:
//   s1  Scheme I   odd inversion             1 control line,  W-1 payload bits
//   s2  Scheme II  odd or full inversion     2 control lines, W-2 payload bits
//   s3  Scheme III odd, even or full         2 control lines, W-2 payload bits
// Each scheme appears here as an independent channel: encoder sN (source side) and decoder
// sN (destination side). The routers and wires between them are not part of this design,
// so the encoder's link_* outputs and the decoder's link_* inputs are separate ports, to be
// joined by the network.
//
// Interface per channel (prefix sN_): raw flit in (in_valid/in_ready/in_kind/in_data),
// encoded link out (tx_*), encoded link in (rx_*), decoded flit out (out_*); all valid/ready
// streams with a flit-kind sideband. Timing: one register stage in each encoder, none in the
// decoders; one flit per cycle per channel. Keeping the three schemes side by side is this
// design's choice; the document presents all three as its proposal.
module nocenc_top
  import nocenc_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s1_in_valid,
  output logic          s1_in_ready,
  input  flit_kind_e    s1_in_kind,
  input  logic [W-1:0]  s1_in_data,
  output logic          s1_tx_valid,
  input  logic          s1_tx_ready,
  output flit_kind_e    s1_tx_kind,
  output logic [W-1:0]  s1_tx_data,
  input  logic          s1_rx_valid,
  output logic          s1_rx_ready,
  input  flit_kind_e    s1_rx_kind,
  input  logic [W-1:0]  s1_rx_data,
  output logic          s1_out_valid,
  input  logic          s1_out_ready,
  output flit_kind_e    s1_out_kind,
  output logic [W-1:0]  s1_out_data,
  input  logic          s2_in_valid,
  output logic          s2_in_ready,
  input  flit_kind_e    s2_in_kind,
  input  logic [W-1:0]  s2_in_data,
  output logic          s2_tx_valid,
  input  logic          s2_tx_ready,
  output flit_kind_e    s2_tx_kind,
  output logic [W-1:0]  s2_tx_data,
  input  logic          s2_rx_valid,
  output logic          s2_rx_ready,
  input  flit_kind_e    s2_rx_kind,
  input  logic [W-1:0]  s2_rx_data,
  output logic          s2_out_valid,
  input  logic          s2_out_ready,
  output flit_kind_e    s2_out_kind,
  output logic [W-1:0]  s2_out_data,
  input  logic          s3_in_valid,
  output logic          s3_in_ready,
  input  flit_kind_e    s3_in_kind,
  input  logic [W-1:0]  s3_in_data,
  output logic          s3_tx_valid,
  input  logic          s3_tx_ready,
  output flit_kind_e    s3_tx_kind,
  output logic [W-1:0]  s3_tx_data,
  input  logic          s3_rx_valid,
  output logic          s3_rx_ready,
  input  flit_kind_e    s3_rx_kind,
  input  logic [W-1:0]  s3_rx_data,
  output logic          s3_out_valid,
  input  logic          s3_out_ready,
  output flit_kind_e    s3_out_kind,
  output logic [W-1:0]  s3_out_data
);

  encoder_s1 #(.W(W)) u_enc_s1 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(s1_in_valid), .in_ready(s1_in_ready), .in_kind(s1_in_kind), .in_data(s1_in_data),
    .link_valid(s1_tx_valid), .link_ready(s1_tx_ready), .link_kind(s1_tx_kind), .link_data(s1_tx_data)
  );

  decoder_s1 #(.W(W)) u_dec_s1 (
    .link_valid(s1_rx_valid), .link_ready(s1_rx_ready), .link_kind(s1_rx_kind), .link_data(s1_rx_data),
    .out_valid(s1_out_valid), .out_ready(s1_out_ready), .out_kind(s1_out_kind), .out_data(s1_out_data)
  );

  encoder_s2 #(.W(W)) u_enc_s2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(s2_in_valid), .in_ready(s2_in_ready), .in_kind(s2_in_kind), .in_data(s2_in_data),
    .link_valid(s2_tx_valid), .link_ready(s2_tx_ready), .link_kind(s2_tx_kind), .link_data(s2_tx_data)
  );

  decoder_s2 #(.W(W)) u_dec_s2 (
    .link_valid(s2_rx_valid), .link_ready(s2_rx_ready), .link_kind(s2_rx_kind), .link_data(s2_rx_data),
    .out_valid(s2_out_valid), .out_ready(s2_out_ready), .out_kind(s2_out_kind), .out_data(s2_out_data)
  );

  encoder_s3 #(.W(W)) u_enc_s3 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(s3_in_valid), .in_ready(s3_in_ready), .in_kind(s3_in_kind), .in_data(s3_in_data),
    .link_valid(s3_tx_valid), .link_ready(s3_tx_ready), .link_kind(s3_tx_kind), .link_data(s3_tx_data)
  );

  decoder_s3 #(.W(W)) u_dec_s3 (
    .link_valid(s3_rx_valid), .link_ready(s3_rx_ready), .link_kind(s3_rx_kind), .link_data(s3_rx_data),
    .out_valid(s3_out_valid), .out_ready(s3_out_ready), .out_kind(s3_out_kind), .out_data(s3_out_data)
  );
endmodule
