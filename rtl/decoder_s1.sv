// decoder_s1: Scheme I link decoder, in the destination network interface.
//
// Restores the flit that encoder_s1 received. When line W-1 (inv) is set, the odd-numbered lines are inverted back; inv is cleared.
// Head flits (link_kind HEAD or HEADTAIL) were sent unchanged and pass unchanged.
// The decoder needs no state: each word carries its own control lines.
//
// Interface: valid/ready stream in (link_*) and out (out_*), kind sideband alongside.
// Timing: combinational, zero latency; ready passes straight back. The function follows
// the document; the XOR structure, the handshake and the zero latency are this design's
// choices.
module decoder_s1
  import nocenc_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic          link_valid,
  output logic          link_ready,
  input  flit_kind_e    link_kind,
  input  logic [W-1:0]  link_data,
  output logic          out_valid,
  input  logic          out_ready,
  output flit_kind_e    out_kind,
  output logic [W-1:0]  out_data
);
  function automatic logic [W-1:0] odd_lines();
    logic [W-1:0] m;
    for (int i = 0; i < W; i++) m[i] = (i % 2 == 1);
    return m;
  endfunction
  localparam logic [W-1:0] ODD_MASK = odd_lines();

  logic [W-2:0] mask;

  assign out_valid  = link_valid;
  assign link_ready = out_ready;
  assign out_kind   = link_kind;

  always_comb begin
    mask = link_data[W-1] ? ODD_MASK[W-2:0] : '0;
    if (is_head(link_kind)) out_data = link_data;
    else                    out_data = {1'b0, link_data[W-2:0] ^ mask};
  end
endmodule
