// decoder_s2: Scheme II link decoder, in the destination network interface.
//
// Restores the flit that encoder_s2 received. Control lines W-1, W-2: 10 = odd-inverted, 11 = fully inverted, 00 = unchanged; the inversion is undone and the control lines cleared.
// Head flits (link_kind HEAD or HEADTAIL) were sent unchanged and pass unchanged.
// The decoder needs no state: each word carries its own control lines.
//
// Interface: valid/ready stream in (link_*) and out (out_*), kind sideband alongside.
// Timing: combinational, zero latency; ready passes straight back. The function follows
// the document; the XOR structure, the handshake and the zero latency are this design's
// choices.
module decoder_s2
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

  logic [W-3:0] mask;

  assign out_valid  = link_valid;
  assign link_ready = out_ready;
  assign out_kind   = link_kind;

  always_comb begin
    unique case (link_data[W-1:W-2])
      2'b11:   mask = '1;
      2'b10:   mask = ODD_MASK[W-3:0];
      default: mask = '0;
    endcase
    if (is_head(link_kind)) out_data = link_data;
    else                    out_data = {2'b00, link_data[W-3:0] ^ mask};
  end
endmodule
