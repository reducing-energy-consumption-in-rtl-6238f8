// nocenc_pkg: types and helper functions shared by the link encoders and decoders.
//
// A flit travels on W data lines plus a two-line kind sideband. Only body and tail
// flits are encoded; the head flit must stay readable by the routers, so it crosses
// the link unchanged. The sideband encoding is this design's own choice.
//
// The transition classes follow the usual two-line coupling model: for one pair of
// adjacent lines (i, i+1) going from y (time t-1) to c (time t)
//   Type I   exactly one line switches            coupling cost 1
//   Type II  both switch in opposite directions   coupling cost 2
//   Type III both switch in the same direction    coupling cost 0
//   Type IV  neither switches                     coupling cost 0
// Bit 0 of a two-bit pair is line i, bit 1 is line i+1.
package nocenc_pkg;

  typedef enum logic [1:0] {
    KIND_BODY     = 2'b00,
    KIND_HEAD     = 2'b01,
    KIND_TAIL     = 2'b10,
    KIND_HEADTAIL = 2'b11
  } flit_kind_e;

  // Head flits (including single-flit packets) are never encoded.
  function automatic logic is_head(flit_kind_e k);
    return k == KIND_HEAD || k == KIND_HEADTAIL;
  endfunction

  // Exactly one of the two lines switches.
  function automatic logic is_type1(logic [1:0] y, logic [1:0] c);
    return ^(y ^ c);
  endfunction

  // Both lines switch and end up different (01 <-> 10).
  function automatic logic is_type2(logic [1:0] y, logic [1:0] c);
    return (&(y ^ c)) && (c[0] != c[1]);
  endfunction

endpackage
