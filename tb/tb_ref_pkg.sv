// tb_ref_pkg: reference model for the link-encoding testbenches.
//
// Works from the physical definition of coupling activity rather than from the transition
// classes the RTL counts: for a pair of adjacent lines let d = line(i) - line(i+1), in
// {-1, 0, 1}; the coupling cost of a transition is |d(t) - d(t-1)|, which is 1 for Type I,
// 2 for Type II and 0 for Types III and IV. A reference encoder tries every inversion the
// scheme allows and keeps the cheapest, preferring none, then odd, then full, then even
// on equal cost.
package tb_ref_pkg;

  localparam int unsigned MAXW = 64;

  function automatic int pair_cost(logic [1:0] y, logic [1:0] c);
    int dy, dc, r;
    dy = int'(y[0]) - int'(y[1]);
    dc = int'(c[0]) - int'(c[1]);
    r  = dc - dy;
    return (r < 0) ? -r : r;
  endfunction

  // Sum of pair costs over the w-1 pairs of a w-line word.
  function automatic int link_cost(int w, logic [MAXW-1:0] y, logic [MAXW-1:0] c);
    int s = 0;
    for (int i = 0; i < w - 1; i++) s += pair_cost({y[i+1], y[i]}, {c[i+1], c[i]});
    return s;
  endfunction

  // Number of lines going 0 -> 1 (self-switching activity).
  function automatic int rises(int w, logic [MAXW-1:0] y, logic [MAXW-1:0] c);
    int s = 0;
    for (int i = 0; i < w; i++) s += int'(!y[i] && c[i]);
    return s;
  endfunction

  function automatic logic [MAXW-1:0] odd_mask(int w);
    logic [MAXW-1:0] m = '0;
    for (int i = 1; i < w; i += 2) m[i] = 1'b1;
    return m;
  endfunction

  function automatic logic [MAXW-1:0] all_mask(int w);
    logic [MAXW-1:0] m = '0;
    for (int i = 0; i < w; i++) m[i] = 1'b1;
    return m;
  endfunction

  // Expected link word for a body/tail flit. scheme 1: none/odd, ncontrol = 1;
  // scheme 2: none/odd/full; scheme 3: none/odd/full/even; ncontrol = 2.
  // raw: payload, control lines already 0. y: word on the link before.
  function automatic logic [MAXW-1:0] ref_encode(int scheme, int w,
                                                 logic [MAXW-1:0] raw, logic [MAXW-1:0] y);
    logic [MAXW-1:0] cand[4];
    int nopt, best, bc, c;
    cand[0] = raw;
    cand[1] = raw ^ odd_mask(w);
    cand[2] = raw ^ all_mask(w);
    cand[3] = raw ^ (all_mask(w) & ~odd_mask(w));
    nopt = (scheme == 1) ? 2 : (scheme == 2) ? 3 : 4;
    best = 0;
    bc   = link_cost(w, y, cand[0]);
    for (int k = 1; k < nopt; k++) begin
      c = link_cost(w, y, cand[k]);
      if (c < bc) begin
        bc = c; best = k;
      end
    end
    return cand[best];
  endfunction

endpackage
