// hrncl_pkg -- shared types and gate functions for the hybrid-rail,
// register-less NULL convention logic (HR-RL-NCL) adder.
//
// A dual-rail bit is the pair (D1, D0): (0,1) is DATA0, (1,0) is DATA1,
// (0,0) is NULL (no value yet) and (1,1) is illegal. In this package the
// pair is the packed struct dr_t with field t = D1 and f = D0.
//
// A single-rail signal carries a plain value while its stage evaluates and
// is 0 while the stage sleeps, like the output of a precharged domino gate.
// The 1-rail (t) of a dual-rail bit is therefore also a valid single-rail
// copy of that bit, and the design uses it that way.
//
// The functions below describe the dual-rail gates of the critical path:
// the synchronization logic gate (SLG), the SLG with latch enable (SLGL)
// and the single-rail to dual-rail converter (S to D). Each returns NULL
// until every dual-rail input it depends on is DATA, which is what makes the
// critical path indicate completion for its whole stage.
package hrncl_pkg;

  typedef struct packed {
    logic t;  // D1: asserted for DATA1
    logic f;  // D0: asserted for DATA0
  } dr_t;

  localparam dr_t DR_NULL = '{t: 1'b0, f: 1'b0};

  // DATA (either value) present on a dual-rail bit.
  function automatic logic dr_complete(dr_t d);
    return d.t | d.f;
  endfunction

  // Encode a valid single-rail value as a DATA codeword.
  function automatic dr_t dr_enc(logic v);
    return '{t: v, f: ~v};
  endfunction

  // Majority (TH23 function, AB+AC+BC).
  function automatic logic maj3(logic a, logic b, logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

  // SLG, majority form: dual-rail TH23 pair (D1 = TH23 of the 1-rails,
  // D0 = TH23 of the 0-rails), gated so that it stays NULL until all three
  // inputs are DATA.
  function automatic dr_t slg_maj3(dr_t a, dr_t b, dr_t c);
    if (dr_complete(a) && dr_complete(b) && dr_complete(c))
      return '{t: maj3(a.t, b.t, c.t), f: maj3(a.f, b.f, c.f)};
    return DR_NULL;
  endfunction

  // SLG, AND-OR form: z = g_hi | (p_hi & lnk). lnk is the dual-rail output
  // of the linked SLG one stage earlier; g_hi and p_hi are single-rail.
  function automatic dr_t slg_ao21(dr_t lnk, logic g_hi, logic p_hi);
    if (dr_complete(lnk))
      return dr_enc(g_hi | (p_hi & lnk.t));
    return DR_NULL;
  endfunction

  // S to D: single-rail to dual-rail converter, DATA only while enabled.
  function automatic dr_t s_to_d(logic x, logic en);
    return en ? dr_enc(x) : DR_NULL;
  endfunction

  // SLGL, XOR form: evaluates x ^ y only once its enable port (the output
  // of the linked SLG of the previous stage) and both data inputs are DATA.
  function automatic dr_t slgl_xor2(dr_t en, dr_t x, dr_t y);
    if (dr_complete(en) && dr_complete(x) && dr_complete(y))
      return '{t: (x.t & y.f) | (x.f & y.t), f: (x.t & y.t) | (x.f & y.f)};
    return DR_NULL;
  endfunction

endpackage
