// ksa_prefix -- one prefix level of the hybrid-rail RL-NCL Kogge-Stone adder.
//
// Level with distance SPAN combines every group (G, P) at bit j with the
// group at bit j - SPAN:
//   G'[j] = G[j] | (P[j] & G[j-SPAN]),   P'[j] = P[j] & P[j-SPAN]   (j >= SPAN)
// and passes groups with j < SPAN unchanged (buffers, since a pure wire cannot
// sleep). The per-bit propagate pp and the carry input c are buffered through
// for the sum stage. After log2(W) levels G[j] is the carry out of bit j.
//
// Critical path: the AND-OR gate at bit 2*SPAN-1 is built dual-rail as this
// stage's synchronization logic gate (SLG). Its low operand G[SPAN-1] is the
// dual-rail SLG output of the stage before (crit_in), so the SLGs of all
// stages form one linked chain ending in the carry out of the MSB.
// G[2*SPAN-1] of g_out is the 1-rail of crit_out.
//
// In the last level (LAST = 1) two single-rail to dual-rail converters (S to
// D) also give the carry into the MSB (G[W-2]) and the MSB propagate pp[W-1]
// as dual-rail bits for the SLGL of the sum stage. In other levels those two
// outputs stay NULL.
//
// The level equations are the standard Kogge-Stone ones; placing the SLG on
// the gate linked to the previous SLG follows the hybrid-rail linking rule,
// and the enable of the S to D converters (DATA only while the stage
// evaluates) is this design's choice.
//
// RL-NCL behaviour as in ksa_pre: NULL while asleep, evaluate once crit_in is
// DATA, hold until the next sleep; the stage's gates are evaluated together.
// Zero-delay. The outputs are level-sensitive latches on purpose: holding its
// own output in place of a pipeline register is what the stage does.
module ksa_prefix
  import hrncl_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned SPAN = 1,
  parameter bit          LAST = 1'b0
) (
  input  logic         sleep_n,
  input  logic [W-1:0] g_in,
  input  logic [W-1:0] p_in,
  input  logic [W-1:0] pp_in,
  input  logic         c_in,
  input  dr_t          crit_in,   // G[SPAN-1] from the previous SLG
  output logic [W-1:0] g_out,
  output logic [W-1:0] p_out,
  output logic [W-1:0] pp_out,
  output logic         c_out,
  output dr_t          crit_out,  // G'[2*SPAN-1], this stage's SLG
  output dr_t          c_msb_dr,  // S to D of G'[W-2]   (LAST only)
  output dr_t          p_msb_dr   // S to D of pp[W-1]   (LAST only)
);

  localparam int unsigned CP = 2 * SPAN - 1;  // bit of this stage's SLG

  initial begin
    assert (CP < W) else $error("ksa_prefix: SPAN too large for W");
  end

  function automatic logic [W-1:0] level_g(logic [W-1:0] g, logic [W-1:0] p);
    logic [W-1:0] r;
    for (int unsigned j = 0; j < W; j++) begin
      if (j >= SPAN) r[j] = g[j] | (p[j] & g[j - SPAN]);
      else           r[j] = g[j];
    end
    return r;
  endfunction

  function automatic logic [W-1:0] level_p(logic [W-1:0] p);
    logic [W-1:0] r;
    for (int unsigned j = 0; j < W; j++) begin
      if (j >= SPAN) r[j] = p[j] & p[j - SPAN];
      else           r[j] = p[j];
    end
    return r;
  endfunction

  // Bit W-2 of level_g: the carry into the MSB once this is the last level.
  function automatic logic level_g_msb(logic [W-1:0] g, logic [W-1:0] p);
    logic [W-1:0] r;
    r = level_g(g, p);
    return r[W-2];
  endfunction

  logic ready;
  assign ready = dr_complete(crit_in);

  always_latch begin
    if (!sleep_n) begin
      g_out    = '0;
      p_out    = '0;
      pp_out   = '0;
      c_out    = 1'b0;
      crit_out = DR_NULL;
      c_msb_dr = DR_NULL;
      p_msb_dr = DR_NULL;
    end else if (ready) begin
      g_out    = level_g(g_in, p_in);
      p_out    = level_p(p_in);
      pp_out   = pp_in;
      c_out    = c_in;
      crit_out = slg_ao21(crit_in, g_in[CP], p_in[CP]);
      c_msb_dr = s_to_d(level_g_msb(g_in, p_in), LAST);
      p_msb_dr = s_to_d(pp_in[W-1], LAST);
    end
  end

endmodule
