// ksa_sum -- last stage of the hybrid-rail RL-NCL Kogge-Stone adder: sum bits.
//
// sum[k] = pp[k] ^ carry_k, with carry_0 = c_in and carry_k = G[k-1] for
// k >= 1, where G comes from the last prefix level. Bits W-2..0 are
// single-rail XOR gates. The MSB is the stage's critical gate: no gate of
// this stage takes the previous stage's SLG output (the carry out of the
// MSB) as an operand, so the MSB XOR is built as a synchronization logic
// gate with latch enable (SLGL). Its data operands are the dual-rail copies
// of pp[W-1] and G[W-2] made by the S to D converters of the previous stage,
// and its enable port is driven by the previous SLG output (crit_in); it
// evaluates only when all three are DATA. s_msb is the critical output;
// sum[W-1] is its 1-rail. The carry out is crit_in passed through an MTNCL
// buffer (a TH12 with tied inputs on each rail) so that it too goes NULL
// when the stage sleeps.
//
// Using an SLGL with its enable tied to the previous SLG follows the
// hybrid-rail scheme; choosing the MSB XOR for it is this design's choice.
//
// RL-NCL behaviour as in ksa_pre: NULL while asleep, evaluate once the
// dual-rail inputs are DATA, hold until the next sleep. Zero-delay. The
// outputs are level-sensitive latches on purpose (state-holding gates in
// place of a register). g_in[W-1:W-2] and pp_in[W-1] are not read: those
// values arrive dual-rail on crit_in, c_msb_dr and p_msb_dr.
module ksa_sum
  import hrncl_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         sleep_n,
  input  logic [W-1:0] g_in,      // G[k]: carry out of bit k
  input  logic [W-1:0] pp_in,     // per-bit propagate
  input  logic         c_in,      // carry input of the adder
  input  dr_t          crit_in,   // SLG output of the previous stage (cout)
  input  dr_t          c_msb_dr,  // carry into the MSB, dual-rail
  input  dr_t          p_msb_dr,  // MSB propagate, dual-rail
  output logic [W-1:0] sum,
  output dr_t          s_msb,
  output dr_t          cout
);

  logic ready;
  assign ready = dr_complete(crit_in) && dr_complete(c_msb_dr) && dr_complete(p_msb_dr);

  always_latch begin
    if (!sleep_n) begin
      sum   = '0;
      s_msb = DR_NULL;
      cout  = DR_NULL;
    end else if (ready) begin
      sum   = {p_msb_dr.t ^ c_msb_dr.t, pp_in[W-2:0] ^ {g_in[W-3:0], c_in}};
      s_msb = slgl_xor2(crit_in, p_msb_dr, c_msb_dr);
      cout  = crit_in;
    end
  end

endmodule
