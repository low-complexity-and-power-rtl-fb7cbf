// ksa_pre -- stage 1 of the hybrid-rail RL-NCL Kogge-Stone adder:
// bitwise generate / propagate.
//
// For every bit k it forms g[k] = a[k] & b[k] and p[k] = a[k] ^ b[k] in
// single-rail logic. The carry input is folded into bit 0, whose generate is
// the majority of a0, b0 and cin (a 3-input gate, the widest one in the
// stage). That gate is built dual-rail as the synchronization logic gate
// (SLG) of the stage, g0_dr, and starts the critical path: its inputs a0, b0
// and cin are the only dual-rail bits of the input token. g[0] is the 1-rail
// of g0_dr. cin is also passed on single-rail for the last stage.
//
// Register-less NCL behaviour: while sleep_n = 0 every output is NULL (all
// zero). While sleep_n = 1 the stage evaluates as soon as its dual-rail
// inputs are DATA, and then keeps its outputs when its inputs return to
// NULL, until it is put to sleep again. All gates of the stage are evaluated
// together; this stands for the circuit's timing rule that the SLG is the
// last gate of its stage to finish, so when g0_dr is DATA every single-rail
// output is valid.
//
// The stage split, the carry input and the choice of the majority gate as
// the first SLG (the widest gate, and the one that feeds the next stage's
// SLG) are this design's own; the SLG rule and the sleep/hold behaviour
// follow the hybrid-rail register-less NCL scheme.
//
// Interface: a_hi/b_hi bits W-1..1 single-rail, a0/b0/cin dual-rail; outputs
// g, p, c single-rail and g0_dr dual-rail. Zero-delay. The outputs are
// level-sensitive latches on purpose: they are the stage's state-holding
// gates, which replace the pipeline register of conventional NCL.
module ksa_pre
  import hrncl_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         sleep_n,
  input  logic [W-1:1] a_hi,
  input  logic [W-1:1] b_hi,
  input  dr_t          a0,
  input  dr_t          b0,
  input  dr_t          cin,
  output logic [W-1:0] g,
  output logic [W-1:0] p,
  output logic         c,
  output dr_t          g0_dr
);

  logic ready;
  assign ready = dr_complete(a0) && dr_complete(b0) && dr_complete(cin);

  always_latch begin
    if (!sleep_n) begin
      g     = '0;
      p     = '0;
      c     = 1'b0;
      g0_dr = DR_NULL;
    end else if (ready) begin
      g     = {a_hi & b_hi, maj3(a0.t, b0.t, cin.t)};
      p     = {a_hi ^ b_hi, a0.t ^ b0.t};
      c     = cin.t;
      g0_dr = slg_maj3(a0, b0, cin);
    end
  end

endmodule
