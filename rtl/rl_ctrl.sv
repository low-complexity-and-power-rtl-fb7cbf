// rl_ctrl -- sleep control and completion detection of one RL-NCL stage.
//
// In a register-less NCL pipeline stage i has no register: its logic block
// holds its own output until it is put to sleep. This module makes the two
// control signals of the stage:
//   ko      = OR of the two rails of the stage's critical output bit. The
//             critical bit is the last to become DATA and the last to become
//             NULL, so this single OR replaces a full completion detector.
//             ko = 1 means the stage output is DATA.
//   sleep_n = C-element (TH22) of ko_prev (input of the stage is DATA) and
//             NOT ko_next (output of the next stage is NULL). sleep_n = 1 is
//             the active mode, 0 the sleep mode in which the logic block is
//             power gated and its outputs go NULL.
// The stage therefore wakes when new DATA is at its input and the next
// stage has finished passing the previous NULL, and sleeps when NULL is at
// its input and the next stage has taken the previous DATA.
//
// Across a pipeline, ko of one stage feeds sleep_n of its neighbours in both
// directions, so the controllers and logic blocks form combinational loops;
// these are the handshake itself and are intended.
//
// The OR detector and the C-element wiring follow the register-less NCL
// scheme; the reset and the naming of the polarity (ko = 1 for DATA) are this
// design's choices.
//
// The C-element is cleared by rst so that after reset every stage sleeps.
// The dual-rail critical bit must never be (1,1); an assertion checks it.
module rl_ctrl
  import hrncl_pkg::*;
(
  input  logic rst,
  input  logic ko_prev,   // completion of stage i-1 (DATA at this input)
  input  logic ko_next,   // completion of stage i+1
  input  dr_t  crit,      // critical output bit of this stage
  output logic sleep_n,   // 1 = evaluate, 0 = sleep
  output logic ko         // completion of this stage
);

  th_gate #(.M(2), .N(2)) u_c (
    .rst (rst),
    .in  ({ko_prev, ~ko_next}),
    .z   (sleep_n)
  );

  assign ko = crit.t | crit.f;

  always_comb begin
    assert final (!(crit.t && crit.f)) else $error("rl_ctrl: illegal dual-rail codeword (1,1)");
  end

endmodule
