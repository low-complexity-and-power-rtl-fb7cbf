// th_gate -- NCL m-of-n threshold gate THmn with hysteresis.
//
// The output rises once at least M of the N inputs are 1 and falls only
// after all N inputs have returned to 0; between those two conditions it
// keeps its value. This is the state-holding behaviour that the static CMOS
// gate gets from its set-to-1 / set-to-0 / hold-1 / hold-0 networks and the
// output inverter with feedback. TH12 is a 2-input OR, TH22 a 2-input
// C-element, THnn an n-input C-element, TH23 the majority gate.
//
// The hysteresis is written as a level-sensitive latch, so the module has no
// clock. rst is this design's own addition, an active-high clear used by the
// gates that must start at 0 (the sleep C-elements and the input completion
// detector); tie it to 0 elsewhere.
//
// For M >= 2 the gate is a latch by design (lint and synthesis report it),
// and gates wired into a handshake ring form intended combinational loops.
//
// Interface: in[N-1:0] gate inputs, z gate output. Timing: zero-delay, the
// output follows its inputs in the same simulation time step.
module th_gate #(
  parameter int unsigned M = 2,  // threshold
  parameter int unsigned N = 3   // number of inputs
) (
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic         z
);

  initial begin
    assert (M >= 1 && M <= N) else $error("th_gate: need 1 <= M <= N");
  end

  if (M == 1) begin : g_or
    // TH1n: set and reset conditions cover every input, no state to hold.
    always_comb z = !rst && (in != '0);
  end else begin : g_hyst
    always_latch begin
      if (rst)                      z = 1'b0;
      else if ($countones(in) >= M) z = 1'b1;
      else if (in == '0)            z = 1'b0;
    end
  end

endmodule
