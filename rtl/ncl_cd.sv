// ncl_cd -- n-bit NCL completion detector.
//
// Each dual-rail bit is reduced by a TH12 (OR of its two rails), and the N
// results meet in a THnn C-element. done rises when every bit is DATA and
// falls only when every bit is NULL again; in between it holds. This is the
// conventional structure (n TH12 gates plus one THnn gate). In the adder it
// watches the dual-rail input bits that feed the first critical-path gate
// and so tells the first stage that an input token (DATA or NULL) is
// complete.
//
// Interface: d[N-1:0] dual-rail bits, done completion output, rst clears
// done (this design's reset). Zero-delay.
module ncl_cd
  import hrncl_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic          rst,
  input  dr_t   [N-1:0] d,
  output logic          done
);

  logic [N-1:0] bit_done;

  for (genvar i = 0; i < N; i++) begin : g_or
    th_gate #(.M(1), .N(2)) u_th12 (
      .rst (1'b0),
      .in  ({d[i].t, d[i].f}),
      .z   (bit_done[i])
    );
  end

  th_gate #(.M(N), .N(N)) u_thnn (
    .rst (rst),
    .in  (bit_done),
    .z   (done)
  );

endmodule
