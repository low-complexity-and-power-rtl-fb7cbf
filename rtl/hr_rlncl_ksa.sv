// hr_rlncl_ksa -- W-bit Kogge-Stone adder as a hybrid-rail, register-less
// NULL convention logic (HR-RL-NCL) pipeline. Default W = 8: five stages.
//
// Stages (S = log2(W) + 2 of them):
//   1        ksa_pre     bitwise generate/propagate, cin folded into bit 0
//   2..S-1   ksa_prefix  Kogge-Stone levels with distance 1, 2, 4, ...
//   S        ksa_sum     sum bits and carry out
// There are no pipeline registers: each stage's logic block holds its own
// output until it is put to sleep. Each stage has an rl_ctrl: an OR gate on
// the two rails of the stage's critical output gives ko[i], and a C-element
// of ko[i-1] and NOT ko[i+1] gives sleep_n[i] (1 = evaluate, 0 = sleep and
// output NULL). DATA and NULL tokens alternate: a stage takes a new token
// only after the token before it has reached the input of the stage after
// next, so one empty stage always separates two tokens of the same kind.
//
// Only the critical path is dual-rail: the chain of synchronization logic
// gates (SLG) maj(a0,b0,cin) -> G[1] -> G[3] -> ... -> G[W-1] = cout, then
// the SLGL that forms the MSB of the sum. All other bits are single-rail
// and are valid whenever the critical bit of their stage is DATA.
//
// Environment protocol (four-phase, return-to-NULL):
//   producer: present a DATA token (a, b, cin; a0, b0, cin dual-rail, the
//             other bits single-rail), wait for ko_in_ack = 1, present NULL
//             (all zero), wait for ko_in_ack = 0, repeat.
//   consumer: wait for ko_out = 1, read sum/cout, raise ko_next, wait for
//             ko_out = 0, lower ko_next.
// ko[0], the completion of the input token, comes from an ncl_cd over the
// three dual-rail input bits. rst puts every stage to sleep; hold the inputs
// NULL and ko_next low while it is high.
//
// sleep_n_o and ko_o bring out each stage's sleep control and completion
// signal for observation. The model has no delays: every transition happens
// in the time step of the environment event that causes it.
module hr_rlncl_ksa
  import hrncl_pkg::*;
#(
  parameter int unsigned W = 8   // operand width, a power of two >= 4
) (
  input  logic                      rst,
  // input token
  input  logic [W-1:1]              a_hi,
  input  logic [W-1:1]              b_hi,
  input  dr_t                       a0,
  input  dr_t                       b0,
  input  dr_t                       cin,
  output logic                      ko_in_ack,
  // output token
  output logic [W-1:0]              sum,
  output dr_t                       s_msb,
  output dr_t                       cout,
  output logic                      ko_out,
  input  logic                      ko_next,
  // observation
  output logic [$clog2(W)+2:1]      sleep_n_o,
  output logic [$clog2(W)+2:0]      ko_o
);

  localparam int unsigned L = $clog2(W);   // prefix levels
  localparam int unsigned S = L + 2;       // pipeline stages

  initial begin
    assert (W >= 4 && (1 << L) == W) else $error("hr_rlncl_ksa: W must be a power of two >= 4");
  end

  logic [S+1:0] ko;
  logic [S:1]   sleep_n;
  dr_t  [S:1]   crit;        // critical output bit of each stage

  // Token between stages: index k is the output of stage k.
  logic [W-1:0] g_s  [1:S-1];
  logic [W-1:0] p_s  [1:S-1];
  logic [W-1:0] pp_s [1:S-1];
  logic         c_s  [1:S-1];
  dr_t          c_msb_dr, p_msb_dr;

  // Completion of the input token.
  ncl_cd #(.N(3)) u_in_cd (
    .rst  (rst),
    .d    ({cin, b0, a0}),
    .done (ko[0])
  );

  assign ko[S+1] = ko_next;

  for (genvar i = 1; i <= S; i++) begin : g_ctrl
    rl_ctrl u_ctrl (
      .rst     (rst),
      .ko_prev (ko[i-1]),
      .ko_next (ko[i+1]),
      .crit    (crit[i]),
      .sleep_n (sleep_n[i]),
      .ko      (ko[i])
    );
  end

  // Stage 1
  ksa_pre #(.W(W)) u_pre (
    .sleep_n (sleep_n[1]),
    .a_hi    (a_hi),
    .b_hi    (b_hi),
    .a0      (a0),
    .b0      (b0),
    .cin     (cin),
    .g       (g_s[1]),
    .p       (p_s[1]),
    .c       (c_s[1]),
    .g0_dr   (crit[1])
  );
  assign pp_s[1] = p_s[1];

  // Stages 2 .. S-1
  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned K = l + 2;
    dr_t c_msb_l, p_msb_l;

    ksa_prefix #(.W(W), .SPAN(1 << l), .LAST(l == L - 1)) u_lvl (
      .sleep_n  (sleep_n[K]),
      .g_in     (g_s[K-1]),
      .p_in     (p_s[K-1]),
      .pp_in    (pp_s[K-1]),
      .c_in     (c_s[K-1]),
      .crit_in  (crit[K-1]),
      .g_out    (g_s[K]),
      .p_out    (p_s[K]),
      .pp_out   (pp_s[K]),
      .c_out    (c_s[K]),
      .crit_out (crit[K]),
      .c_msb_dr (c_msb_l),
      .p_msb_dr (p_msb_l)
    );

    if (l == L - 1) begin : g_last
      assign c_msb_dr = c_msb_l;
      assign p_msb_dr = p_msb_l;
    end
  end

  // Stage S
  ksa_sum #(.W(W)) u_sum (
    .sleep_n  (sleep_n[S]),
    .g_in     (g_s[S-1]),
    .pp_in    (pp_s[S-1]),
    .c_in     (c_s[S-1]),
    .crit_in  (crit[S-1]),
    .c_msb_dr (c_msb_dr),
    .p_msb_dr (p_msb_dr),
    .sum      (sum),
    .s_msb    (crit[S]),
    .cout     (cout)
  );

  assign s_msb     = crit[S];
  assign ko_in_ack = ko[1];
  assign ko_out    = ko[S];
  assign sleep_n_o = sleep_n;
  assign ko_o      = ko[S:0];

endmodule
