// tb_hr_rlncl_ksa_w16 -- the end-to-end test of tb_hr_rlncl_ksa run on a
// 16-bit instance (6 stages, prefix distances 1, 2, 4, 8), to exercise the
// width parameter. The checks are the same:
//
// A producer process sends NTOK DATA/NULL token pairs with random gaps and a
// consumer process takes them with random (sometimes long) delays, so the
// pipeline both runs full and drains. Every sum and carry out is compared with
// a + b + cin computed by the testbench; every NULL wave must leave the
// outputs all zero. The environment changes its signals only at multiples of
// 10 time units and a sampler looks at the settled state 5 units later.
//
// Mechanisms that must each happen at least once (a failure is counted if
// one never does):
//   wait_next   a stage has DATA at its input but stays asleep because the
//               stage after it has not yet returned to NULL (step 1 wait)
//   hold        a stage keeps its DATA output after its input went NULL,
//               i.e. register-less storage in the logic block
//   backpress   the output token waits for a slow consumer
//   in_flight   two DATA tokens are in the pipeline at once
//   carry_out   a sum that overflows (cout = 1)
//   carry_in    cin = 1
// Each stage must also wake exactly once per token, and the critical output
// of a stage must never change from one DATA value to another without a NULL
// in between (no token overwrites the one before it).
module tb_hr_rlncl_ksa_w16;
  import hrncl_pkg::*;

  localparam int W    = 16;
  localparam int S    = 6;
  localparam int NTOK = 300;

  logic          rst;
  logic [W-1:1]  a_hi, b_hi;
  dr_t           a0, b0, cin;
  logic          ko_in_ack;
  logic [W-1:0]  sum;
  dr_t           s_msb, cout;
  logic          ko_out, ko_next;
  logic [S:1]    sleep_n;
  logic [S:0]    ko;

  hr_rlncl_ksa #(.W(W)) dut (
    .rst, .a_hi, .b_hi, .a0, .b0, .cin, .ko_in_ack,
    .sum, .s_msb, .cout, .ko_out, .ko_next,
    .sleep_n_o (sleep_n), .ko_o (ko)
  );

  int checks = 0, failures = 0;
  int n_wait = 0, n_hold = 0, n_backpress = 0, n_inflight = 0, n_cout = 0, n_cin = 0;
  int wakes [1:S];
  logic [W:0] expq [$];
  bit done_cons = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic finish();
    $display("wait_next=%0d hold=%0d backpress=%0d in_flight=%0d carry_out=%0d carry_in=%0d",
             n_wait, n_hold, n_backpress, n_inflight, n_cout, n_cin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // Producer.
  initial begin
    logic [W-1:0] a, b;
    logic         c;
    rst = 1'b1;
    a_hi = '0; b_hi = '0; a0 = DR_NULL; b0 = DR_NULL; cin = DR_NULL;
    #20 rst = 1'b0;
    #20;
    check(ko == '0 && sleep_n == '0 && sum == '0, "all stages asleep and NULL after reset");
    for (int n = 0; n < NTOK; n++) begin
      case (n)
        0: begin a = 16'hFFFF; b = 16'h0000; c = 1'b1; end
        1: begin a = 16'hFFFF; b = 16'hFFFF; c = 1'b1; end
        2: begin a = 16'h0000; b = 16'h0000; c = 1'b0; end
        3: begin a = 16'h8000; b = 16'h8000; c = 1'b0; end
        default: begin a = W'($urandom); b = W'($urandom); c = 1'($urandom); end
      endcase
      expq.push_back({1'b0, a} + {1'b0, b} + {{W{1'b0}}, c});
      if (c) n_cin++;
      #(10 * $urandom_range(0, 3));
      a_hi = a[W-1:1]; b_hi = b[W-1:1];
      a0 = dr_enc(a[0]); b0 = dr_enc(b[0]); cin = dr_enc(c);
      wait (ko_in_ack == 1'b1);
      #(10 * $urandom_range(1, 3));
      a_hi = '0; b_hi = '0; a0 = DR_NULL; b0 = DR_NULL; cin = DR_NULL;
      wait (ko_in_ack == 1'b0);
      #10;
    end
  end

  // Consumer.
  initial begin
    automatic int got = 0;
    logic [W:0] e;
    ko_next = 1'b0;
    while (got < NTOK) begin
      wait (ko_out == 1'b1);
      #5;
      e = expq.pop_front();
      check({cout.t, sum} == e, $sformatf("token %0d: sum %0h cout %0b, expected %0h", got, sum, cout.t, e));
      check(cout.t != cout.f && s_msb.t != s_msb.f, "cout and sum MSB are DATA");
      check(s_msb.t == sum[W-1], "sum MSB 1-rail matches dual-rail bit");
      if (e[W]) n_cout++;
      got++;
      #(10 * (($urandom_range(0, 3) == 0) ? $urandom_range(3, 8) : $urandom_range(0, 1)) + 5);
      ko_next = 1'b1;
      wait (ko_out == 1'b0);
      #5;
      check(sum == '0 && cout == DR_NULL && s_msb == DR_NULL, "output NULL after NULL wave");
      #(10 * $urandom_range(0, 2) + 5);
      ko_next = 1'b0;
    end
    #100;
    for (int i = 1; i <= S; i++)
      check(wakes[i] == NTOK, $sformatf("stage %0d woke %0d times, expected %0d", i, wakes[i], NTOK));
    check(expq.size() == 0, "no tokens left over");
    check(n_wait > 0,      "mechanism wait_next seen");
    check(n_hold > 0,      "mechanism hold seen");
    check(n_backpress > 0, "mechanism backpress seen");
    check(n_inflight > 0,  "mechanism in_flight seen");
    check(n_cout > 0,      "mechanism carry_out seen");
    check(n_cin > 0,       "mechanism carry_in seen");
    done_cons = 1;
    finish();
  end

  // Wake counting (event driven), and the no-overwrite rule: the critical
  // output of every stage must pass through NULL between two DATA values.
  for (genvar i = 1; i <= S; i++) begin : g_wake
    dr_t prev;
    initial begin
      wakes[i] = 0;
      prev = DR_NULL;
    end
    always @(posedge sleep_n[i]) wakes[i]++;
    always @(dut.crit[i]) begin
      if (prev != DR_NULL && dut.crit[i] != DR_NULL)
        check(1'b0, $sformatf("stage %0d critical bit changed DATA to DATA", i));
      prev = dut.crit[i];
    end
  end

  // Settled-state sampler, 5 units after every environment step.
  initial begin
    #5;
    forever begin
      #10;
      if (!rst) begin
        logic [S+1:0] k;
        int ntok;
        k = {ko_next, ko};
        ntok = 0;
        for (int i = 1; i <= S; i++) begin
          if (k[i-1] && k[i+1] && !sleep_n[i]) n_wait++;
          if (sleep_n[i] && k[i] && !k[i-1])   n_hold++;
          // a DATA token lives at stage i if its output is DATA and the
          // stage before does not also hold that same token
          if (k[i] && !(i > 1 && k[i-1] && sleep_n[i])) ntok++;
        end
        if (ntok >= 2) n_inflight++;
        if (ko_out && !ko_next) n_backpress++;
      end
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog: timeout");
    finish();
  end

endmodule
