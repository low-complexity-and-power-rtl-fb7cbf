// tb_ksa_prefix -- checks Kogge-Stone prefix levels: the default level
// (distance 1) and the last level of an 8-bit adder (distance 4, with the two
// S to D outputs). Random group generate/propagate tokens are applied; the
// expected level output is computed bit by bit in the testbench. Also checks
// NULL while asleep, no evaluation before the linked SLG input is DATA,
// holding after the input goes NULL, and the dual-rail SLG output.
module tb_ksa_prefix;
  import hrncl_pkg::*;

  localparam int W = 8;
  int checks = 0, failures = 0;

  logic         sleep_n;
  logic [W-1:0] g_in, p_in, pp_in;
  logic         c_in;
  dr_t          crit1_in, crit4_in;
  logic [W-1:0] g1, p1, pp1, g4, p4, pp4;
  logic         c1, c4;
  dr_t          crit1, crit4, cm1, pm1, cm4, pm4;

  ksa_prefix u1 (
    .sleep_n, .g_in, .p_in, .pp_in, .c_in, .crit_in(crit1_in),
    .g_out(g1), .p_out(p1), .pp_out(pp1), .c_out(c1), .crit_out(crit1),
    .c_msb_dr(cm1), .p_msb_dr(pm1)
  );
  ksa_prefix #(.W(W), .SPAN(4), .LAST(1'b1)) u4 (
    .sleep_n, .g_in, .p_in, .pp_in, .c_in, .crit_in(crit4_in),
    .g_out(g4), .p_out(p4), .pp_out(pp4), .c_out(c4), .crit_out(crit4),
    .c_msb_dr(cm4), .p_msb_dr(pm4)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [2*W-1:0] ref_level(logic [W-1:0] g, logic [W-1:0] p, int s);
    logic [W-1:0] go, po;
    for (int j = 0; j < W; j++) begin
      go[j] = (j >= s) ? (g[j] | (p[j] & g[j-s])) : g[j];
      po[j] = (j >= s) ? (p[j] & p[j-s]) : p[j];
    end
    return {go, po};
  endfunction

  function automatic bit all_null();
    return {g1, p1, pp1, c1, g4, p4, pp4, c4} == '0 &&
           crit1 == DR_NULL && crit4 == DR_NULL && cm1 == DR_NULL && pm1 == DR_NULL &&
           cm4 == DR_NULL && pm4 == DR_NULL;
  endfunction

  initial begin
    logic [W-1:0] eg1, ep1, eg4, ep4;
    sleep_n = 1'b0;
    {g_in, p_in, pp_in, c_in} = '0; crit1_in = DR_NULL; crit4_in = DR_NULL;
    #1 check(all_null(), "NULL while asleep");
    for (int n = 0; n < 500; n++) begin
      g_in = W'($urandom); p_in = W'($urandom) & ~g_in; pp_in = W'($urandom); c_in = 1'($urandom);
      {eg1, ep1} = ref_level(g_in, p_in, 1);
      {eg4, ep4} = ref_level(g_in, p_in, 4);
      sleep_n = 1'b1;
      #1 check(all_null(), "no evaluation before the linked SLG input is DATA");
      crit1_in = dr_enc(g_in[0]);
      crit4_in = dr_enc(g_in[3]);
      #1;
      check(g1 == eg1 && p1 == ep1 && pp1 == pp_in && c1 == c_in, "distance-1 level");
      check(g4 == eg4 && p4 == ep4 && pp4 == pp_in && c4 == c_in, "distance-4 level");
      check(crit1 == dr_enc(eg1[1]) && crit4 == dr_enc(eg4[7]), "SLG outputs G[1] and G[7]");
      check(cm1 == DR_NULL && pm1 == DR_NULL, "S to D outputs unused outside the last level");
      check(cm4 == dr_enc(eg4[W-2]) && pm4 == dr_enc(pp_in[W-1]), "S to D outputs of the last level");
      // input goes NULL, outputs hold
      {g_in, p_in, pp_in, c_in} = '0; crit1_in = DR_NULL; crit4_in = DR_NULL;
      #1 check(g1 == eg1 && g4 == eg4 && crit4 == dr_enc(eg4[7]) && cm4 == dr_enc(eg4[W-2]),
               "DATA held after input NULL");
      sleep_n = 1'b0;
      #1 check(all_null(), "NULL after sleep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
