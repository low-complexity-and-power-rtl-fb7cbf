// tb_ksa_sum -- checks the sum stage: sum[k] = pp[k] ^ carry_k with carry_0 =
// c_in and carry_k = G[k-1]; the MSB from the dual-rail SLGL; the carry out
// buffered from the linked SLG input. The SLGL must wait for its enable and
// for both dual-rail operands, the stage must hold after its input goes NULL
// and be NULL while asleep.
module tb_ksa_sum;
  import hrncl_pkg::*;

  localparam int W = 8;
  int checks = 0, failures = 0;

  logic         sleep_n;
  logic [W-1:0] g_in, pp_in, sum;
  logic         c_in;
  dr_t          crit_in, c_msb_dr, p_msb_dr, s_msb, cout;

  ksa_sum dut (.sleep_n, .g_in, .pp_in, .c_in, .crit_in, .c_msb_dr, .p_msb_dr,
               .sum, .s_msb, .cout);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic bit all_null();
    return sum == '0 && s_msb == DR_NULL && cout == DR_NULL;
  endfunction

  initial begin
    logic [W-1:0] es;
    sleep_n = 1'b0;
    {g_in, pp_in, c_in} = '0; crit_in = DR_NULL; c_msb_dr = DR_NULL; p_msb_dr = DR_NULL;
    #1 check(all_null(), "NULL while asleep");
    for (int n = 0; n < 500; n++) begin
      g_in = W'($urandom); pp_in = W'($urandom); c_in = 1'($urandom);
      for (int k = 0; k < W; k++) es[k] = pp_in[k] ^ ((k == 0) ? c_in : g_in[k-1]);
      sleep_n = 1'b1;
      c_msb_dr = dr_enc(g_in[W-2]);
      p_msb_dr = dr_enc(pp_in[W-1]);
      #1 check(all_null(), "SLGL waits for its enable");
      crit_in = dr_enc(g_in[W-1]);
      #1;
      check(sum == es, $sformatf("sum %h expected %h", sum, es));
      check(s_msb == dr_enc(es[W-1]), "dual-rail MSB");
      check(cout == dr_enc(g_in[W-1]), "carry out");
      {g_in, pp_in, c_in} = '0; crit_in = DR_NULL; c_msb_dr = DR_NULL; p_msb_dr = DR_NULL;
      #1 check(sum == es && s_msb == dr_enc(es[W-1]) && cout != DR_NULL, "DATA held after input NULL");
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
