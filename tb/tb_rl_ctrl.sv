// tb_rl_ctrl -- checks the RL-NCL stage control: ko is the OR of the two
// rails of the critical bit, and sleep_n is a C-element of ko_prev and NOT
// ko_next (set when both are 1, cleared when both are 0, held otherwise,
// cleared by rst). Random input sequences are compared with a reference
// model kept by the testbench.
module tb_rl_ctrl;
  import hrncl_pkg::*;

  int checks = 0, failures = 0;

  logic rst, ko_prev, ko_next, sleep_n, ko;
  dr_t  crit;
  logic ref_s;
  int   n_set = 0, n_clr = 0, n_hold = 0;

  rl_ctrl dut (.rst, .ko_prev, .ko_next, .crit, .sleep_n, .ko);

  initial begin
    rst = 1'b1; ko_prev = 1'b0; ko_next = 1'b0; crit = DR_NULL; ref_s = 1'b0;
    #1 rst = 1'b0;
    for (int r = 0; r < 2000; r++) begin
      logic a, nb;
      ko_prev = 1'($urandom);
      ko_next = 1'($urandom);
      case ($urandom_range(0, 2))
        0: crit = DR_NULL;
        1: crit = dr_enc(1'b0);
        default: crit = dr_enc(1'b1);
      endcase
      rst = ($urandom_range(0, 63) == 0);
      a  = ko_prev;
      nb = !ko_next;
      if (rst)             ref_s = 1'b0;
      else if (a && nb)    begin ref_s = 1'b1; n_set++; end
      else if (!a && !nb)  begin ref_s = 1'b0; n_clr++; end
      else                 n_hold++;
      #1;
      checks++;
      if (sleep_n != ref_s || ko != (crit != DR_NULL)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: prev=%b next=%b crit=%b -> sleep_n=%b ko=%b (exp %b %b)",
                   ko_prev, ko_next, crit, sleep_n, ko, ref_s, crit != DR_NULL);
      end
    end
    checks++;
    if (n_set == 0 || n_clr == 0 || n_hold == 0) failures++;
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
