// tb_ksa_pre -- checks stage 1 (generate/propagate) of the adder on random
// tokens. For every token the stage must: stay NULL while asleep even with
// DATA at its input; stay NULL while awake until its dual-rail inputs are
// DATA; then give g = a & b (bit 0: majority of a0, b0, cin), p = a ^ b,
// c = cin and the dual-rail SLG output equal to g[0]; keep all of that when
// its input returns to NULL; and go NULL when put to sleep.
module tb_ksa_pre;
  import hrncl_pkg::*;

  localparam int W = 8;
  int checks = 0, failures = 0;

  logic         sleep_n;
  logic [W-1:1] a_hi, b_hi;
  dr_t          a0, b0, cin;
  logic [W-1:0] g, p;
  logic         c;
  dr_t          g0_dr;

  ksa_pre dut (.sleep_n, .a_hi, .b_hi, .a0, .b0, .cin, .g, .p, .c, .g0_dr);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic bit is_null();
    return g == '0 && p == '0 && c == 1'b0 && g0_dr == DR_NULL;
  endfunction

  initial begin
    logic [W-1:0] a, b, eg, ep;
    logic         ci;
    sleep_n = 1'b0;
    a_hi = '0; b_hi = '0; a0 = DR_NULL; b0 = DR_NULL; cin = DR_NULL;
    #1 check(is_null(), "NULL while asleep");
    for (int n = 0; n < 500; n++) begin
      a = W'($urandom); b = W'($urandom); ci = 1'($urandom);
      eg = a & b;
      eg[0] = (a[0] + b[0] + ci) >= 2;
      ep = a ^ b;
      // DATA arrives while asleep
      a_hi = a[W-1:1]; b_hi = b[W-1:1];
      a0 = dr_enc(a[0]); b0 = dr_enc(b[0]); cin = dr_enc(ci);
      #1 check(is_null(), "asleep stage ignores DATA");
      sleep_n = 1'b1;
      #1;
      check(g == eg && p == ep && c == ci, $sformatf("g/p/c for a=%h b=%h cin=%b", a, b, ci));
      check(g0_dr == dr_enc(eg[0]), "SLG output DATA with the bit-0 generate");
      // input returns to NULL: the stage keeps its DATA
      a_hi = '0; b_hi = '0; a0 = DR_NULL; b0 = DR_NULL; cin = DR_NULL;
      #1 check(g == eg && p == ep && c == ci && g0_dr == dr_enc(eg[0]), "DATA held after input NULL");
      sleep_n = 1'b0;
      #1 check(is_null(), "NULL after sleep");
      // awake with only part of the dual-rail input present
      sleep_n = 1'b1;
      a0 = dr_enc(a[0]); b0 = dr_enc(b[0]);
      #1 check(is_null(), "no evaluation before cin is DATA");
      a0 = DR_NULL; b0 = DR_NULL;
      sleep_n = 1'b0;
      #1;
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
