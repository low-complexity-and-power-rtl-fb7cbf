// tb_ncl_cd -- checks the n-bit completion detector (default 2 bits and a
// 3-bit instance). Bits go from NULL to DATA one at a time in random order
// and back to NULL the same way: done must rise exactly when the last bit
// becomes DATA and fall exactly when the last bit becomes NULL.
module tb_ncl_cd;
  import hrncl_pkg::*;

  int checks = 0, failures = 0;

  logic           rst;
  dr_t [1:0]      d2;
  dr_t [2:0]      d3;
  logic           done2, done3;

  ncl_cd          u2 (.rst, .d(d2), .done(done2));
  ncl_cd #(.N(3)) u3 (.rst, .d(d3), .done(done3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1'b1; d2 = '0; d3 = '0;
    #1 rst = 1'b0;
    #1 check(!done2 && !done3, "done low after reset");
    for (int r = 0; r < 300; r++) begin
      int order [3];
      // DATA wavefront
      order = '{0, 1, 2};
      order.shuffle();
      for (int k = 0; k < 3; k++) begin
        int i;
        logic v;
        i = order[k];
        v = 1'($urandom);
        d3[i] = dr_enc(v);
        if (i < 2) d2[i] = dr_enc(v);
        #1;
        check(done3 == (k == 2), $sformatf("3-bit done after %0d DATA bits", k + 1));
        check(done2 == (d2[0] != DR_NULL && d2[1] != DR_NULL), "2-bit done on DATA");
      end
      // NULL wavefront
      order.shuffle();
      for (int k = 0; k < 3; k++) begin
        int i;
        i = order[k];
        d3[i] = DR_NULL;
        if (i < 2) d2[i] = DR_NULL;
        #1;
        check(done3 == (k != 2), $sformatf("3-bit done after %0d NULL bits", k + 1));
        check(done2 == (d2[0] != DR_NULL || d2[1] != DR_NULL), "2-bit done on NULL");
      end
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
