// tb_th_gate -- checks the five basic NCL threshold gates (TH12, TH13, TH22,
// TH23, TH33) built from th_gate against a reference model of the hysteresis
// rule: rise when at least M inputs are 1, fall only when all inputs are 0,
// otherwise hold. Inputs follow random sequences that move monotonically
// between all-zero (NULL) and all-one, as NCL inputs do, plus random
// non-monotonic steps; rst must clear a gate holding 1.
module tb_th_gate;

  int checks = 0, failures = 0;

  logic       rst;
  logic [1:0] in2;
  logic [2:0] in3;
  logic       z12, z13, z22, z23, z33;
  logic       r12, r13, r22, r23, r33;

  th_gate #(.M(1), .N(2)) u12 (.rst, .in(in2), .z(z12));
  th_gate #(.M(1), .N(3)) u13 (.rst, .in(in3), .z(z13));
  th_gate #(.M(2), .N(2)) u22 (.rst, .in(in2), .z(z22));
  th_gate #(.M(2), .N(3)) u23 (.rst, .in(in3), .z(z23));
  th_gate #(.M(3), .N(3)) u33 (.rst, .in(in3), .z(z33));

  function automatic logic model(logic prev, int ones, int m, int n);
    if (ones >= m) return 1'b1;
    if (ones == 0) return 1'b0;
    return prev;
    // n is kept for readability of the calls
  endfunction

  task automatic step_and_check();
    #1;
    r12 = rst ? 1'b0 : model(r12, $countones(in2), 1, 2);
    r13 = rst ? 1'b0 : model(r13, $countones(in3), 1, 3);
    r22 = rst ? 1'b0 : model(r22, $countones(in2), 2, 2);
    r23 = rst ? 1'b0 : model(r23, $countones(in3), 2, 3);
    r33 = rst ? 1'b0 : model(r33, $countones(in3), 3, 3);
    checks++;
    if ({z12, z13, z22, z23, z33} !== {r12, r13, r22, r23, r33}) begin
      failures++;
      if (failures < 10)
        $display("FAIL in2=%b in3=%b rst=%b got %b exp %b", in2, in3, rst,
                 {z12, z13, z22, z23, z33}, {r12, r13, r22, r23, r33});
    end
  endtask

  initial begin
    rst = 1'b1; in2 = '0; in3 = '0;
    r12 = 0; r13 = 0; r22 = 0; r23 = 0; r33 = 0;
    step_and_check();
    rst = 1'b0;
    step_and_check();
    // Table rows: A+B, A+B+C, AB, AB+AC+BC, ABC on every input combination
    // reached from all-zero.
    for (int v = 0; v < 8; v++) begin
      in2 = 2'(v); in3 = 3'(v);
      step_and_check();
      in2 = '0; in3 = '0;
      step_and_check();
    end
    // Monotonic wavefronts: set bits one at a time, then clear one at a time.
    for (int r = 0; r < 200; r++) begin
      for (int k = 0; k < 3; k++) begin
        int idx;
        idx = $urandom_range(0, 2);
        in3[idx] = 1'b1;
        in2[idx % 2] = 1'b1;
        step_and_check();
      end
      in3 = '1; in2 = '1; step_and_check();
      for (int k = 0; k < 3; k++) begin
        int idx;
        idx = $urandom_range(0, 2);
        in3[idx] = 1'b0;
        in2[idx % 2] = 1'b0;
        step_and_check();
      end
      in3 = '0; in2 = '0; step_and_check();
    end
    // Random steps, including reset while holding.
    for (int r = 0; r < 500; r++) begin
      in2 = 2'($urandom); in3 = 3'($urandom);
      rst = ($urandom_range(0, 15) == 0);
      step_and_check();
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
