// tb_blade_logic: exhaustive test of the blade index and sign network.
//
// Every pair of basis blades is tried for N = 3 (Euclidean metric), N = 5
// (the largest algebra the architecture was measured with) and N = 3 with
// e_i e_i = -1 for all i. Expected values come from writing out both factor
// lists, bubble-sorting them and counting transpositions, plus one minus sign
// per cancelled pair under the negative metric.
`timescale 1ns/1ps
module tb_blade_logic;
  int checks = 0, failures = 0;

  logic [2:0] a3, b3, r3, rn3;
  logic       n3, nn3;
  logic [4:0] a5, b5, r5;
  logic       n5;

  blade_logic #(.N(3)) u3 (.blade_a(a3), .blade_b(b3), .blade_r(r3), .neg(n3));
  blade_logic #(.N(3), .NEG_METRIC(3'b111)) u3n (.blade_a(a3), .blade_b(b3), .blade_r(rn3), .neg(nn3));
  blade_logic #(.N(5)) u5 (.blade_a(a5), .blade_b(b5), .blade_r(r5), .neg(n5));

  function automatic bit swap_parity(int a, int b, int n);
    int lst [10];
    int cnt = 0, swaps = 0, t;
    for (int i = 0; i < n; i++) if (a[i]) lst[cnt++] = i;
    for (int i = 0; i < n; i++) if (b[i]) lst[cnt++] = i;
    for (int p = 0; p < cnt; p++)
      for (int q = 0; q + 1 < cnt - p; q++)
        if (lst[q] > lst[q+1]) begin
          t = lst[q]; lst[q] = lst[q+1]; lst[q+1] = t;
          swaps++;
        end
    return swaps[0];
  endfunction

  function automatic bit shared_parity(int a, int b);
    int c = 0;
    for (int i = 0; i < 8; i++) if (a[i] && b[i]) c++;
    return c[0];
  endfunction

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); b3 = 3'(j);
        #1;
        expect_eq(int'(r3), i ^ j, "N=3 index");
        expect_eq(int'(n3), int'(swap_parity(i, j, 3)), "N=3 sign");
        expect_eq(int'(rn3), i ^ j, "negative metric index");
        expect_eq(int'(nn3), int'(swap_parity(i, j, 3) ^ shared_parity(i, j)), "negative metric sign");
      end
    // e123 e23 = -e1 and e1 e2 = +e12, e2 e1 = -e12.
    a3 = 3'b111; b3 = 3'b110; #1;
    expect_eq(int'(r3), 1, "e123 e23 index");
    expect_eq(int'(n3), 1, "e123 e23 sign");
    a3 = 3'b001; b3 = 3'b010; #1;
    expect_eq(int'(n3), 0, "e1 e2 sign");
    a3 = 3'b010; b3 = 3'b001; #1;
    expect_eq(int'(n3), 1, "e2 e1 sign");
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j);
        #1;
        expect_eq(int'(r5), i ^ j, "N=5 index");
        expect_eq(int'(n5), int'(swap_parity(i, j, 5)), "N=5 sign");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
