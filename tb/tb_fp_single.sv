// tb_fp_single: the floating-point units built for IEEE 754 binary32
// (EXP_W = 8, FRAC_W = 23), the single-precision form of the co-processor's
// arithmetic.
//
// fp_mul and fp_add are instantiated side by side at single precision and fed
// one random operand pair per clock. The reference is formed in double
// precision, where the product of two binary32 numbers is exact, and so is
// their sum when the exponents differ by little (the bench keeps them within
// 20); the exact value is then rounded to binary32 by the bench's own
// round-to-nearest-even code. Only operands whose results stay in the normal
// binary32 range are used. The latencies of 5 (multiplier) and 6 (adder)
// clocks are checked on every result.
`timescale 1ns/1ps
module tb_fp_single;
  import ga_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [31:0] a = '0, b = '0;
  logic m_ov, a_ov;
  logic [31:0] m_y, a_y;
  fflags_t m_f, a_f;

  int checks = 0, failures = 0;
  longint cycle = 0;

  fp_mul #(.EXP_W(8), .FRAC_W(23)) u_mul (
    .clk, .rst_n, .in_valid, .a, .b, .rm(RM_RNE), .out_valid(m_ov), .y(m_y), .flags(m_f));
  fp_add #(.EXP_W(8), .FRAC_W(23)) u_add (
    .clk, .rst_n, .in_valid, .a, .b, .rm(RM_RNE), .out_valid(a_ov), .y(a_y), .flags(a_f));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // binary32 <-> double for normal numbers and zero.
  function automatic real f32_to_real(logic [31:0] x);
    if (x[30:0] == 0) return x[31] ? -0.0 : 0.0;
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0});
  endfunction

  // Round a double to binary32, nearest-even; ok = 0 when the result would
  // not be a normal binary32 number or zero.
  function automatic logic [31:0] real_to_f32(real r, output bit ok);
    logic [63:0] d;
    int e;
    logic [24:0] m;
    logic g, st;
    d = $realtobits(r);
    ok = 1;
    if (d[62:0] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    g = d[28];
    st = d[27:0] != 0;
    if (g && (st || m[0])) m = m + 1;
    if (m[24]) begin
      m = m >> 1;
      e++;
    end
    if (e < 1 || e > 254) begin
      ok = 0;
      return '0;
    end
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] rand_f32(int emin, int emax);
    logic [31:0] x;
    x = $urandom;
    x[30:23] = 8'($urandom_range(emin, emax));
    return x;
  endfunction

  typedef struct {
    logic [31:0] y;
    bit          ok;
    longint      t_in;
  } item_t;
  item_t qm[$], qa[$];

  always @(posedge clk) begin
    item_t it;
    if (rst_n && m_ov) begin
      it = qm.pop_front();
      if (it.ok) begin
        checks += 2;
        if (m_y !== it.y) begin
          failures++;
          $display("mul: got %h expected %h", m_y, it.y);
        end
        if (cycle - it.t_in != 5) begin
          failures++;
          $display("mul latency %0d", cycle - it.t_in);
        end
      end
    end
    if (rst_n && a_ov) begin
      it = qa.pop_front();
      if (it.ok) begin
        checks += 2;
        if (a_y !== it.y) begin
          failures++;
          $display("add: got %h expected %h", a_y, it.y);
        end
        if (cycle - it.t_in != 6) begin
          failures++;
          $display("add latency %0d", cycle - it.t_in);
        end
      end
    end
  end

  initial begin
    logic [31:0] xa, xb;
    item_t im, ia;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      xa = rand_f32(70, 190);
      xb = rand_f32(70, 190);
      if (i % 2 == 1) xb[30:23] = 8'(int'(xa[30:23]) + $urandom_range(0, 20) - 10);
      if (i % 50 == 0) xb = {~xa[31], xa[30:0]};           // exact cancellation
      im.y = real_to_f32(f32_to_real(xa) * f32_to_real(xb), im.ok);
      // The sum is exact in double only for nearby exponents.
      ia.y = real_to_f32(f32_to_real(xa) + f32_to_real(xb), ia.ok);
      if (int'(xa[30:23]) - int'(xb[30:23]) > 20 || int'(xb[30:23]) - int'(xa[30:23]) > 20)
        ia.ok = 0;
      im.t_in = cycle;      // sampled at the next rising edge
      ia.t_in = cycle;
      qm.push_back(im);
      qa.push_back(ia);
      a = xa;
      b = xb;
      in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (qm.size() != 0 || qa.size() != 0) begin
      failures++;
      $display("results missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
