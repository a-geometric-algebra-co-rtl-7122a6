// tb_fp_mul: self-checking test of the binary64 pipelined multiplier.
//
// Streams one operand pair per clock. Round-to-nearest results are compared
// with the simulator's own double-precision product; directed rounding modes
// are checked on products of integers whose exact 128-bit value the bench
// rounds itself. Checks the five-cycle latency of every result, and the
// overflow, underflow and invalid flags on chosen operands.
`timescale 1ns/1ps
module tb_fp_mul;
  import ga_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [63:0] a = '0, b = '0;
  rm_e rm = RM_RNE;
  logic out_valid;
  logic [63:0] y;
  fflags_t flags;

  int checks = 0, failures = 0;
  longint cycle = 0;

  fp_mul dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [63:0] exp_y;
    longint      t_in;
    logic        chk_flags;
    fflags_t     exp_f;
  } item_t;
  item_t q[$];

  function automatic logic is_nan(logic [63:0] x);
    return x[62:52] == 11'h7ff && x[51:0] != 0;
  endfunction

  // Round an exact unsigned integer to binary64 in mode m.
  function automatic logic [63:0] round_int(logic s, logic [127:0] p, rm_e m);
    int msb, sh;
    logic [127:0] mant;
    logic g, st, up;
    if (p == 0) return {s, 63'd0};
    msb = 0;
    for (int i = 0; i < 128; i++) if (p[i]) msb = i;
    if (msb <= 52) begin
      mant = p << (52 - msb);
      g = 0; st = 0;
    end else begin
      sh = msb - 52;
      mant = p >> sh;
      g = p[sh-1];
      st = (sh >= 2) ? ((p & ((128'd1 << (sh - 1)) - 1)) != 0) : 1'b0;
    end
    case (m)
      RM_RNE: up = g & (st | mant[0]);
      RM_RTZ: up = 0;
      RM_RUP: up = !s & (g | st);
      default: up = s & (g | st);
    endcase
    mant = mant + 128'(up);
    if (mant[53]) begin mant = mant >> 1; msb++; end
    return {s, 11'(msb + 1023), mant[51:0]};
  endfunction

  function automatic logic [63:0] rand_double();
    logic [63:0] x;
    int k = $urandom_range(0, 99);
    x = {$urandom, $urandom};
    if (k < 70)      x[62:52] = 11'($urandom_range(700, 1350));
    else if (k < 78) x[62:52] = 11'($urandom_range(1, 60));       // near underflow
    else if (k < 83) x[62:52] = 0;                                 // subnormal
    else if (k < 86) x[62:0] = 0;                                  // zero
    else if (k < 89) x = {x[63], 11'h7ff, 52'd0};                  // infinity
    else if (k < 91) x = {x[63], 11'h7ff, 1'b1, x[50:0]};          // quiet NaN
    else             x[62:52] = 11'($urandom_range(1800, 2046));   // near overflow
    return x;
  endfunction

  task automatic issue(logic [63:0] xa, logic [63:0] xb, rm_e m, logic [63:0] ey,
                       logic chk_f, fflags_t ef);
    item_t it;
    a <= xa; b <= xb; rm <= m; in_valid <= 1;
    it.exp_y = ey; it.t_in = cycle + 1; it.chk_flags = chk_f; it.exp_f = ef;
    q.push_back(it);
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        it = q.pop_front();
        checks++;
        if (is_nan(it.exp_y) ? !is_nan(y) : (y !== it.exp_y)) begin
          failures++;
          $display("mismatch: got %h expected %h", y, it.exp_y);
        end
        checks++;
        if (cycle - it.t_in != 5) begin
          failures++;
          $display("latency %0d, expected 5", cycle - it.t_in);
        end
        if (it.chk_flags) begin
          checks++;
          if (flags !== it.exp_f) begin
            failures++;
            $display("flags %b expected %b", flags, it.exp_f);
          end
        end
      end
    end
  end

  initial begin
    logic [63:0] xa, xb;
    logic [127:0] ia, ib;
    rm_e m;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Random operands, round to nearest, back to back.
    for (int i = 0; i < 4000; i++) begin
      xa = rand_double();
      xb = rand_double();
      issue(xa, xb, RM_RNE, $realtobits($bitstoreal(xa) * $bitstoreal(xb)), 0, '0);
    end
    // Integer products in every rounding mode.
    for (int i = 0; i < 2000; i++) begin
      ia = {96'd0, $urandom} << $urandom_range(0, 21);
      ib = {96'd0, $urandom} << $urandom_range(0, 21);
      if (ia == 0) ia = 1;
      if (ib == 0) ib = 3;
      m = rm_e'(i % 4);
      xa = $realtobits(real'(ia));
      xb = $realtobits(real'(ib));
      if (i % 3 == 1) xb[63] = 1'b1;
      issue(xa, xb, m, round_int(xb[63], ia * ib, m), 0, '0);
    end
    // Flags: overflow, underflow, invalid, exact.
    issue(64'h7fe0000000000000, 64'h4000000000000001, RM_RNE, 64'h7ff0000000000000, 1,
          '{invalid: 0, overflow: 1, underflow: 0, inexact: 1});
    issue(64'h7fe0000000000000, 64'h4000000000000001, RM_RTZ, 64'h7fefffffffffffff, 1,
          '{invalid: 0, overflow: 1, underflow: 0, inexact: 1});
    issue(64'h0010000000000001, 64'h3fe0000000000000, RM_RNE,
          $realtobits($bitstoreal(64'h0010000000000001) * 0.5), 1,
          '{invalid: 0, overflow: 0, underflow: 1, inexact: 1});
    issue(64'h7ff0000000000000, 64'h0000000000000000, RM_RNE, 64'h7ff8000000000000, 1,
          '{invalid: 1, overflow: 0, underflow: 0, inexact: 0});
    issue(64'h4008000000000000, 64'hc000000000000000, RM_RNE, 64'hc018000000000000, 1,
          '{default: 0});
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
