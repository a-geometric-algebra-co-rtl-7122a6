// fp_add: IEEE 754 floating-point adder, six pipeline stages.
//
// Accepts one operand pair per clock and delivers a + b ADD_STAGES (6) clocks
// later, one result per clock. Subtraction is done by the caller flipping the
// sign bit of b. The stages follow the steps the architecture lists for its
// adder:
//   1 unpack, check for zero / special operands, order the operands by
//     magnitude and subtract the exponents;
//   2 align the smaller significand (guard, round and sticky bits kept);
//   3 add or subtract the significands;
//   4 normalise (leading-zero shift or one-bit right shift) and adjust the
//     exponent;
//   5 round in the requested mode (fp_round);
//   6 substitute special results and raise the exception flags.
// An exact zero from cancelling operands is +0, or -0 when rounding toward
// -infinity. Format as in fp_mul: binary64 by default. The six-stage depth,
// the one-per-clock rate and the list of steps follow the architecture; the
// exact assignment of steps to stages is this design's own.
module fp_add
  import ga_pkg::*;
#(
  parameter int unsigned EXP_W  = 11,
  parameter int unsigned FRAC_W = 52
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [EXP_W+FRAC_W:0]  a,
  input  logic [EXP_W+FRAC_W:0]  b,
  input  rm_e                    rm,
  output logic                   out_valid,
  output logic [EXP_W+FRAC_W:0]  y,
  output fflags_t                flags
);

  localparam int unsigned W   = EXP_W + FRAC_W + 1;
  localparam int unsigned SIG = FRAC_W + 1;
  localparam int unsigned XW  = SIG + 3;        // significand with g, r, s
  localparam int unsigned SW  = XW + 1;         // plus carry
  localparam int unsigned EW  = EXP_W + 3;

  typedef struct packed {
    logic nan, inf, invalid, inf_sign, eff_sub, sign;
    rm_e  rm;
  } spec_t;

  logic                 v1, v2, v3, v4, v5;
  spec_t                s1, s2, s3, s4, s5;
  logic signed [EW-1:0] e1, e2, e3, e4;
  logic [SIG-1:0]       big1, sml1;
  logic [EXP_W:0]       d1;
  logic [XW-1:0]        big2, sml2;
  logic [SW-1:0]        sum3;
  logic [FRAC_W+2:0]    m4;
  logic                 st4, zero4;
  logic [W-1:0]         r5;
  fflags_t              f5;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1, v2, v3, v4, v5, out_valid} <= '0;
    else        {v1, v2, v3, v4, v5, out_valid} <= {in_valid, v1, v2, v3, v4, v5};
  end

  // Stage 1: unpack, classify, order by magnitude, exponent difference.
  always_ff @(posedge clk) begin
    logic [W-1:0] x, z;
    logic na, nb, ia, ib, sa, sb;
    na = (a[W-2:FRAC_W] == '1) && (a[FRAC_W-1:0] != '0);
    nb = (b[W-2:FRAC_W] == '1) && (b[FRAC_W-1:0] != '0);
    ia = (a[W-2:FRAC_W] == '1) && (a[FRAC_W-1:0] == '0);
    ib = (b[W-2:FRAC_W] == '1) && (b[FRAC_W-1:0] == '0);
    sa = na && !a[FRAC_W-1];
    sb = nb && !b[FRAC_W-1];
    if (a[W-2:0] >= b[W-2:0]) begin x = a; z = b; end
    else                      begin x = b; z = a; end
    s1.rm       <= rm;
    s1.nan      <= na | nb | (ia & ib & (a[W-1] ^ b[W-1]));
    s1.invalid  <= sa | sb | (ia & ib & (a[W-1] ^ b[W-1]));
    s1.inf      <= ia | ib;
    s1.inf_sign <= ia ? a[W-1] : b[W-1];
    s1.eff_sub  <= a[W-1] ^ b[W-1];
    s1.sign     <= x[W-1];
    big1 <= {x[W-2:FRAC_W] != '0, x[FRAC_W-1:0]};
    sml1 <= {z[W-2:FRAC_W] != '0, z[FRAC_W-1:0]};
    e1   <= (x[W-2:FRAC_W] == '0) ? EW'(1) : EW'(x[W-2:FRAC_W]);
    d1   <= ((x[W-2:FRAC_W] == '0) ? (EXP_W+1)'(1) : (EXP_W+1)'(x[W-2:FRAC_W]))
          - ((z[W-2:FRAC_W] == '0) ? (EXP_W+1)'(1) : (EXP_W+1)'(z[W-2:FRAC_W]));
  end

  // Stage 2: align the smaller operand.
  always_ff @(posedge clk) begin
    logic [XW-1:0] sm;
    logic          st;
    sm = {sml1, 3'b000};
    st = 1'b0;
    for (int i = 0; i < XW; i++) begin
      if ((EXP_W+1)'(i) < d1) begin
        st = st | sm[0];
        sm = sm >> 1;
      end
    end
    s2   <= s1;
    e2   <= e1;
    big2 <= {big1, 3'b000};
    sml2 <= {sm[XW-1:1], sm[0] | st};
  end

  // Stage 3: significand addition or subtraction (big >= small, no borrow).
  always_ff @(posedge clk) begin
    s3   <= s2;
    e3   <= e2;
    sum3 <= s2.eff_sub ? ({1'b0, big2} - {1'b0, sml2}) : ({1'b0, big2} + {1'b0, sml2});
  end

  // Stage 4: normalise so that the hidden bit sits at position XW-1.
  always_ff @(posedge clk) begin
    logic [SW-1:0]        n;
    logic signed [EW-1:0] e;
    n = sum3;
    e = e3;
    if (n[SW-1]) begin
      n = {1'b0, n[SW-1:2], n[1] | n[0]};
      e = e + 1;
    end else begin
      for (int i = 0; i < XW; i++) begin
        if (!n[XW-1] && n != '0) begin
          n = n << 1;
          e = e - 1;
        end
      end
    end
    s4    <= s3;
    zero4 <= (sum3 == '0);
    e4    <= e;
    m4    <= n[XW-1:1];
    st4   <= n[0];
  end

  // Stage 5: rounding.
  logic [W-1:0] rnd;
  fflags_t      rnd_f;

  fp_round #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_round (
    .sign(s4.sign), .exp_in(e4), .sig_in(m4), .sticky_in(st4), .rm(s4.rm),
    .result(rnd), .flags(rnd_f)
  );

  always_ff @(posedge clk) begin
    s5 <= s4;
    if (zero4) begin
      // Exact zero: keeps the common sign of two like-signed zeros, else +0
      // (-0 when rounding toward -infinity).
      r5 <= {s4.eff_sub ? (s4.rm == RM_RDN) : s4.sign, {(W-1){1'b0}}};
      f5 <= '0;
    end else begin
      r5 <= rnd;
      f5 <= rnd_f;
    end
  end

  // Stage 6: special operands and output register.
  always_ff @(posedge clk) begin
    if (s5.nan) begin
      y     <= {1'b0, {EXP_W{1'b1}}, 1'b1, {(FRAC_W-1){1'b0}}};
      flags <= '{invalid: s5.invalid, default: 1'b0};
    end else if (s5.inf) begin
      y     <= {s5.inf_sign, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
      flags <= '0;
    end else begin
      y     <= r5;
      flags <= f5;
    end
  end

endmodule
