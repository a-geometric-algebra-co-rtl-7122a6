// fp_mul: IEEE 754 floating-point multiplier, five pipeline stages.
//
// Accepts one operand pair per clock and delivers the product MUL_STAGES (5)
// clocks later, so a new result leaves every clock, as the architecture
// specifies. The stages are:
//   1 unpack: classify zero / infinity / NaN, expose the hidden bit, normalise
//     subnormal inputs, add the exponents;
//   2 multiply the significands;
//   3 normalise the product (it lies in [1,4));
//   4 round in the requested mode (fp_round);
//   5 substitute special results and raise the exception flags.
// The format is set by EXP_W/FRAC_W; the default is binary64 (double), and
// EXP_W=8, FRAC_W=23 gives binary32 (single). NaN results are the canonical
// quiet NaN; invalid is raised for infinity times zero and for signalling NaN
// inputs. The five-stage depth and one-per-clock rate follow the architecture
// description; the split of work between the stages is this design's own.
module fp_mul
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
  localparam int unsigned EW  = EXP_W + 3;
  localparam logic signed [EW-1:0] BIAS = EW'((1 << (EXP_W - 1)) - 1);

  typedef struct packed {
    logic nan, inf, zero, invalid, sign;
    rm_e  rm;
  } spec_t;

  // Stage 1: unpack.
  function automatic void unpack(input logic [W-1:0] x, output logic [SIG-1:0] sig,
                                 output logic signed [EW-1:0] e, output logic is_zero,
                                 output logic is_inf, output logic is_nan, output logic is_snan);
    logic [EXP_W-1:0]  ef;
    logic [FRAC_W-1:0] ff;
    ef      = x[W-2:FRAC_W];
    ff      = x[FRAC_W-1:0];
    is_zero = (ef == '0) && (ff == '0);
    is_inf  = (ef == '1) && (ff == '0);
    is_nan  = (ef == '1) && (ff != '0);
    is_snan = is_nan && !ff[FRAC_W-1];
    sig     = {ef != '0, ff};
    e       = (ef == '0) ? EW'(1) : EW'(ef);
    // Normalise a subnormal significand.
    for (int i = 0; i < SIG; i++) begin
      if (!sig[SIG-1] && sig != '0) begin
        sig = sig << 1;
        e   = e - 1;
      end
    end
  endfunction

  logic                    v1, v2, v3, v4;
  spec_t                   s1, s2, s3, s4;
  logic signed [EW-1:0]    e1, e2, e3;
  logic [SIG-1:0]          sa1, sb1;
  logic [2*SIG-1:0]        p2;
  logic [FRAC_W+2:0]       m3;
  logic                    st3;
  logic [W-1:0]            r4;
  fflags_t                 f4;

  // Stage 1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
    end else begin
      v1 <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    logic [SIG-1:0] sa, sb;
    logic signed [EW-1:0] ea, eb;
    logic za, ia, na, qa, zb, ib, nb, qb;
    unpack(a, sa, ea, za, ia, na, qa);
    unpack(b, sb, eb, zb, ib, nb, qb);
    s1.sign    <= a[W-1] ^ b[W-1];
    s1.rm      <= rm;
    s1.nan     <= na | nb | (ia & zb) | (za & ib);
    s1.invalid <= qa | qb | (ia & zb) | (za & ib);
    s1.inf     <= ia | ib;
    s1.zero    <= za | zb;
    e1         <= ea + eb - BIAS;
    sa1        <= sa;
    sb1        <= sb;
  end

  // Stage 2: significand product.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
  end

  always_ff @(posedge clk) begin
    s2 <= s1;
    e2 <= e1;
    p2 <= sa1 * sb1;
  end

  // Stage 3: normalise to 1.f and collect guard, round and sticky bits.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v3 <= 1'b0;
    else        v3 <= v2;
  end

  always_ff @(posedge clk) begin
    logic [2*SIG-1:0] p;
    p  = p2;
    s3 <= s2;
    if (p[2*SIG-1]) begin
      e3 <= e2 + 1;
    end else begin
      e3 <= e2;
      p = p << 1;
    end
    m3  <= p[2*SIG-1 -: FRAC_W+3];
    st3 <= |p[2*SIG-FRAC_W-4:0];
  end

  // Stage 4: rounding.
  logic [W-1:0] rnd;
  fflags_t      rnd_f;

  fp_round #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_round (
    .sign(s3.sign), .exp_in(e3), .sig_in(m3), .sticky_in(st3), .rm(s3.rm),
    .result(rnd), .flags(rnd_f)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v4 <= 1'b0;
    else        v4 <= v3;
  end

  always_ff @(posedge clk) begin
    s4 <= s3;
    r4 <= rnd;
    f4 <= rnd_f;
  end

  // Stage 5: special operands and output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
      flags     <= '0;
    end else begin
      out_valid <= v4;
      if (s4.nan) begin
        y     <= {1'b0, {EXP_W{1'b1}}, 1'b1, {(FRAC_W-1){1'b0}}};
        flags <= '{invalid: s4.invalid, default: 1'b0};
      end else if (s4.inf) begin
        y     <= {s4.sign, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
        flags <= '0;
      end else if (s4.zero) begin
        y     <= {s4.sign, {(W-1){1'b0}}};
        flags <= '0;
      end else begin
        y     <= r4;
        flags <= f4;
      end
    end
  end

endmodule
