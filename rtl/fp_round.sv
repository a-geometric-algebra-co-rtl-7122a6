// fp_round: rounding and packing stage shared by the floating-point units.
//
// Takes a finite, nonzero, normalised intermediate result -- sign, biased
// exponent (signed and wider than the format, so it may be out of range) and
// a significand {hidden 1, fraction, guard, round} plus a sticky bit -- and
// returns the IEEE 754 encoding rounded in one of the four rounding modes.
// Results below the normal range are shifted right into the subnormal range
// before rounding (gradual underflow); results above it become infinity or the
// largest finite number, as the rounding mode dictates. Underflow is signalled
// when the result is tiny before rounding and inexact (one of the two
// tininess rules IEEE 754 allows; which one the units use is this design's
// choice). Purely combinational.
module fp_round
  import ga_pkg::*;
#(
  parameter int unsigned EXP_W  = 11,
  parameter int unsigned FRAC_W = 52
) (
  input  logic                         sign,
  input  logic signed [EXP_W+2:0]      exp_in,   // biased exponent of sig_in
  input  logic [FRAC_W+2:0]            sig_in,   // 1.frac, guard, round
  input  logic                         sticky_in,
  input  rm_e                          rm,
  output logic [EXP_W+FRAC_W:0]        result,
  output fflags_t                      flags
);

  localparam int unsigned SW = FRAC_W + 3;
  localparam logic signed [EXP_W+2:0] EXP_MAX = (EXP_W+3)'((1 << EXP_W) - 1);

  always_comb begin
    logic [SW-1:0]             sig;
    logic                      sticky;
    logic signed [EXP_W+2:0]   e;
    logic                      tiny;
    logic                      lsb, g, st, up, inexact;
    logic [FRAC_W+1:0]         mant;     // carry, hidden, fraction
    int unsigned               sh;

    sig    = sig_in;
    sticky = sticky_in;
    e      = exp_in;
    tiny   = (exp_in < 1);
    sh     = 0;

    // Gradual underflow: bring the exponent up to 1, shifting the significand.
    if (tiny) begin
      if (exp_in < -signed'((EXP_W+3)'(SW)))
        sh = SW + 1;
      else
        sh = 32'(1 - exp_in);
      for (int i = 0; i < SW + 1; i++) begin
        if (i < sh) begin
          sticky = sticky | sig[0];
          sig    = sig >> 1;
        end
      end
      e = 1;
    end

    lsb     = sig[2];
    g       = sig[1];
    st      = sig[0] | sticky;
    inexact = g | st;
    unique case (rm)
      RM_RNE: up = g & (st | lsb);
      RM_RTZ: up = 1'b0;
      RM_RUP: up = ~sign & inexact;
      default: up = sign & inexact;
    endcase

    mant = {1'b0, sig[SW-1:2]} + (FRAC_W+2)'(up);
    if (mant[FRAC_W+1]) begin
      mant = mant >> 1;
      e    = e + 1;
    end

    flags = '0;
    flags.inexact   = inexact;
    flags.underflow = tiny & inexact;

    if (e >= EXP_MAX) begin
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
      flags.underflow = 1'b0;
      if (rm == RM_RNE || (rm == RM_RUP && !sign) || (rm == RM_RDN && sign))
        result = {sign, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
      else
        result = {sign, {(EXP_W-1){1'b1}}, 1'b0, {FRAC_W{1'b1}}};
    end else if (!mant[FRAC_W]) begin
      // Subnormal or zero: the exponent field is 0.
      result = {sign, {EXP_W{1'b0}}, mant[FRAC_W-1:0]};
    end else begin
      result = {sign, e[EXP_W-1:0], mant[FRAC_W-1:0]};
    end
  end

endmodule
