// ga_ref_pkg: reference model of the 3-D geometric-algebra operations, for the
// testbenches only.
//
// Multivectors are 8 reals indexed by blade bitmap (bit i = e_(i+1)). The sign
// of a product of basis blades is found here by writing out both factor lists,
// bubble-sorting the concatenation and counting transpositions, a different
// method from the XOR/AND network of the hardware. Sums of products are formed
// in the order the two-lane (or one-lane) hardware accumulates them, so that
// round-to-nearest results agree bit for bit. Helpers for binary32 operands
// (normal numbers and zero) serve the single-precision mode.
package ga_ref_pkg;
  import ga_pkg::*;

  typedef real mv_t [8];

  function automatic real blade_sign(int a, int b);
    int lst [6];
    int n = 0, swaps = 0, t;
    for (int i = 0; i < 3; i++) if (a[i]) lst[n++] = i;
    for (int i = 0; i < 3; i++) if (b[i]) lst[n++] = i;
    for (int p = 0; p < n; p++)
      for (int q = 0; q + 1 < n - p; q++)
        if (lst[q] > lst[q+1]) begin
          t = lst[q]; lst[q] = lst[q+1]; lst[q+1] = t;
          swaps++;
        end
    return (swaps % 2 == 1) ? -1.0 : 1.0;
  endfunction

  function automatic bit keep(op_e op, int i, int j);
    case (op)
      OP_OUTER: return (i & j) == 0;
      OP_INNER: return (i & ~j & 7) == 0;
      default:  return 1'b1;
    endcase
  endfunction

  // Expected result of the core, accumulation order of NLANES lanes.
  function automatic void ref_op(input mv_t a, input mv_t b, input op_e op,
                                 input int nlanes, output mv_t r);
    real acc [2][8];
    for (int l = 0; l < 2; l++) for (int k = 0; k < 8; k++) acc[l][k] = 0.0;
    if (op == OP_ADD || op == OP_SUB) begin
      for (int k = 0; k < 8; k++) r[k] = (op == OP_ADD) ? a[k] + b[k] : a[k] - b[k];
      return;
    end
    for (int i = 0; i < 8; i++) begin
      int l = (nlanes == 2 && i >= 4) ? 1 : 0;
      for (int k = 0; k < 8; k++) begin
        int j = i ^ k;
        if (a[i] != 0.0 && b[j] != 0.0 && keep(op, i, j))
          acc[l][k] = acc[l][k] + (blade_sign(i, j) * a[i]) * b[j];
      end
    end
    for (int k = 0; k < 8; k++) r[k] = (nlanes == 2) ? acc[0][k] + acc[1][k] : acc[0][k];
  endfunction

  function automatic real rnd_coef();
    return (real'($urandom_range(0, 2000000)) - 1000000.0) / 131072.0 + real'($urandom) * 1.0e-12;
  endfunction

  // kind 0: full multivector, 1: colour (bivectors only), 2: rotor (scalar and
  // bivectors), 3: vector, 4: random mix with zero coefficients.
  function automatic void gen_mv(input int kind, output mv_t m);
    for (int k = 0; k < 8; k++) begin
      case (kind)
        0: m[k] = rnd_coef();
        1: m[k] = (k == 3 || k == 5 || k == 6) ? rnd_coef() : 0.0;
        2: m[k] = (k == 0 || k == 3 || k == 5 || k == 6) ? rnd_coef() : 0.0;
        3: m[k] = (k == 1 || k == 2 || k == 4) ? rnd_coef() : 0.0;
        default: m[k] = ($urandom_range(0, 2) == 0) ? 0.0 : rnd_coef();
      endcase
    end
  endfunction

  function automatic logic [511:0] pack_mv(input mv_t m);
    logic [511:0] w;
    for (int k = 0; k < 8; k++) w[k*64 +: 64] = $realtobits(m[k]);
    return w;
  endfunction

  // binary32 support (normal numbers and zero only).
  function automatic real f32_to_real(logic [31:0] x);
    if (x[30:0] == 0) return x[31] ? -0.0 : 0.0;
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0});
  endfunction

  // Rounds a double to binary32, nearest-even.
  function automatic logic [31:0] real_to_f32(real r);
    logic [63:0] d;
    int e;
    logic [24:0] m;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && (d[27:0] != 0 || m[0])) m = m + 1;
    if (m[24]) begin
      m = m >> 1;
      e++;
    end
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // The nearest binary32 value of each coefficient.
  function automatic void to_single(inout mv_t m);
    for (int k = 0; k < 8; k++) m[k] = f32_to_real(real_to_f32(m[k]));
  endfunction

  function automatic logic [511:0] pack_mv32(input mv_t m);
    logic [511:0] w;
    for (int k = 0; k < 8; k++) w[k*64 +: 64] = {32'd0, real_to_f32(m[k])};
    return w;
  endfunction

endpackage
