// ga_core: the geometric-algebra processing core.
//
// Computes one operation on two multivectors A and B of an N-dimensional
// geometric algebra, each held as 2**N binary64 coefficients indexed by blade
// bitmap: the geometric product, the outer product, the inner product (left
// contraction), the sum or the difference, as cfg.op selects. The result goes
// out one coefficient at a time to the result register file.
//
// Products. The core has NLANES multiply-accumulate lanes, each a pipelined
// multiplier (fp_mul, 5 stages) feeding a pipelined adder (fp_add, 6 stages)
// that accumulates into a private row of 2**N partial sums. Lane l owns the
// blades i of A in [l*H, (l+1)*H), H = 2**N / NLANES, and walks the pairs
// (i, k) row by row, k being the result blade; the B coefficient used is
// B[i XOR k] and the blade logic supplies the sign of e_i e_(i^k). Pairs where
// either coefficient is zero, or that the selected product discards, are
// skipped, so sparse multivectors (a colour held as three bivector
// coefficients) take fewer cycles than full ones. An accumulator is read
// again only after its previous update has left the adder: a per-blade
// countdown holds the lane (a stall) when the next pair would hit a partial
// sum still in flight. When all lanes have drained, a third adder sums the
// lanes' partial sums blade by blade and writes the result register. With
// NLANES = 1 the partial sums are written directly.
//
// Sums. OP_ADD and OP_SUB send A[k] +/- B[k] through the third adder.
//
// Precision. With cfg.single set, the coefficients in memory are binary32
// numbers in the low 32 bits of each slot. They are widened exactly to the
// core's format when captured, the operation runs at full width, and each
// result coefficient is rounded once to binary32 (rounding mode cfg.rm) on its
// way to the result register, with that rounding's flags added to fflags. The
// mode exists only when the core's own format is wider than binary32.
//
// Operand fetch. While `load` is high (three cycles) the core reads A from
// memory word addr_a + idx*stride_a, then B from addr_b + idx*stride_b
// (synchronous memory, one cycle of read latency).
//
// Timing: `start` (one cycle) begins the operation; `process_end` pulses in
// the cycle after the last result coefficient was written. For a full 3-D
// geometric product with two lanes this is 32 issue cycles plus the pipeline
// depths plus the final 2**N-coefficient merge.
//
// From the architecture: two multipliers and three adders (the "two core"
// configuration, NLANES = 2), blade index by XOR and sign by a swap count,
// a result register written by the core, stalling to keep the pipelines
// consistent, fewer cycles for bivector-only colours. The lane split, the
// skip rule, the stall rule and the operand fetch order are this design's own.
module ga_core
  import ga_pkg::*;
#(
  parameter int unsigned N          = 3,
  parameter int unsigned EXP_W      = 11,
  parameter int unsigned FRAC_W     = 52,
  parameter int unsigned NLANES     = 2,
  parameter int unsigned AW         = 8,
  parameter logic [N-1:0] NEG_METRIC = '0
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  cfg_t                              cfg,
  input  logic                              clear,      // clear partial sums and flags
  // operand fetch
  input  logic                              load,
  input  logic [AW-1:0]                     addr_a,
  input  logic [AW-1:0]                     addr_b,
  input  logic [AW-1:0]                     stride_a,
  input  logic [AW-1:0]                     stride_b,
  input  logic [AW-1:0]                     idx,
  output logic                              rd_en,
  output logic [AW-1:0]                     rd_addr,
  input  logic [(2**N)*(EXP_W+FRAC_W+1)-1:0] rd_data,
  // processing
  input  logic                              start,
  output logic                              process_end,
  output logic                              active,
  output logic                              stall,
  // result register write port
  output logic                              rf_write,
  output logic [N-1:0]                      rf_wsel,
  output logic [EXP_W+FRAC_W:0]             rf_wdata,
  output fflags_t                           fflags
);

  localparam int unsigned NB = 2 ** N;
  localparam int unsigned W  = EXP_W + FRAC_W + 1;
  localparam int unsigned H  = NB / NLANES;
  localparam int unsigned BW = $clog2(ADD_STAGES + 1);
  localparam int unsigned OW = $clog2(H * NB + 1) + 1;

  initial begin
    assert (NLANES == 1 || NLANES == 2) else $error("NLANES must be 1 or 2");
  end

  typedef enum logic [1:0] {P_IDLE, P_MUL, P_COMB} phase_e;

  phase_e         phase;
  logic [W-1:0]   opa [NB];
  logic [W-1:0]   opb [NB];
  logic [NB-1:0]  nz_a, nz_b;
  logic [1:0]     load_cnt;
  rm_e            rm;
  op_e            op;
  logic           single;

  // ---------------------------------------------------------------- fetch
  always_comb begin
    rd_en   = load && (load_cnt < 2);
    rd_addr = (load_cnt == 0) ? addr_a + idx * stride_a : addr_b + idx * stride_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_cnt <= '0;
    end else if (!load) begin
      load_cnt <= '0;
    end else if (load_cnt != 2'd3) begin
      load_cnt <= load_cnt + 1;
    end
  end

  // Narrow (binary32) format support.
  localparam bit HAS_SINGLE = (EXP_W > 8) && (FRAC_W > 25);
  localparam int unsigned SB = 32;
  localparam logic [EXP_W+2:0] BIAS = (EXP_W+3)'((1 << (EXP_W - 1)) - 1);

  // Exact conversion of a binary32 number to the core's format.
  function automatic logic [W-1:0] widen(logic [SB-1:0] x);
    logic [7:0]        e;
    logic [22:0]       f;
    logic [EXP_W+2:0]  ew;
    e  = x[30:23];
    f  = x[22:0];
    ew = BIAS - (EXP_W+3)'(127) + (EXP_W+3)'(e);
    if (e == 8'hff)
      return {x[31], {EXP_W{1'b1}}, f, {(FRAC_W-23){1'b0}}};
    if (e == 8'h00) begin
      if (f == '0) return {x[31], {(W-1){1'b0}}};
      // Subnormal: normalise; the exponent is then 1 - 127 less the shift.
      ew = BIAS - (EXP_W+3)'(126);
      for (int i = 0; i < 23; i++) begin
        if (!f[22]) begin
          f  = f << 1;
          ew = ew - 1'b1;
        end
      end
      f  = f << 1;
      ew = ew - 1'b1;
    end
    return {x[31], ew[EXP_W-1:0], f, {(FRAC_W-23){1'b0}}};
  endfunction

  // One set of converters serves both operands, which arrive in turn.
  logic [W-1:0] rd_coef [NB];
  always_comb
    for (int k = 0; k < NB; k++)
      rd_coef[k] = (HAS_SINGLE && cfg.single) ? widen(rd_data[k*W +: SB]) : rd_data[k*W +: W];

  always_ff @(posedge clk) begin
    if (load && load_cnt == 2'd1)
      for (int k = 0; k < NB; k++) opa[k] <= rd_coef[k];
    if (load && load_cnt == 2'd2)
      for (int k = 0; k < NB; k++) opb[k] <= rd_coef[k];
  end

  always_comb begin
    for (int k = 0; k < NB; k++) begin
      nz_a[k] = (opa[k][W-2:0] != '0);
      nz_b[k] = (opb[k][W-2:0] != '0);
    end
  end

  // ---------------------------------------------------------------- lanes
  logic [N-1:0]   row      [NLANES];
  logic [N:0]     kcur     [NLANES];
  logic           ldone    [NLANES];
  logic [BW-1:0]  busy     [NLANES][NB];
  logic [OW-1:0]  outst    [NLANES];
  logic [W-1:0]   acc      [NLANES][NB];

  logic           found    [NLANES];
  logic           more     [NLANES];
  logic [N-1:0]   kn       [NLANES];
  logic           issue    [NLANES];
  logic           lstall   [NLANES];
  logic           adv_row  [NLANES];
  logic           neg      [NLANES];
  logic [N-1:0]   bl_r     [NLANES];

  logic           m_ov     [NLANES];
  logic [W-1:0]   m_y      [NLANES];
  fflags_t        m_f      [NLANES];
  logic [N-1:0]   m_tag    [NLANES][MUL_STAGES];
  logic           a_ov     [NLANES];
  logic [W-1:0]   a_y      [NLANES];
  fflags_t        a_f      [NLANES];
  logic [N-1:0]   a_tag    [NLANES][ADD_STAGES];

  function automatic logic keep_pair(op_e o, logic [N-1:0] i, logic [N-1:0] j);
    unique case (o)
      OP_OUTER: return (i & j) == '0;
      OP_INNER: return (i & ~j) == '0;
      default:  return 1'b1;
    endcase
  endfunction

  for (genvar l = 0; l < NLANES; l++) begin : g_lane
    logic [NB-1:0] vmask;

    always_comb begin
      for (int k = 0; k < NB; k++) begin
        logic [N-1:0] j;
        j = row[l] ^ N'(k);
        vmask[k] = nz_a[row[l]] && nz_b[j] && keep_pair(op, row[l], j) && ((N+1)'(k) >= kcur[l]);
      end
      found[l] = 1'b0;
      kn[l]    = '0;
      for (int k = NB - 1; k >= 0; k--) begin
        if (vmask[k]) begin
          found[l] = 1'b1;
          kn[l]    = N'(k);
        end
      end
      more[l] = 1'b0;
      for (int k = 0; k < NB; k++)
        if (vmask[k] && N'(k) != kn[l]) more[l] = 1'b1;
      issue[l]   = (phase == P_MUL) && !ldone[l] && found[l] && (busy[l][kn[l]] == '0);
      lstall[l]  = (phase == P_MUL) && !ldone[l] && found[l] && (busy[l][kn[l]] != '0);
      adv_row[l] = (phase == P_MUL) && !ldone[l] && (!found[l] || (issue[l] && !more[l]));
    end

    blade_logic #(.N(N), .NEG_METRIC(NEG_METRIC)) u_blade (
      .blade_a(row[l]), .blade_b(row[l] ^ kn[l]), .blade_r(bl_r[l]), .neg(neg[l])
    );

    fp_mul #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_mul (
      .clk, .rst_n,
      .in_valid(issue[l]),
      .a({opa[row[l]][W-1] ^ neg[l], opa[row[l]][W-2:0]}),
      .b(opb[row[l] ^ kn[l]]),
      .rm(rm),
      .out_valid(m_ov[l]), .y(m_y[l]), .flags(m_f[l])
    );

    fp_add #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_acc_add (
      .clk, .rst_n,
      .in_valid(m_ov[l]),
      .a(acc[l][m_tag[l][MUL_STAGES-1]]),
      .b(m_y[l]),
      .rm(rm),
      .out_valid(a_ov[l]), .y(a_y[l]), .flags(a_f[l])
    );

    // Result-blade tags travel alongside the two pipelines.
    always_ff @(posedge clk) begin
      m_tag[l][0] <= bl_r[l];
      for (int s = 1; s < MUL_STAGES; s++) m_tag[l][s] <= m_tag[l][s-1];
      a_tag[l][0] <= m_tag[l][MUL_STAGES-1];
      for (int s = 1; s < ADD_STAGES; s++) a_tag[l][s] <= a_tag[l][s-1];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        row[l]   <= N'(l * H);
        kcur[l]  <= '0;
        ldone[l] <= 1'b1;
        outst[l] <= '0;
        for (int k = 0; k < NB; k++) begin
          busy[l][k] <= '0;
          acc[l][k]  <= '0;
        end
      end else begin
        for (int k = 0; k < NB; k++)
          if (busy[l][k] != '0) busy[l][k] <= busy[l][k] - 1'b1;
        if (issue[l]) busy[l][kn[l]] <= BW'(ADD_STAGES);
        outst[l] <= outst[l] + OW'(issue[l]) - OW'(a_ov[l]);
        if (a_ov[l]) acc[l][a_tag[l][ADD_STAGES-1]] <= a_y[l];

        if (clear || (start && phase == P_IDLE)) begin
          row[l]   <= N'(l * H);
          kcur[l]  <= '0;
          ldone[l] <= !(start && phase == P_IDLE && cfg.op inside {OP_GP, OP_OUTER, OP_INNER});
          if (clear)
            for (int k = 0; k < NB; k++) acc[l][k] <= '0;
        end else if (adv_row[l]) begin
          kcur[l] <= '0;
          if (row[l] == N'(l * H + H - 1)) ldone[l] <= 1'b1;
          else                             row[l]   <= row[l] + 1'b1;
        end else if (issue[l]) begin
          kcur[l] <= (N+1)'(kn[l]) + 1'b1;
        end
      end
    end
  end

  // ---------------------------------------------------------------- merge / sum
  logic          lanes_done;
  logic [N:0]    cidx;       // next blade to issue to the merge adder
  logic [N:0]    ccnt;       // result coefficients written
  logic          c_issue;
  logic [W-1:0]  c_a, c_b;
  logic          c_ov;
  logic [W-1:0]  c_y;
  fflags_t       c_f;
  logic [N-1:0]  c_tag [ADD_STAGES];
  logic          sum_op;

  always_comb begin
    lanes_done = 1'b1;
    for (int l = 0; l < NLANES; l++)
      if (!ldone[l] || outst[l] != '0) lanes_done = 1'b0;
  end

  assign sum_op  = (op == OP_ADD) || (op == OP_SUB);
  assign c_issue = (phase == P_COMB) && (cidx < (N+1)'(NB)) && (sum_op || NLANES == 2);

  always_comb begin
    if (sum_op) begin
      c_a = opa[cidx[N-1:0]];
      c_b = {opb[cidx[N-1:0]][W-1] ^ (op == OP_SUB), opb[cidx[N-1:0]][W-2:0]};
    end else begin
      c_a = acc[0][cidx[N-1:0]];
      c_b = acc[NLANES-1][cidx[N-1:0]];
    end
  end

  fp_add #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_merge_add (
    .clk, .rst_n,
    .in_valid(c_issue), .a(c_a), .b(c_b), .rm(rm),
    .out_valid(c_ov), .y(c_y), .flags(c_f)
  );

  always_ff @(posedge clk) begin
    c_tag[0] <= cidx[N-1:0];
    for (int s = 1; s < ADD_STAGES; s++) c_tag[s] <= c_tag[s-1];
  end

  // Single-lane product results bypass the merge adder.
  logic direct;
  assign direct = (phase == P_COMB) && !sum_op && (NLANES == 1) && (cidx < (N+1)'(NB));

  // Result coefficient, and its rounding to binary32 in single mode.
  logic [W-1:0]  res;
  logic [W-1:0]  res_out;
  fflags_t       nar_f;
  assign res = c_ov ? c_y : acc[0][cidx[N-1:0]];

  if (HAS_SINGLE) begin : g_narrow
    logic                    r_sign;
    logic [EXP_W-1:0]        r_exp;
    logic [FRAC_W-1:0]       r_frac;
    logic signed [10:0]      n_exp;
    logic [25:0]             n_sig;
    logic                    n_sticky;
    logic [SB-1:0]           n_res;
    fflags_t                 n_f;

    assign r_sign = res[W-1];
    assign r_exp  = res[W-2:FRAC_W];
    assign r_frac = res[FRAC_W-1:0];

    // Rebias the exponent for binary32, clamped to a range that fp_round
    // still sees as overflow or total underflow.
    always_comb begin
      logic signed [EXP_W+3:0] eb;
      eb = signed'({1'b0, (EXP_W+3)'(r_exp)}) - signed'({1'b0, BIAS}) + 127;
      if (r_exp == '0)      n_exp = -11'sd300;    // binary64 subnormal: far below
      else if (eb > 300)    n_exp = 11'sd300;
      else if (eb < -300)   n_exp = -11'sd300;
      else                  n_exp = 11'(eb);
      n_sig    = {1'b1, r_frac[FRAC_W-1 -: 25]};
      n_sticky = (r_frac[FRAC_W-26:0] != '0) || (r_exp == '0);
    end

    fp_round #(.EXP_W(8), .FRAC_W(23)) u_narrow (
      .sign(r_sign), .exp_in(n_exp), .sig_in(n_sig), .sticky_in(n_sticky), .rm(rm),
      .result(n_res), .flags(n_f)
    );

    always_comb begin
      res_out = res;
      nar_f   = '0;
      if (single) begin
        if (r_exp == '1 && r_frac != '0)
          res_out = W'({1'b0, 8'hff, 1'b1, 22'd0});      // canonical quiet NaN
        else if (r_exp == '1)
          res_out = W'({r_sign, 8'hff, 23'd0});          // infinity
        else if (r_exp == '0 && r_frac == '0)
          res_out = W'({r_sign, 31'd0});
        else begin
          res_out = W'(n_res);
          nar_f   = n_f;
        end
      end
    end
  end else begin : g_no_narrow
    assign res_out = res;
    assign nar_f   = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf_write <= 1'b0;
      rf_wsel  <= '0;
      rf_wdata <= '0;
    end else begin
      rf_write <= c_ov || direct;
      rf_wsel  <= c_ov ? c_tag[ADD_STAGES-1] : cidx[N-1:0];
      rf_wdata <= res_out;
    end
  end

  // ---------------------------------------------------------------- control
  fflags_t new_flags;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= P_IDLE;
      cidx        <= '0;
      ccnt        <= '0;
      process_end <= 1'b0;
      rm          <= RM_RNE;
      op          <= OP_GP;
      single      <= 1'b0;
      fflags      <= '0;
    end else begin
      process_end <= 1'b0;
      if (rf_write) ccnt <= ccnt + 1'b1;
      if (c_issue || direct) cidx <= cidx + 1'b1;
      if (clear) fflags <= '0;
      else       fflags <= fflags | new_flags;
      unique case (phase)
        P_IDLE: if (start) begin
          rm     <= cfg.rm;
          op     <= cfg.op;
          single <= HAS_SINGLE && cfg.single;
          cidx <= '0;
          ccnt <= '0;
          phase <= (cfg.op == OP_ADD || cfg.op == OP_SUB) ? P_COMB : P_MUL;
        end
        P_MUL: if (lanes_done) phase <= P_COMB;
        P_COMB: if (rf_write && ccnt == (N+1)'(NB - 1)) begin
          phase       <= P_IDLE;
          process_end <= 1'b1;
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  always_comb begin
    new_flags = c_ov ? c_f : '0;
    if (c_ov || direct) new_flags = new_flags | nar_f;
    for (int l = 0; l < NLANES; l++) begin
      if (m_ov[l]) new_flags = new_flags | m_f[l];
      if (a_ov[l]) new_flags = new_flags | a_f[l];
    end
  end

  assign active = (phase != P_IDLE);
  always_comb begin
    stall = 1'b0;
    for (int l = 0; l < NLANES; l++) stall = stall | lstall[l];
  end

endmodule
