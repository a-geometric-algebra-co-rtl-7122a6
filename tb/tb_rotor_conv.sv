// tb_rotor_conv: colour-difference edge detection by rotor convolution, run
// end to end on the co-processor at its default parameters.
//
// Each pixel colour is the vector r e1 + g e2 + b e3. The horizontal rotor
// masks reduce, per output pixel (m, n), to
//   out = R (c[m-1][n-1] + c[m-1][n] + c[m-1][n+1]) ~R
//       + ~R (c[m+1][n-1] + c[m+1][n] + c[m+1][n+1]) R
// with R = s (cos(pi/4) + mu sin(pi/4)), mu = (e23 + e31 + e12)/sqrt(3),
// s = 1/sqrt(6): four geometric products and five additions per pixel. The
// bench plays the host. It loads a 6x6 image (upper half one colour, lower
// half another) and R, ~R, then runs the whole filter as batches using
// address strides: row sums of three neighbours (additions), R T and ~R T
// with the rotor held at stride 0, (R T) ~R and (~R T) R, and the final sum.
// Every coefficient of every intermediate batch is compared bit for bit with
// the reference model, run in the same order. The image is then judged as an
// edge detector: where the rows above and below agree the result must lie on
// the grey axis (r = g = b, all other grades zero), and where they differ it
// must lie off it. The clocks per geometric product in the rotor batches are
// reported and checked against the 84-cycle budget of a full 3-D product.
`timescale 1ns/1ps
module tb_rotor_conv;
  import ga_pkg::*;
  import ga_ref_pkg::*;

  localparam int AW = 8;
  localparam int S  = 6;             // image is S x S
  localparam int NI = S - 2;         // interior columns / rows

  // Memory map (word addresses).
  localparam int W_R    = 0;         // rotor R
  localparam int W_RREV = 1;         // its reverse ~R
  localparam int W_IMG  = 8;         // S*S pixels, row-major
  localparam int W_PAIR = 48;        // S*NI sums of two neighbours
  localparam int W_T    = 72;        // S*NI sums of three neighbours
  localparam int W_RT   = 96;        // R T
  localparam int W_Q1   = 120;       // (R T) ~R
  localparam int W_LT   = 144;       // ~R T
  localparam int W_Q2   = 168;       // (~R T) R
  localparam int W_OUT  = 192;       // NI*NI output pixels

  logic clk = 0, rst_n = 0;
  logic [63:0] load_data = '0;
  logic [AW+2:0] load_address = '0;
  logic load_en = 0, load_end = 0, dump_end = 0, start = 0;
  logic [63:0] dump_data;
  logic [AW+2:0] dump_address;
  logic dump_valid, dump_last, dump_done;
  logic [15:0] cfg_bits = '0;
  logic [AW-1:0] a1 = '0, a2 = '0, a3 = '0, c1 = '0, c2 = '0;
  logic [AW:0] c3 = '0;
  logic [AW:0] result_count;
  state_e state;
  logic busy, core_active, stall, error;
  fflags_t fflags;

  gacp_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] dumped [256][8];
  always @(posedge clk)
    if (dump_valid) dumped[dump_address[AW+2:3]][dump_address[2:0]] <= dump_data;

  // The host's copy of memory, kept with the reference results.
  mv_t ref_mem [256];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic host_load(input int addr, input mv_t m);
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      load_en      = 1;
      load_address = {AW'(addr), 3'(k)};
      load_data    = $realtobits(m[k]);
    end
    @(negedge clk);
    load_en = 0;
    ref_mem[addr] = m;
  endtask

  // One batch: result i = A[pa1 + i*pc1] op B[pa2 + i*pc2] -> word pa3 + i.
  // Checks the dumped results against the reference; returns the clocks from
  // start to the dump.
  task automatic batch(input op_e op, input int pa1, input int pc1, input int pa2,
                       input int pc2, input int pa3, input int n, output int clocks);
    longint t0;
    mv_t e;
    @(negedge clk);
    cfg_bits = 16'({RM_RNE, op});
    a1 = AW'(pa1); a2 = AW'(pa2); a3 = AW'(pa3);
    c1 = AW'(pc1); c2 = AW'(pc2); c3 = (AW+1)'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = cycle;
    while (state != ST_DUMP) @(posedge clk);
    clocks = int'(cycle - t0);
    while (!dump_done) @(posedge clk);
    @(negedge clk);
    dump_end = 1;
    @(negedge clk);
    dump_end = 0;
    @(negedge clk);
    check(state == ST_IDLE && !error, "batch completes without error");
    for (int i = 0; i < n; i++) begin
      ref_op(ref_mem[pa1 + i * pc1], ref_mem[pa2 + i * pc2], op, 2, e);
      ref_mem[pa3 + i] = e;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (dumped[pa3 + i][k] !== $realtobits(e[k])) begin
          failures++;
          $display("%s result %0d blade %0d: got %h expected %h", op.name(), i, k,
                   dumped[pa3 + i][k], $realtobits(e[k]));
        end
      end
    end
  endtask

  function automatic mv_t colour(real r, real g, real b);
    mv_t m;
    for (int k = 0; k < 8; k++) m[k] = 0.0;
    m[1] = r; m[2] = g; m[4] = b;
    return m;
  endfunction

  initial begin
    mv_t rot, rrev, m;
    real s, c45, s45, mu;
    int clk_gp, gp_clocks = 0, gp_count = 0, nclk;
    int n_grey = 0, n_edge = 0;

    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // R = s (cos 45 + mu sin 45); e31 = -e13.
    s   = 1.0 / $sqrt(6.0);
    c45 = $cos(3.14159265358979323846 / 4.0);
    s45 = $sin(3.14159265358979323846 / 4.0);
    mu  = s45 / $sqrt(3.0);
    for (int k = 0; k < 8; k++) rot[k] = 0.0;
    rot[0] = s * c45;
    rot[3] = s * mu;       // e12
    rot[5] = -s * mu;      // e13 (from +e31)
    rot[6] = s * mu;       // e23
    rrev = rot;
    rrev[3] = -rot[3]; rrev[5] = -rot[5]; rrev[6] = -rot[6];
    host_load(W_R, rot);
    host_load(W_RREV, rrev);

    // Image: upper half one colour, lower half another.
    for (int r = 0; r < S; r++)
      for (int c = 0; c < S; c++)
        host_load(W_IMG + r * S + c,
                  (r < S / 2) ? colour(200.0 / 255.0, 30.0 / 255.0, 40.0 / 255.0)
                              : colour(20.0 / 255.0, 180.0 / 255.0, 60.0 / 255.0));
    @(negedge clk);
    load_end = 1;
    @(negedge clk);
    load_end = 0;

    // Sums of three horizontal neighbours, T[r][n] for n = 1..NI, every row.
    for (int r = 0; r < S; r++) begin
      batch(OP_ADD, W_IMG + r * S, 1, W_IMG + r * S + 1, 1, W_PAIR + r * NI, NI, nclk);
      batch(OP_ADD, W_PAIR + r * NI, 1, W_IMG + r * S + 2, 1, W_T + r * NI, NI, nclk);
    end
    // Rotor products; the rotor stays put (stride 0).
    batch(OP_GP, W_R, 0, W_T, 1, W_RT, S * NI, clk_gp);
    gp_clocks += clk_gp; gp_count += S * NI;
    batch(OP_GP, W_RT, 1, W_RREV, 0, W_Q1, S * NI, clk_gp);
    gp_clocks += clk_gp; gp_count += S * NI;
    batch(OP_GP, W_RREV, 0, W_T, 1, W_LT, S * NI, clk_gp);
    gp_clocks += clk_gp; gp_count += S * NI;
    batch(OP_GP, W_LT, 1, W_R, 0, W_Q2, S * NI, clk_gp);
    gp_clocks += clk_gp; gp_count += S * NI;
    // out(m, n) = Q1[m-1][n] + Q2[m+1][n], m = 1..NI: rows 0..NI-1 of Q1 and
    // rows 2..NI+1 of Q2 are contiguous.
    batch(OP_ADD, W_Q1, 1, W_Q2 + 2 * NI, 1, W_OUT, NI * NI, nclk);

    $display("rotor products: %0d clocks for %0d products (%0d per product)", gp_clocks,
             gp_count, gp_clocks / gp_count);
    check(gp_clocks <= 84 * gp_count, "rotor products within the 84-cycle budget");

    // Judge the output as an edge map.
    for (int r = 1; r <= NI; r++) begin
      for (int c = 1; c <= NI; c++) begin
        real dev, other;
        bit uniform;
        m = ref_mem[W_OUT + (r - 1) * NI + (c - 1)];
        dev = $sqrt((m[1] - m[2]) ** 2 + (m[2] - m[4]) ** 2);
        other = 0.0;
        for (int k = 0; k < 8; k++)
          if (k != 1 && k != 2 && k != 4) other += (m[k] < 0.0) ? -m[k] : m[k];
        uniform = ((r - 1) < S / 2) == ((r + 1) < S / 2);
        check(other < 1.0e-12, "result is a pure colour vector");
        if (uniform) begin
          check(dev < 1.0e-12, "uniform region maps onto the grey axis");
          n_grey++;
        end else begin
          check(dev > 0.1, "edge maps off the grey axis");
          n_edge++;
        end
        $display("pixel (%0d,%0d): r %f g %f b %f %s", r, c, m[1], m[2], m[4],
                 uniform ? "grey" : "edge");
      end
    end
    check(n_grey > 0 && n_edge > 0, "both uniform and edge pixels present");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
