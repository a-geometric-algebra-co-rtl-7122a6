// tb_gacp_top: end-to-end test of the co-processor at its default size.
//
// Acts as the host: loads multivectors coefficient by coefficient, programs
// the control word and the batch registers, pulses start, collects the dumped
// results and acknowledges with dump_end. Results are compared bit for bit
// with ga_ref_pkg (two-lane accumulation order). Covered and counted: every
// operation; batches of several operations; an operand reused with stride 0;
// sparse (colour/rotor) operands finishing faster than full multivectors;
// lane stalls; a start held off by an unfinished host load; a directed
// rounding mode; the overflow flag; the binary32 mode (random batches,
// directed rounding, a subnormal operand, overflow); the cycle budget of 84
// clocks per full 3-D geometric product. A mechanism that never occurs counts as a failure.
`timescale 1ns/1ps
module tb_gacp_top;
  import ga_pkg::*;
  import ga_ref_pkg::*;

  localparam int AW = 8;

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
  int n_stall = 0, n_sparse_faster = 0, n_reuse = 0, n_multi = 0, n_interlock = 0;
  int n_directed = 0, n_overflow = 0, n_single = 0;
  int n_op [5] = '{default: 0};

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (stall) n_stall++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] dumped [256][8];
  int n_dumped;
  always @(posedge clk) begin
    if (dump_valid) begin
      dumped[dump_address[AW+2:3]][dump_address[2:0]] <= dump_data;
      n_dumped <= n_dumped + 1;
    end
  end

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
  endtask

  task automatic host_load32(input int addr, input logic [31:0] m [8]);
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      load_en      = 1;
      load_address = {AW'(addr), 3'(k)};
      load_data    = {32'd0, m[k]};
    end
    @(negedge clk);
    load_en = 0;
  endtask

  task automatic host_load_end();
    @(negedge clk);
    load_end = 1;
    @(negedge clk);
    load_end = 0;
  endtask

  // Runs one batch; returns the clocks from start to the dump.
  task automatic run_batch(input op_e op, input rm_e rm, input int pa1, input int pa2,
                           input int pa3, input int pc1, input int pc2, input int pc3,
                           output int clocks, input bit sgl = 0);
    longint t0;
    @(negedge clk);
    cfg_bits = 16'({sgl, rm, op});
    a1 = AW'(pa1); a2 = AW'(pa2); a3 = AW'(pa3);
    c1 = AW'(pc1); c2 = AW'(pc2); c3 = (AW+1)'(pc3);
    n_dumped = 0;
    @(negedge clk);
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
    check(state == ST_IDLE, "back to IDLE after dump_end");
    check(n_dumped == 8 * pc3, "all coefficients dumped");
    check(result_count == (AW+1)'(pc3), "result count");
    check(!error, "no error flag");
    n_op[op]++;
    if (pc3 > 1) n_multi++;
    if (pc1 == 0 || pc2 == 0) n_reuse++;
  endtask

  mv_t mva [64];
  mv_t mvb [64];

  task automatic check_results(input op_e op, input int pa3, input int pc1, input int pc2,
                               input int pc3, input bit sgl = 0);
    mv_t e;
    logic [63:0] x;
    for (int i = 0; i < pc3; i++) begin
      ref_op(mva[i * pc1], mvb[i * pc2], op, 2, e);
      for (int k = 0; k < 8; k++) begin
        x = sgl ? {32'd0, real_to_f32(e[k])} : $realtobits(e[k]);
        checks++;
        if (dumped[pa3 + i][k] !== x) begin
          failures++;
          $display("op %s result %0d blade %0d: got %h expected %h", op.name(), i, k,
                   dumped[pa3 + i][k], x);
        end
      end
    end
  endtask

  // Loads count operand pairs of the given kinds: A at 0.., B at 64..
  task automatic load_operands(input int count, input int kind_a, input int kind_b,
                               input bit sgl = 0);
    logic [31:0] fa [8], fb [8];
    for (int i = 0; i < count; i++) begin
      gen_mv(kind_a, mva[i]);
      gen_mv(kind_b, mvb[i]);
      if (sgl) begin
        to_single(mva[i]);
        to_single(mvb[i]);
        for (int k = 0; k < 8; k++) begin
          fa[k] = real_to_f32(mva[i][k]);
          fb[k] = real_to_f32(mvb[i][k]);
        end
        host_load32(i, fa);
        host_load32(64 + i, fb);
      end else begin
        host_load(i, mva[i]);
        host_load(64 + i, mvb[i]);
      end
    end
    host_load_end();
  endtask

  initial begin
    int clk_full, clk_sparse, nclk;
    mv_t m;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // 1. Batch of 8 full geometric products.
    load_operands(8, 0, 0);
    run_batch(OP_GP, RM_RNE, 0, 64, 128, 1, 1, 8, clk_full);
    check_results(OP_GP, 128, 1, 1, 8);
    $display("8 full geometric products: %0d clocks (%0d per product)", clk_full, clk_full / 8);
    check(clk_full <= 8 * 84, "84-clock budget per full 3-D geometric product");

    // 2. Rotor times 8 colours, rotor reused with stride 0.
    load_operands(8, 2, 1);
    run_batch(OP_GP, RM_RNE, 0, 64, 128, 0, 1, 8, clk_sparse);
    check_results(OP_GP, 128, 0, 1, 8);
    $display("8 rotor-colour products: %0d clocks", clk_sparse);
    if (clk_sparse < clk_full) n_sparse_faster++;

    // 3. Every operation on random operands.
    for (int t = 0; t < 10; t++) begin
      op_e op;
      op = op_e'(t % 5);
      load_operands(4, $urandom_range(0, 4), $urandom_range(0, 4));
      run_batch(op, RM_RNE, 0, 64, 200, 1, 1, 4, nclk);
      check_results(op, 200, 1, 1, 4);
    end

    // 4. Start while a host load is unfinished is held off.
    for (int k = 0; k < 8; k++) m[k] = 0.0;
    m[0] = 1.0;
    mva[0] = m;
    host_load(0, m);
    m[0] = $bitstoreal(64'h3c30000000000000);   // 2**-60
    mvb[0] = m;
    host_load(64, m);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (3) @(negedge clk);
    check(state == ST_IDLE, "start ignored during host load");
    if (state == ST_IDLE) n_interlock++;
    host_load_end();

    // 5. Directed rounding: 1 + 2**-60 rounded up and down.
    run_batch(OP_ADD, RM_RUP, 0, 64, 10, 1, 1, 1, nclk);
    check(dumped[10][0] == 64'h3ff0000000000001, "round toward +inf");
    check(fflags.inexact, "inexact flag");
    run_batch(OP_ADD, RM_RDN, 0, 64, 10, 1, 1, 1, nclk);
    check(dumped[10][0] == 64'h3ff0000000000000, "round toward -inf");
    n_directed++;

    // 6. Overflow: 1e300 * 1e300.
    m[0] = 1.0e300;
    host_load(0, m);
    host_load(64, m);
    host_load_end();
    run_batch(OP_GP, RM_RNE, 0, 64, 10, 1, 1, 1, nclk);
    check(dumped[10][0] == 64'h7ff0000000000000, "overflow to infinity");
    check(fflags.overflow, "overflow flag");
    if (fflags.overflow) n_overflow++;

    // 7. Single-precision mode: random batches, then chosen cases.
    for (int t = 0; t < 5; t++) begin
      op_e op;
      op = op_e'(t);
      load_operands(4, $urandom_range(0, 4), $urandom_range(0, 4), 1'b1);
      run_batch(op, RM_RNE, 0, 64, 200, 1, 1, 4, nclk, 1'b1);
      check_results(op, 200, 1, 1, 4, 1'b1);
      n_single++;
    end
    begin
      logic [31:0] fa [8], fb [8];
      for (int k = 0; k < 8; k++) begin
        fa[k] = '0;
        fb[k] = '0;
      end
      // 1 + 2**-30 rounded up and down to binary32.
      fa[0] = 32'h3f800000;
      fb[0] = 32'h30800000;
      host_load32(0, fa);
      host_load32(64, fb);
      // Smallest subnormal times 2**100 = 2**-49; 2**100 squared overflows.
      fa[0] = 32'h00000001;
      fb[0] = 32'h71800000;
      host_load32(1, fa);
      host_load32(65, fb);
      fa[0] = 32'h71800000;
      host_load32(2, fa);
      host_load32(66, fb);
      host_load_end();
    end
    run_batch(OP_ADD, RM_RUP, 0, 64, 10, 1, 1, 1, nclk, 1'b1);
    check(dumped[10][0] == 64'h000000003f800001, "binary32 round toward +inf");
    check(fflags.inexact, "binary32 inexact flag");
    run_batch(OP_ADD, RM_RDN, 0, 64, 10, 1, 1, 1, nclk, 1'b1);
    check(dumped[10][0] == 64'h000000003f800000, "binary32 round toward -inf");
    run_batch(OP_GP, RM_RNE, 1, 65, 10, 1, 1, 1, nclk, 1'b1);
    check(dumped[10][0] == 64'h0000000027000000, "binary32 subnormal operand");
    run_batch(OP_GP, RM_RNE, 2, 66, 10, 1, 1, 1, nclk, 1'b1);
    check(dumped[10][0] == 64'h000000007f800000, "binary32 overflow to infinity");
    check(fflags.overflow, "binary32 overflow flag");
    if (fflags.overflow) n_single++;

    $display("stall cycles %0d, sparse faster %0d, reuse %0d, multi %0d, interlock %0d",
             n_stall, n_sparse_faster, n_reuse, n_multi, n_interlock);
    check(n_stall > 0, "lane stall exercised");
    check(n_sparse_faster > 0, "zero-coefficient skipping exercised");
    check(n_reuse > 0, "stride-0 operand reuse exercised");
    check(n_multi > 0, "multi-operation batch exercised");
    check(n_interlock > 0, "host-load interlock exercised");
    check(n_directed > 0, "directed rounding exercised");
    check(n_overflow > 0, "overflow exercised");
    check(n_single > 0, "single-precision mode exercised");
    for (int o = 0; o < 5; o++) check(n_op[o] > 0, "every operation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
