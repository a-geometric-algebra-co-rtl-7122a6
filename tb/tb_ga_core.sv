// tb_ga_core: self-checking test of the GA core in its two-lane and one-lane
// forms side by side.
//
// A small memory model holds operand words. For each test the bench pulses
// clear, holds load for three cycles, pulses start and collects the
// coefficients the core writes until process_end. Operands are full
// multivectors, colours (bivectors only), rotors, vectors and random sparse
// mixes; every operation (geometric, outer and inner product, sum, difference)
// is run, in binary64 and in the binary32 mode (operands widened, each result
// rounded once to binary32). Results are compared bit for bit with ga_ref_pkg. The bench checks
// that a full 3-D geometric product finishes within the 84-cycle budget of the
// whole co-processor less its clear, load and write cycles, that colour
// products take fewer cycles than full ones, and that a lane stall occurred.
`timescale 1ns/1ps
module tb_ga_core;
  import ga_pkg::*;
  import ga_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic clear = 0, load = 0, start = 0;
  logic [7:0] idx = '0;
  logic [511:0] mem [4];
  logic [511:0] rd_data2, rd_data1;

  logic        rd_en2, rd_en1, pe2, pe1, act2, act1, st2, st1, w2, w1;
  logic [7:0]  ra2, ra1;
  logic [2:0]  ws2, ws1;
  logic [63:0] wd2, wd1;
  fflags_t     ff2, ff1;

  int checks = 0, failures = 0;
  int stalls = 0;
  longint cycle = 0;

  ga_core #(.NLANES(2)) dut2 (
    .clk, .rst_n, .cfg, .clear, .load, .addr_a(8'd0), .addr_b(8'd1), .stride_a(8'd2),
    .stride_b(8'd2), .idx, .rd_en(rd_en2), .rd_addr(ra2), .rd_data(rd_data2), .start,
    .process_end(pe2), .active(act2), .stall(st2), .rf_write(w2), .rf_wsel(ws2),
    .rf_wdata(wd2), .fflags(ff2));

  ga_core #(.NLANES(1)) dut1 (
    .clk, .rst_n, .cfg, .clear, .load, .addr_a(8'd0), .addr_b(8'd1), .stride_a(8'd2),
    .stride_b(8'd2), .idx, .rd_en(rd_en1), .rd_addr(ra1), .rd_data(rd_data1), .start,
    .process_end(pe1), .active(act1), .stall(st1), .rf_write(w1), .rf_wsel(ws1),
    .rf_wdata(wd1), .fflags(ff1));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rd_en2) rd_data2 <= mem[ra2[1:0]];
    if (rd_en1) rd_data1 <= mem[ra1[1:0]];
    if (st2 || st1) stalls++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] res2 [8], res1 [8];
  always @(posedge clk) begin
    if (w2) res2[ws2] <= wd2;
    if (w1) res1[ws1] <= wd1;
  end

  // Runs one operation on both cores; returns the two-lane cycle count.
  task automatic run_op(input mv_t a, input mv_t b, input op_e op, output int cyc2,
                        input bit sgl = 0);
    mv_t e2, e1;
    longint t0;
    int n2 = -1, n1 = -1;
    mem[0] = sgl ? pack_mv32(a) : pack_mv(a);
    mem[1] = sgl ? pack_mv32(b) : pack_mv(b);
    cfg = '{reserved: '0, single: sgl, rm: RM_RNE, op: op};
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    load <= 1;
    repeat (LOAD_CYCLES) @(posedge clk);
    load <= 0;
    start <= 1;
    t0 = cycle;
    @(posedge clk);
    start <= 0;
    while (n2 < 0 || n1 < 0) begin
      @(posedge clk);
      if (pe2 && n2 < 0) n2 = int'(cycle - t0);
      if (pe1 && n1 < 0) n1 = int'(cycle - t0);
    end
    @(posedge clk);
    ref_op(a, b, op, 2, e2);
    ref_op(a, b, op, 1, e1);
    for (int k = 0; k < 8; k++) begin
      logic [63:0] x2, x1;
      x2 = sgl ? {32'd0, real_to_f32(e2[k])} : $realtobits(e2[k]);
      x1 = sgl ? {32'd0, real_to_f32(e1[k])} : $realtobits(e1[k]);
      checks += 2;
      if (res2[k] !== x2) begin
        failures++;
        $display("2-lane op %s blade %0d: got %h (%g) expected %h (%g)", op.name(), k,
                 res2[k], $bitstoreal(res2[k]), x2, e2[k]);
      end
      if (res1[k] !== x1) begin
        failures++;
        $display("1-lane op %s blade %0d: got %h expected %h", op.name(), k, res1[k], x1);
      end
    end
    cyc2 = n2;
  endtask

  initial begin
    mv_t a, b;
    int c, full_max = 0, color_max = 0;
    op_e op;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // Full multivectors, geometric product: cycle budget.
    for (int t = 0; t < 20; t++) begin
      gen_mv(0, a);
      gen_mv(0, b);
      run_op(a, b, OP_GP, c);
      if (c > full_max) full_max = c;
    end
    // Colour times rotor and rotor times colour, as in rotor convolution.
    for (int t = 0; t < 20; t++) begin
      gen_mv(2, a);
      gen_mv(1, b);
      run_op(a, b, OP_GP, c);
      if (c > color_max) color_max = c;
      run_op(b, a, OP_GP, c);
      if (c > color_max) color_max = c;
    end
    // Every operation on every kind of operand.
    for (int t = 0; t < 100; t++) begin
      gen_mv($urandom_range(0, 4), a);
      gen_mv($urandom_range(0, 4), b);
      op = op_e'($urandom_range(0, 4));
      run_op(a, b, op, c);
    end
    // Single precision: binary32 operands, results rounded once to binary32.
    for (int t = 0; t < 60; t++) begin
      gen_mv($urandom_range(0, 4), a);
      gen_mv($urandom_range(0, 4), b);
      to_single(a);
      to_single(b);
      op = op_e'($urandom_range(0, 4));
      run_op(a, b, op, c, 1'b1);
    end
    $display("full GP: %0d cycles, colour GP: %0d cycles, stall cycles: %0d",
             full_max, color_max, stalls);
    checks++;
    if (full_max > 84 - LOAD_CYCLES - 2) begin
      failures++;
      $display("full geometric product too slow");
    end
    checks++;
    if (color_max >= full_max) begin
      failures++;
      $display("sparse operands not faster");
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("no stall exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
