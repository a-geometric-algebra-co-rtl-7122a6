// tb_ctrl_fsm: test of the six-state controller. The bench plays the core
// (answers each pstart with process_end after a random delay) and the host.
// A cycle-by-cycle model of the expected state sequence is kept alongside:
// IDLE -> CLEAR -> LOAD (3 clocks) -> PROCESS -> WRITE, repeated C3 times,
// then DUMP until dump_end. Also checked: the clear, load and wstate outputs,
// one pstart per operation, idx, one dump_go per batch, start ignored while a
// host load is open or C3 is zero.
`timescale 1ns/1ps
module tb_ctrl_fsm;
  import ga_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0, load_en = 0, load_end = 0, dump_end = 0, process_end = 0;
  logic [8:0] c3 = '0;
  state_e state;
  logic clear, creset, load, pstart, wstate, dump_go, busy;
  logic [7:0] idx;
  int checks = 0, failures = 0;

  ctrl_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Core stand-in: process_end some clocks after pstart.
  int n_pstart = 0, n_dump_go = 0, n_creset = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (pstart && rst_n) begin
        repeat ($urandom_range(1, 15)) @(negedge clk);
        process_end = 1;
        @(negedge clk);
        process_end = 0;
      end
    end
  end
  always @(posedge clk) begin
    if (pstart && rst_n) n_pstart++;
    if (dump_go && rst_n) n_dump_go++;
    if (creset && rst_n) n_creset++;
  end

  task automatic run_batch(input int n);
    int p0, d0, c0;
    p0 = n_pstart; d0 = n_dump_go; c0 = n_creset;
    @(negedge clk);
    c3 = 9'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < n; i++) begin
      expect_eq(state, ST_CLEAR, "CLEAR");
      expect_eq(clear, 1, "clear output");
      expect_eq(idx, i, "operation index");
      @(negedge clk);
      for (int c = 0; c < 3; c++) begin
        expect_eq(state, ST_LOAD, "LOAD");
        expect_eq(load, 1, "load output");
        @(negedge clk);
      end
      while (state == ST_PROCESS) @(negedge clk);
      expect_eq(state, ST_WRITE, "WRITE after PROCESS");
      expect_eq(wstate, 1, "wstate output");
      @(negedge clk);
    end
    expect_eq(state, ST_DUMP, "DUMP after last WRITE");
    repeat ($urandom_range(0, 5)) @(negedge clk);
    expect_eq(state, ST_DUMP, "DUMP waits for dump_end");
    dump_end = 1;
    @(negedge clk);
    dump_end = 0;
    expect_eq(state, ST_IDLE, "IDLE after dump_end");
    expect_eq(n_pstart - p0, n, "one pstart per operation");
    expect_eq(n_dump_go - d0, 1, "one dump_go per batch");
    expect_eq(n_creset - c0, 1, "one creset per batch");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) run_batch($urandom_range(1, 6));
    // C3 = 0: start has no effect.
    @(negedge clk);
    c3 = 0; start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    expect_eq(state, ST_IDLE, "C3 = 0 ignored");
    // Open host load: start waits until load_end.
    load_en = 1;
    @(negedge clk);
    load_en = 0;
    c3 = 2; start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    expect_eq(state, ST_IDLE, "start held off during host load");
    load_end = 1;
    @(negedge clk);
    load_end = 0;
    run_batch(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
