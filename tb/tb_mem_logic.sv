// tb_mem_logic: test of the memory port controller. For random requests in
// every controller state it checks which requester gets the read and the write
// port, what reaches the memory, and when a conflict is flagged, against rules
// written out independently below.
`timescale 1ns/1ps
module tb_mem_logic;
  import ga_pkg::*;

  state_e state;
  logic core_rd_en, dump_rd_en, host_wr_en, seq_wr_en;
  logic [7:0] core_rd_addr, dump_rd_addr, host_wr_addr, seq_wr_addr;
  logic [511:0] host_wr_data, seq_wr_data;
  logic [7:0] host_wr_mask;
  logic rd_en, wr_en, conflict;
  logic [7:0] rd_addr, wr_addr;
  logic [511:0] wr_data;
  logic [7:0] wr_mask;
  int checks = 0, failures = 0;

  mem_logic dut (.*);

  task automatic expect_eq(input logic [511:0] got, input logic [511:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s (state %s): got %h expected %h", what, state.name(), got[31:0], exp[31:0]);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_conf;
    for (int t = 0; t < 3000; t++) begin
      state        = state_e'($urandom_range(0, 5));
      core_rd_en   = $urandom_range(0, 1);
      dump_rd_en   = $urandom_range(0, 1);
      host_wr_en   = $urandom_range(0, 1);
      seq_wr_en    = $urandom_range(0, 1);
      core_rd_addr = 8'($urandom); dump_rd_addr = 8'($urandom);
      host_wr_addr = 8'($urandom); seq_wr_addr = 8'($urandom);
      host_wr_data = {16{$urandom}}; seq_wr_data = {16{$urandom}};
      host_wr_mask = 8'($urandom);
      #1;
      // Read port.
      if (state == ST_LOAD) begin
        expect_eq(rd_en, core_rd_en, "read enable (core)");
        if (core_rd_en) expect_eq(rd_addr, core_rd_addr, "read address (core)");
      end else if (state == ST_DUMP) begin
        expect_eq(rd_en, dump_rd_en, "read enable (dump)");
        if (dump_rd_en) expect_eq(rd_addr, dump_rd_addr, "read address (dump)");
      end else begin
        expect_eq(rd_en, 0, "no read");
      end
      // Write port.
      if (seq_wr_en) begin
        expect_eq(wr_en, 1, "write enable (sequencer)");
        expect_eq(wr_addr, seq_wr_addr, "write address (sequencer)");
        expect_eq(wr_data, seq_wr_data, "write data (sequencer)");
        expect_eq(wr_mask, 8'hff, "write mask (sequencer)");
      end else if (host_wr_en && state == ST_IDLE) begin
        expect_eq(wr_en, 1, "write enable (host)");
        expect_eq(wr_addr, host_wr_addr, "write address (host)");
        expect_eq(wr_data, host_wr_data, "write data (host)");
        expect_eq(wr_mask, host_wr_mask, "write mask (host)");
      end else begin
        expect_eq(wr_en, 0, "no write");
      end
      exp_conf = (host_wr_en && (seq_wr_en || state != ST_IDLE))
              || (core_rd_en && state != ST_LOAD)
              || (dump_rd_en && state != ST_DUMP);
      expect_eq(conflict, exp_conf, "conflict");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
