// tb_conv_logic: test of the conversion logic.
// Load side: each host coefficient write must become, one clock later, a
// memory write of that coefficient in its lane with a one-hot mask. Dump side:
// with a model memory behind it, a dump of n words must deliver 8n
// coefficients in address order, blade 0 first, mark the last one, pulse
// dump_done, and take 10 clocks per word.
`timescale 1ns/1ps
module tb_conv_logic;
  logic clk = 0, rst_n = 0;
  logic load_en = 0;
  logic [10:0] load_addr = '0;
  logic [63:0] load_data = '0;
  logic wr_en;
  logic [7:0] wr_addr;
  logic [511:0] wr_data;
  logic [7:0] wr_mask;
  logic dump_go = 0;
  logic [7:0] dump_base = '0;
  logic [8:0] dump_words = '0;
  logic rd_en;
  logic [7:0] rd_addr;
  logic [511:0] rd_data;
  logic dump_valid, dump_last, dump_done;
  logic [63:0] dump_data;
  logic [10:0] dump_addr;
  int checks = 0, failures = 0;
  logic [511:0] mem [256];

  conv_logic dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [511:0] got, input logic [511:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got[63:0], exp[63:0]);
    end
  endtask

  initial begin
    int nexp, cyc;
    bit last_seen;
    for (int a = 0; a < 256; a++)
      for (int i = 0; i < 16; i++) mem[a][i*32 +: 32] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Load side.
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      load_en   = ($urandom_range(0, 3) != 0);
      load_addr = 11'($urandom);
      load_data = {$urandom, $urandom};
      @(negedge clk);
      expect_eq(wr_en, load_en, "write enable");
      if (load_en) begin
        expect_eq(wr_addr, load_addr[10:3], "write address");
        expect_eq(wr_mask, 8'(1) << load_addr[2:0], "write mask");
        expect_eq(wr_data[load_addr[2:0]*64 +: 64], load_data, "write data lane");
      end
      load_en = 0;
    end
    // Dump side.
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      dump_go    = 1;
      dump_base  = 8'($urandom);
      dump_words = 9'($urandom_range(1, 12));
      @(negedge clk);
      dump_go = 0;
      nexp = 0;
      cyc = 0;
      last_seen = 0;
      while (!dump_done && cyc < 1000) begin
        @(posedge clk);
        #1;
        cyc++;
        if (dump_valid) begin
          expect_eq(dump_addr, {8'(dump_base + nexp / 8), 3'(nexp % 8)}, "dump address");
          expect_eq(dump_data, mem[8'(dump_base + nexp / 8)][(nexp % 8)*64 +: 64], "dump data");
          expect_eq(dump_last, (nexp == 8 * dump_words - 1), "dump_last");
          nexp++;
        end
      end
      expect_eq(nexp, 8 * dump_words, "coefficients dumped");
      expect_eq(cyc, 10 * dump_words + 1, "dump clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
