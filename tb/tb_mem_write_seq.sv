// tb_mem_write_seq: test of the memory write sequencer: addresses base + n
// for the n-th stored result, the data is the result register word, the count
// restarts on creset, and an incomplete result register is flagged.
`timescale 1ns/1ps
module tb_mem_write_seq;
  logic clk = 0, rst_n = 0, creset = 0, wstate = 0;
  logic [7:0] base = '0;
  logic [511:0] rf_data = '0;
  logic [3:0] rf_count = 4'd8;
  logic wen, incomplete;
  logic [7:0] waddr;
  logic [511:0] wdata;
  logic [8:0] count;
  int checks = 0, failures = 0;

  mem_write_seq dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [511:0] got, input logic [511:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got[15:0], exp[15:0]);
    end
  endtask

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int batch = 0; batch < 10; batch++) begin
      @(negedge clk);
      creset = 1;
      base = 8'($urandom);
      @(negedge clk);
      creset = 0;
      expect_eq(count, 0, "count after creset");
      n = $urandom_range(1, 20);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        wstate = 0;
        expect_eq(wen, 0, "idle write enable");
        @(negedge clk);
        wstate  = 1;
        rf_data = {16{$urandom}};
        rf_count = (batch == 7 && i == 2) ? 4'd5 : 4'd8;
        #1;
        expect_eq(wen, 1, "write enable");
        expect_eq(waddr, 8'(base + i), "write address");
        expect_eq(wdata, rf_data, "write data");
      end
      @(negedge clk);
      wstate = 0;
      expect_eq(count, 9'(n), "result count");
      expect_eq(incomplete, (batch == 7 && n > 2), "incomplete flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
