// tb_reg_file: test of the result register: per-coefficient writes, the word
// view, the write counter and clear.
`timescale 1ns/1ps
module tb_reg_file;
  logic clk = 0, rst_n = 0, clear = 0, write = 0;
  logic [2:0] wsel = '0;
  logic [63:0] wdata = '0;
  logic [511:0] data_out;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [63:0] model [8];

  reg_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input int exp_count);
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (data_out[k*64 +: 64] !== model[k]) begin
        failures++;
        $display("coefficient %0d: got %h expected %h", k, data_out[k*64 +: 64], model[k]);
      end
    end
    checks++;
    if (count !== 4'(exp_count)) begin
      failures++;
      $display("count %0d expected %0d", count, exp_count);
    end
  endtask

  initial begin
    int n;
    for (int k = 0; k < 8; k++) model[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      n = 0;
      for (int t = 0; t < 8; t++) begin
        @(negedge clk);
        write = 1;
        wsel  = 3'($urandom_range(0, 7));
        wdata = {$urandom, $urandom};
        model[wsel] = wdata;
        n++;
      end
      @(negedge clk);
      write = 0;
      check_all(n);
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int k = 0; k < 8; k++) model[k] = '0;
      check_all(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
