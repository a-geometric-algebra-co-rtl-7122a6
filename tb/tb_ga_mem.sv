// tb_ga_mem: test of the multivector memory: masked coefficient writes, whole
// word writes, one-cycle read latency and read-before-write on a collision,
// against a model array over all 256 words.
`timescale 1ns/1ps
module tb_ga_mem;
  logic clk = 0, rd_en = 0, wr_en = 0;
  logic [7:0] rd_addr = '0, wr_addr = '0;
  logic [511:0] rd_data, wr_data = '0;
  logic [7:0] wr_mask = '0;
  int checks = 0, failures = 0;
  logic [511:0] model [256];

  ga_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [511:0] rnd_word();
    logic [511:0] w;
    for (int i = 0; i < 16; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    logic [511:0] expected;
    // Fill every word.
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 8'(a); wr_data = rnd_word(); wr_mask = '1;
      model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    // Random traffic: masked writes and reads, sometimes to the same word.
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      rd_en   = 1;
      rd_addr = 8'($urandom_range(0, 255));
      wr_en   = ($urandom_range(0, 1) == 1);
      wr_addr = (t % 5 == 0) ? rd_addr : 8'($urandom_range(0, 255));
      wr_data = rnd_word();
      wr_mask = 8'($urandom);
      expected = model[rd_addr];
      if (wr_en)
        for (int k = 0; k < 8; k++)
          if (wr_mask[k]) model[wr_addr][k*64 +: 64] = wr_data[k*64 +: 64];
      @(posedge clk);
      #1;
      checks++;
      if (rd_data !== expected) begin
        failures++;
        $display("read %0d mismatch", rd_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
