// mem_write_seq: memory write sequencer.
//
// Stores each finished result multivector. While the controller is in its
// WRITE state (wstate) the sequencer writes the result register's word to
// memory address base + count, then advances count. creset restarts count at
// zero at the beginning of a batch; count is brought out as the number of
// results stored (Result_Count). If the result register holds fewer than
// 2**N written coefficients the word is still written and `incomplete` is
// raised. The write happens in the WRITE cycle itself. The unit and its
// signals (WState, base A3, Count, Clear, data from the register file) follow
// the architecture diagram; the addressing rule is this design's own.
module mem_write_seq #(
  parameter int unsigned N  = 3,
  parameter int unsigned W  = 64,
  parameter int unsigned AW = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  creset,
  input  logic                  wstate,
  input  logic [AW-1:0]         base,
  input  logic [(2**N)*W-1:0]   rf_data,
  input  logic [N:0]            rf_count,
  output logic                  wen,
  output logic [AW-1:0]         waddr,
  output logic [(2**N)*W-1:0]   wdata,
  output logic [AW:0]           count,
  output logic                  incomplete
);

  assign wen   = wstate;
  assign waddr = base + count[AW-1:0];
  assign wdata = rf_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count      <= '0;
      incomplete <= 1'b0;
    end else if (creset) begin
      count      <= '0;
      incomplete <= 1'b0;
    end else if (wstate) begin
      count <= count + 1'b1;
      if (rf_count != (N+1)'(2 ** N)) incomplete <= 1'b1;
    end
  end

endmodule
