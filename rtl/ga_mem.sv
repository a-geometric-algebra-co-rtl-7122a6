// ga_mem: multivector memory of the co-processor.
//
// DEPTH words, each one multivector of 2**N coefficients of W bits. One
// synchronous read port (data one clock after rd_en) and one write port with
// a per-coefficient write mask, so the host can load a single coefficient and
// the write sequencer a whole result in one clock. A read and a write of the
// same word in the same clock return the old contents. The memory is named in
// the architecture but not sized; DEPTH = 256 and the port set are this
// design's own.
module ga_mem #(
  parameter int unsigned N     = 3,
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rd_en,
  input  logic [AW-1:0]         rd_addr,
  output logic [(2**N)*W-1:0]   rd_data,
  input  logic                  wr_en,
  input  logic [AW-1:0]         wr_addr,
  input  logic [(2**N)*W-1:0]   wr_data,
  input  logic [(2**N)-1:0]     wr_mask
);

  localparam int unsigned NB = 2 ** N;

  logic [NB*W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en)
      for (int k = 0; k < NB; k++)
        if (wr_mask[k]) mem[wr_addr][k*W +: W] <= wr_data[k*W +: W];
  end

endmodule
