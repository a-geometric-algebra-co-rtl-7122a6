// reg_file: result register of the GA core.
//
// Holds the 2**N coefficients of the result multivector. The core writes one
// coefficient per clock (write, wsel, wdata); `clear` zeroes all of them and
// the write counter. data_out presents the whole multivector as one memory
// word (coefficient k in bits [k*W +: W]) for the memory write sequencer, and
// `count` tells how many coefficients were written since the last clear.
// The register and its port names come from the architecture diagram; the
// counter semantics and the word layout are this design's own.
module reg_file #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  write,
  input  logic [N-1:0]          wsel,
  input  logic [W-1:0]          wdata,
  output logic [(2**N)*W-1:0]   data_out,
  output logic [N:0]            count
);

  localparam int unsigned NB = 2 ** N;

  logic [W-1:0] r [NB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NB; k++) r[k] <= '0;
      count <= '0;
    end else if (clear) begin
      for (int k = 0; k < NB; k++) r[k] <= '0;
      count <= '0;
    end else if (write) begin
      r[wsel] <= wdata;
      count   <= count + 1'b1;
    end
  end

  always_comb
    for (int k = 0; k < NB; k++) data_out[k*W +: W] = r[k];

endmodule
