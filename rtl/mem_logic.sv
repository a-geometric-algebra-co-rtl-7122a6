// mem_logic: the memory controller ("LOGIC") between the memory and its users.
//
// The memory has one read and one write port; four units need them. The
// controller grants the read port to the GA core during LOAD and to the dump
// side of the conversion logic during DUMP, and the write port to the memory
// write sequencer whenever it writes (WRITE) and otherwise to the host-load
// side of the conversion logic, which is accepted only in IDLE. A request
// outside its state is dropped and flagged on `conflict`. Combinational.
// The block and its place between memory, conversion logic, core and write
// sequencer follow the architecture diagram; the grant rules are this
// design's own.
module mem_logic
  import ga_pkg::*;
#(
  parameter int unsigned N  = 3,
  parameter int unsigned W  = 64,
  parameter int unsigned AW = 8
) (
  input  state_e                state,
  // GA core operand fetch
  input  logic                  core_rd_en,
  input  logic [AW-1:0]         core_rd_addr,
  // conversion logic
  input  logic                  dump_rd_en,
  input  logic [AW-1:0]         dump_rd_addr,
  input  logic                  host_wr_en,
  input  logic [AW-1:0]         host_wr_addr,
  input  logic [(2**N)*W-1:0]   host_wr_data,
  input  logic [(2**N)-1:0]     host_wr_mask,
  // memory write sequencer
  input  logic                  seq_wr_en,
  input  logic [AW-1:0]         seq_wr_addr,
  input  logic [(2**N)*W-1:0]   seq_wr_data,
  // memory
  output logic                  rd_en,
  output logic [AW-1:0]         rd_addr,
  output logic                  wr_en,
  output logic [AW-1:0]         wr_addr,
  output logic [(2**N)*W-1:0]   wr_data,
  output logic [(2**N)-1:0]     wr_mask,
  output logic                  conflict
);

  always_comb begin
    rd_en    = 1'b0;
    rd_addr  = core_rd_addr;
    conflict = 1'b0;
    if (state == ST_LOAD) begin
      rd_en    = core_rd_en;
      conflict = dump_rd_en;
    end else if (state == ST_DUMP) begin
      rd_en    = dump_rd_en;
      rd_addr  = dump_rd_addr;
      conflict = core_rd_en;
    end else begin
      conflict = core_rd_en | dump_rd_en;
    end

    if (seq_wr_en) begin
      wr_en    = 1'b1;
      wr_addr  = seq_wr_addr;
      wr_data  = seq_wr_data;
      wr_mask  = '1;
      conflict = conflict | host_wr_en;
    end else begin
      wr_en    = host_wr_en && (state == ST_IDLE);
      wr_addr  = host_wr_addr;
      wr_data  = host_wr_data;
      wr_mask  = host_wr_mask;
      conflict = conflict | (host_wr_en && state != ST_IDLE);
    end
  end

endmodule
