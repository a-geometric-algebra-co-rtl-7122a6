// gacp_top: geometric-algebra co-processor for colour edge detection.
//
// A host (a general-purpose processor) loads multivectors into the on-chip
// memory one coefficient at a time, sets the control word and the batch
// registers, and pulses start. The co-processor then performs C3 operations,
// operation i taking A from word A1 + i*C1 and B from word A2 + i*C2 and
// storing the result at word A3 + i; finally it streams the C3 results back,
// one coefficient per clock, and waits for the host's DUMP_END. A stride of 0
// reuses one operand for the whole batch (a fixed rotor or mask).
//
// Blocks: conv_logic (host interface), mem_logic (memory port controller),
// ga_mem (memory), ga_core (blade logic, NLANES multipliers, NLANES + 1 adders;
// two multipliers and three adders by default), reg_file (result register),
// mem_write_seq (result write-back, Result_Count) and ctrl_fsm (six-state
// controller). The block set and the signal names A1-A3, C1-C3, CFG_BITS,
// LOAD_*, DUMP_*, Start and Result_Count follow the architecture diagram; the
// meaning given to A1-A3 and C1-C3 (addresses, strides, batch length) is this
// design's own reading.
//
// Numbers: IEEE 754 binary64 coefficients, or binary32 ones when
// cfg_bits[5] is set (single and double precision, as the architecture
// offers; computing single-precision operations at full width and rounding
// each result once is this design's way of doing it). Four rounding modes
// (cfg_bits[4:3]), sticky exception flags per batch. Timing: a full 3-D
// geometric product takes 66 clocks from CLEAR to WRITE in a batch; the test
// bench checks it stays within 84.
module gacp_top
  import ga_pkg::*;
#(
  parameter int unsigned N          = 3,
  parameter int unsigned EXP_W      = 11,
  parameter int unsigned FRAC_W     = 52,
  parameter int unsigned NLANES     = 2,
  parameter int unsigned DEPTH      = 256,
  parameter int unsigned AW         = $clog2(DEPTH),
  parameter int unsigned W          = EXP_W + FRAC_W + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // host load
  input  logic [W-1:0]      load_data,
  input  logic [AW+N-1:0]   load_address,
  input  logic              load_en,
  input  logic              load_end,
  // host dump
  output logic [W-1:0]      dump_data,
  output logic [AW+N-1:0]   dump_address,
  output logic              dump_valid,
  output logic              dump_last,
  output logic              dump_done,
  input  logic              dump_end,
  // control
  input  logic              start,
  input  logic [15:0]       cfg_bits,
  input  logic [AW-1:0]     a1,
  input  logic [AW-1:0]     a2,
  input  logic [AW-1:0]     a3,
  input  logic [AW-1:0]     c1,
  input  logic [AW-1:0]     c2,
  input  logic [AW:0]       c3,
  // status
  output logic [AW:0]       result_count,
  output state_e            state,
  output logic              busy,
  output logic              core_active,
  output logic              stall,
  output fflags_t           fflags,
  output logic              error
);

  localparam int unsigned NB = 2 ** N;

  cfg_t cfg;
  assign cfg = cfg_t'(cfg_bits);

  // controller
  logic          clear, creset, load, pstart, wstate, dump_go, process_end;
  logic [AW-1:0] idx;

  ctrl_fsm #(.AW(AW)) u_fsm (
    .clk, .rst_n, .start, .load_en, .load_end, .dump_end, .c3, .process_end,
    .state, .clear, .creset, .load, .pstart, .wstate, .dump_go, .idx, .busy
  );

  // memory and its controller
  logic              m_rd_en, m_wr_en;
  logic [AW-1:0]     m_rd_addr, m_wr_addr;
  logic [NB*W-1:0]   m_rd_data, m_wr_data;
  logic [NB-1:0]     m_wr_mask;

  ga_mem #(.N(N), .W(W), .DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk, .rd_en(m_rd_en), .rd_addr(m_rd_addr), .rd_data(m_rd_data),
    .wr_en(m_wr_en), .wr_addr(m_wr_addr), .wr_data(m_wr_data), .wr_mask(m_wr_mask)
  );

  logic              core_rd_en, dump_rd_en, host_wr_en, seq_wr_en, conflict;
  logic [AW-1:0]     core_rd_addr, dump_rd_addr, host_wr_addr, seq_wr_addr;
  logic [NB*W-1:0]   host_wr_data, seq_wr_data;
  logic [NB-1:0]     host_wr_mask;

  mem_logic #(.N(N), .W(W), .AW(AW)) u_logic (
    .state,
    .core_rd_en, .core_rd_addr,
    .dump_rd_en, .dump_rd_addr,
    .host_wr_en, .host_wr_addr, .host_wr_data, .host_wr_mask,
    .seq_wr_en, .seq_wr_addr, .seq_wr_data,
    .rd_en(m_rd_en), .rd_addr(m_rd_addr), .wr_en(m_wr_en), .wr_addr(m_wr_addr),
    .wr_data(m_wr_data), .wr_mask(m_wr_mask), .conflict
  );

  // host interface

  conv_logic #(.N(N), .W(W), .AW(AW)) u_conv (
    .clk, .rst_n,
    .load_en, .load_addr(load_address), .load_data,
    .wr_en(host_wr_en), .wr_addr(host_wr_addr), .wr_data(host_wr_data), .wr_mask(host_wr_mask),
    .dump_go, .dump_base(a3), .dump_words(c3),
    .rd_en(dump_rd_en), .rd_addr(dump_rd_addr), .rd_data(m_rd_data),
    .dump_valid, .dump_data, .dump_addr(dump_address), .dump_last, .dump_done
  );

  // core and result register
  logic          rf_write;
  logic [N-1:0]  rf_wsel;
  logic [W-1:0]  rf_wdata;
  logic [NB*W-1:0] rf_data;
  logic [N:0]    rf_count;

  ga_core #(.N(N), .EXP_W(EXP_W), .FRAC_W(FRAC_W), .NLANES(NLANES), .AW(AW)) u_core (
    .clk, .rst_n, .cfg, .clear,
    .load, .addr_a(a1), .addr_b(a2), .stride_a(c1), .stride_b(c2), .idx,
    .rd_en(core_rd_en), .rd_addr(core_rd_addr), .rd_data(m_rd_data),
    .start(pstart), .process_end, .active(core_active), .stall,
    .rf_write, .rf_wsel, .rf_wdata, .fflags
  );

  reg_file #(.N(N), .W(W)) u_rf (
    .clk, .rst_n, .clear, .write(rf_write), .wsel(rf_wsel), .wdata(rf_wdata),
    .data_out(rf_data), .count(rf_count)
  );

  // result write-back
  logic incomplete;

  mem_write_seq #(.N(N), .W(W), .AW(AW)) u_wseq (
    .clk, .rst_n, .creset, .wstate, .base(a3), .rf_data, .rf_count,
    .wen(seq_wr_en), .waddr(seq_wr_addr), .wdata(seq_wr_data),
    .count(result_count), .incomplete
  );

  // Sticky error: a memory request outside its state, or a result stored
  // before all of its coefficients were written.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      error <= 1'b0;
    else if (creset) error <= 1'b0;
    else if (conflict || incomplete) error <= 1'b1;
  end

  // Rules of the host interface, checked from the first clock after reset.
  logic run;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) run <= 1'b0;
    else        run <= 1'b1;
  end

  assert property (@(posedge clk) disable iff (!run) load_en |-> state == ST_IDLE)
    else $error("host load outside IDLE");
  assert property (@(posedge clk) disable iff (!run) process_end |-> state == ST_PROCESS)
    else $error("process_end outside PROCESS");

endmodule
