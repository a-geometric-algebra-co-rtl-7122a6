// conv_logic: conversion logic between the host bus and the multivector words.
//
// The host moves one W-bit coefficient per clock; the memory holds whole
// multivectors of 2**N coefficients. Load side: a host write (load_en) of
// load_data to load_addr = {word address, blade index} becomes, one clock
// later, a memory write of that one coefficient, placed in its lane of the
// word and enabled by a one-hot coefficient mask. Dump side: a dump_go pulse
// with a base address and a word count makes the unit read the words one by
// one and send each out coefficient by coefficient, blade 0 first, as
// dump_valid / dump_data / dump_addr, marking the last coefficient with
// dump_last and raising dump_done for one clock after it. Each word takes
// 2 + 2**N clocks (read, wait for the data, shift out).
// The unit's role (data transfer between the external interface and the wide
// datapath) follows the architecture description; the serial coefficient
// format and the timing are this design's own.
module conv_logic #(
  parameter int unsigned N  = 3,
  parameter int unsigned W  = 64,
  parameter int unsigned AW = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host load
  input  logic                  load_en,
  input  logic [AW+N-1:0]       load_addr,
  input  logic [W-1:0]          load_data,
  output logic                  wr_en,
  output logic [AW-1:0]         wr_addr,
  output logic [(2**N)*W-1:0]   wr_data,
  output logic [(2**N)-1:0]     wr_mask,
  // dump
  input  logic                  dump_go,
  input  logic [AW-1:0]         dump_base,
  input  logic [AW:0]           dump_words,
  output logic                  rd_en,
  output logic [AW-1:0]         rd_addr,
  input  logic [(2**N)*W-1:0]   rd_data,
  output logic                  dump_valid,
  output logic [W-1:0]          dump_data,
  output logic [AW+N-1:0]       dump_addr,
  output logic                  dump_last,
  output logic                  dump_done
);

  localparam int unsigned NB = 2 ** N;

  // ------------------------------------------------------------ load side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
      wr_mask <= '0;
    end else begin
      wr_en   <= load_en;
      wr_addr <= load_addr[AW+N-1:N];
      wr_data <= {NB{load_data}};
      wr_mask <= NB'(1) << load_addr[N-1:0];
    end
  end

  // ------------------------------------------------------------ dump side
  typedef enum logic [1:0] {D_IDLE, D_READ, D_WAIT, D_SHIFT} dstate_e;

  dstate_e          ds;
  logic [AW:0]      widx;
  logic [N-1:0]     cidx;
  logic [AW:0]      nwords;
  logic [AW-1:0]    base;
  logic [NB*W-1:0]  word;

  assign rd_en   = (ds == D_READ);
  assign rd_addr = base + widx[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ds         <= D_IDLE;
      widx       <= '0;
      cidx       <= '0;
      nwords     <= '0;
      base       <= '0;
      word       <= '0;
      dump_valid <= 1'b0;
      dump_data  <= '0;
      dump_addr  <= '0;
      dump_last  <= 1'b0;
      dump_done  <= 1'b0;
    end else begin
      dump_valid <= 1'b0;
      dump_last  <= 1'b0;
      dump_done  <= 1'b0;
      unique case (ds)
        D_IDLE: if (dump_go) begin
          base   <= dump_base;
          nwords <= dump_words;
          widx   <= '0;
          if (dump_words != '0) ds <= D_READ;
          else                  dump_done <= 1'b1;
        end
        D_READ: ds <= D_WAIT;
        D_WAIT: begin
          word <= rd_data;
          cidx <= '0;
          ds   <= D_SHIFT;
        end
        D_SHIFT: begin
          dump_valid <= 1'b1;
          dump_data  <= word[cidx*W +: W];
          dump_addr  <= {rd_addr, cidx};
          if (cidx == N'(NB - 1)) begin
            widx <= widx + 1'b1;
            if (widx + 1'b1 == nwords) begin
              dump_last <= 1'b1;
              ds        <= D_IDLE;
            end else begin
              ds <= D_READ;
            end
          end
          cidx <= cidx + 1'b1;
        end
        default: ds <= D_IDLE;
      endcase
      if (dump_last) dump_done <= 1'b1;
    end
  end

endmodule
