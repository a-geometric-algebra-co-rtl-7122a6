// ctrl_fsm: the co-processor's state machine.
//
// Six states: IDLE, CLEAR, LOAD, PROCESS, WRITE, DUMP. A batch of C3
// operations runs as follows. In IDLE the host fills memory through the
// conversion logic; a host load counts as in progress from its first load_en
// until load_end, and start is only taken when no load is in progress and
// C3 > 0. CLEAR (one clock) clears the result register and the core's partial
// sums; LOAD holds `load` for LOAD_CYCLES clocks while the core fetches its
// operands; PROCESS starts the core with a one-clock pstart and waits for
// process_end; WRITE (one clock) lets the write sequencer store the result.
// Then the next operation begins at CLEAR, or, after the last one, DUMP starts
// the conversion logic streaming the C3 results out (dump_go) and waits for
// the host's dump_end before returning to IDLE. creset restarts the result
// counter when a batch starts; idx numbers the operation within the batch.
// The states, their order, start as the only trigger and the automatic
// progress of the others follow the architecture description; the host-load
// interlock, the batch count and the dump handshake are this design's own
// reading of the LOAD_END, C3 and DUMP_END signals.
module ctrl_fsm
  import ga_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          load_en,
  input  logic          load_end,
  input  logic          dump_end,
  input  logic [AW:0]   c3,
  input  logic          process_end,
  output state_e        state,
  output logic          clear,
  output logic          creset,
  output logic          load,
  output logic          pstart,
  output logic          wstate,
  output logic          dump_go,
  output logic [AW-1:0] idx,
  output logic          busy
);

  logic        host_loading;
  logic [1:0]  lcnt;

  assign clear  = (state == ST_CLEAR);
  assign load   = (state == ST_LOAD);
  assign wstate = (state == ST_WRITE);
  assign busy   = (state != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_IDLE;
      host_loading <= 1'b0;
      lcnt         <= '0;
      idx          <= '0;
      creset       <= 1'b0;
      pstart       <= 1'b0;
      dump_go      <= 1'b0;
    end else begin
      creset  <= 1'b0;
      pstart  <= 1'b0;
      dump_go <= 1'b0;
      if (load_end)     host_loading <= 1'b0;
      else if (load_en) host_loading <= 1'b1;
      unique case (state)
        ST_IDLE: if (start && !host_loading && !load_en && c3 != '0) begin
          state  <= ST_CLEAR;
          creset <= 1'b1;
          idx    <= '0;
        end
        ST_CLEAR: begin
          state <= ST_LOAD;
          lcnt  <= '0;
        end
        ST_LOAD: begin
          lcnt <= lcnt + 1'b1;
          if (lcnt == 2'(LOAD_CYCLES - 1)) begin
            state  <= ST_PROCESS;
            pstart <= 1'b1;
          end
        end
        ST_PROCESS: if (process_end) state <= ST_WRITE;
        ST_WRITE: begin
          if ((AW+1)'(idx) + 1'b1 < c3) begin
            idx   <= idx + 1'b1;
            state <= ST_CLEAR;
          end else begin
            state   <= ST_DUMP;
            dump_go <= 1'b1;
          end
        end
        ST_DUMP: if (dump_end) state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
