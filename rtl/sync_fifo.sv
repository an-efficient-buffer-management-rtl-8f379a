// sync_fifo: bounded synchronous FIFO used for every message queue of the
// system (HIN, LIN, STQ, OUT at the memory site; HOUT, LOUT, IN, PMB and MPB
// at a cache site).
//
// A circular buffer of DEPTH entries with a read and a write pointer and an
// occupancy counter. The head entry is always visible on rd_data while
// empty is low; pop removes it at the clock edge. push writes wr_data at the
// tail; a push into a full FIFO is ignored (and flagged by an assertion).
// Push and pop may happen in the same cycle, also when the FIFO is full.
// free reports the number of empty slots, which the memory engine needs for
// its "at least two free slots in OUT" condition.
//
// The queues and their minimum sizes come from the protocol description;
// the implementation (counter-based circular buffer, no bypass from push to
// head in the same cycle) is this design's own choice.
module sync_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               wr_data,
  input  logic                       pop,
  output logic [W-1:0]               rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(DEPTH+1)-1:0] free
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  logic do_push, do_pop;
  assign do_pop  = pop && (cnt != 0);
  assign do_push = push && ((cnt != DEPTH[$clog2(DEPTH+1)-1:0]) || do_pop);

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      if (do_push) wr_ptr <= incr(wr_ptr);
      case ({do_push, do_pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wr_data;
  end

  assign rd_data = mem[rd_ptr];
  assign empty   = (cnt == 0);
  assign full    = (cnt == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign count   = cnt;
  assign free    = DEPTH[$clog2(DEPTH+1)-1:0] - cnt;

  // A producer must not push into a full FIFO unless it pops at the same time.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (!full || pop))
    else $error("sync_fifo: push into full FIFO");
endmodule
