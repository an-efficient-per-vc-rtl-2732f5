// pasd_fifo: the FIFO block, one first-come-first-served cell queue shared by
// all VCs of the output port.
//
// The published scheme builds this block from commercial FIFOs for the cell headers and
// DDR SDRAM for the payloads; here header and payload are kept together in one
// on-chip array of DEPTH entries (a circular buffer with read and write
// pointers). The head entry is read combinationally (first-word fall-through)
// so that the output controller can look at it and pop it in the same cell
// time. Push and pop may happen in the same clock. A push while full is
// refused and flagged on overflow; with PEPD prepayment DEPTH >= B + M - 1
// guarantees that this never happens, and an assertion checks it.
module pasd_fifo
  import pasd_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  fifo_entry_t push_entry,
  input  logic        pop,
  output fifo_entry_t head,
  output logic        empty,
  output logic        full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic        overflow
);

  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  fifo_entry_t mem [DEPTH];
  logic [AW-1:0] wr_q, rd_q;
  logic [CW-1:0] cnt_q;
  logic do_push, do_pop;

  assign empty    = (cnt_q == '0);
  assign full     = (cnt_q == CW'(DEPTH));
  assign do_pop   = pop && !empty;
  assign do_push  = push && !full;
  assign overflow = push && full;
  assign head     = mem[rd_q];
  assign count    = cnt_q;

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q] <= push_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q  <= '0;
      rd_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= (int'(wr_q) == DEPTH - 1) ? '0 : wr_q + 1'b1;
      if (do_pop)  rd_q <= (int'(rd_q) == DEPTH - 1) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + CW'(do_push) - CW'(do_pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("pasd_fifo: push into a full FIFO");

endmodule
