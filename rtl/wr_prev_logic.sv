// wr_prev_logic: Overrun (full) flag of the write clock domain.
//
// Equal write and read pointers mean either "full" or "empty". This block
// remembers which operation, as seen from the write domain, last changed the
// distance between the pointers, and raises Overrun when the Gray write
// pointer equals the synchronized Gray read pointer and that operation was a
// write.
//
// How it works: a read shows up in the write domain as a change of the
// synchronized read pointer. `rd_gray_sync` is compared with its value one
// clock earlier; a change turns the previous operation to LAST_READ at once,
// in the same cycle. A write accepted in this cycle (`wr_accept`) then makes
// it LAST_WRITE for the next cycle. This order is right because the writer
// acts on the read pointer it sees: if a write closes the gap, the FIFO is
// full. The equality test and the previous-operation rule follow the design;
// detecting reads by a change of the synchronized pointer is this design's
// choice.
//
// Interface: `overrun` is combinational from registers of the write domain
// and the caller must not write while it is high. `prev_write` and
// `ptrs_equal` are brought out for observation.
// Timing: after the write that fills the FIFO, `overrun` is high from the
// next `wr_clk` edge; after a read, it falls once the read pointer has passed
// the two synchronizer stages. Reset (asynchronous, active high) makes the
// previous operation a read, so Overrun is low after reset.
module wr_prev_logic
  import async_fifo_pkg::*;
#(
  parameter int unsigned WIDTH = ADDR_W_DEFAULT
) (
  input  logic             wr_clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] wr_gray,
  input  logic [WIDTH-1:0] rd_gray_sync,
  input  logic             wr_accept,
  output logic             overrun,
  output logic             prev_write,
  output logic             ptrs_equal
);

  last_op_e         prev_q, prev_now;
  logic [WIDTH-1:0] rd_gray_last;

  always_comb begin
    prev_now   = (rd_gray_sync != rd_gray_last) ? LAST_READ : prev_q;
    ptrs_equal = (wr_gray == rd_gray_sync);
    overrun    = ptrs_equal && (prev_now == LAST_WRITE);
    prev_write = (prev_now == LAST_WRITE);
  end

  always_ff @(posedge wr_clk or posedge rst) begin
    if (rst) begin
      prev_q       <= LAST_READ;
      rd_gray_last <= '0;
    end else begin
      prev_q       <= wr_accept ? LAST_WRITE : prev_now;
      rd_gray_last <= rd_gray_sync;
    end
  end

  // A write must never be taken while the FIFO is full.
  a_no_write_when_full : assert property (
    @(posedge wr_clk) disable iff (rst) overrun |-> !wr_accept
  );

endmodule
