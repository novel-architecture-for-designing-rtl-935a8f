// rd_prev_logic: Underrun (empty) flag of the read clock domain.
//
// The mirror of wr_prev_logic. It remembers which operation, as seen from the
// read domain, last changed the distance between the pointers, and raises
// Underrun when the Gray read pointer equals the synchronized Gray write
// pointer and that operation was a read.
//
// How it works: a write shows up in the read domain as a change of the
// synchronized write pointer, found by comparing `wr_gray_sync` with its value
// one clock earlier; a change turns the previous operation to LAST_WRITE in
// the same cycle. A read accepted in this cycle (`rd_accept`) makes it
// LAST_READ for the next cycle. The equality test and the previous-operation
// rule follow the design; detecting writes by a change of the synchronized
// pointer is this design's choice.
//
// Interface: `underrun` is combinational from registers of the read domain
// and the caller must not read while it is high. `prev_read` and `ptrs_equal`
// are brought out for observation.
// Timing: after the read that empties the FIFO, `underrun` is high from the
// next `rd_clk` edge; after a write, it falls once the write pointer has
// passed the two synchronizer stages. Reset (asynchronous, active high) makes
// the previous operation a read, so Underrun is high after reset: the FIFO is
// empty.
module rd_prev_logic
  import async_fifo_pkg::*;
#(
  parameter int unsigned WIDTH = ADDR_W_DEFAULT
) (
  input  logic             rd_clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] rd_gray,
  input  logic [WIDTH-1:0] wr_gray_sync,
  input  logic             rd_accept,
  output logic             underrun,
  output logic             prev_read,
  output logic             ptrs_equal
);

  last_op_e         prev_q, prev_now;
  logic [WIDTH-1:0] wr_gray_last;

  always_comb begin
    prev_now   = (wr_gray_sync != wr_gray_last) ? LAST_WRITE : prev_q;
    ptrs_equal = (rd_gray == wr_gray_sync);
    underrun   = ptrs_equal && (prev_now == LAST_READ);
    prev_read  = (prev_now == LAST_READ);
  end

  always_ff @(posedge rd_clk or posedge rst) begin
    if (rst) begin
      prev_q       <= LAST_READ;
      wr_gray_last <= '0;
    end else begin
      prev_q       <= rd_accept ? LAST_READ : prev_now;
      wr_gray_last <= wr_gray_sync;
    end
  end

  // A read must never be taken while the FIFO is empty.
  a_no_read_when_empty : assert property (
    @(posedge rd_clk) disable iff (rst) underrun |-> !rd_accept
  );

endmodule
