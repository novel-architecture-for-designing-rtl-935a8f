// async_fifo: dual-clock FIFO with Overrun and Underrun flags.
//
// Carries DATA_WIDTH-bit words from the write clock domain to the read clock
// domain through a memory of 2**ADDR_WIDTH words (16 x 8 bits by default).
//
// Each domain owns a binary pointer (bit_counter) that addresses the memory
// and wraps around at the last word. The pointer is converted to Gray code in
// a register (gray_code_converter) and sent through a two-flip-flop
// synchronizer (sync_2ff) into the other domain. Pointers are only compared
// for equality, in Gray code. Because the pointers have no extra wrap bit,
// equality alone cannot tell full from empty; each domain therefore keeps the
// "previous operation" it has seen (wr_prev_logic, rd_prev_logic):
//   pointers equal and previous operation write -> Overrun  (full)
//   pointers equal and previous operation read  -> Underrun (empty)
// While Overrun is high wr_en is ignored, and while Underrun is high rd_en is
// ignored; the pointers and the stored data are then left as they are.
//
// Interface: `wr_en`/`data_in` are sampled on `wr_clk`; `rd_en` on `rd_clk`.
// `data_out` holds the word read on the previous `rd_clk` edge and is 0 after
// an edge without an accepted read. `overrun` is in the write domain and
// `underrun` in the read domain. `rst` is one asynchronous, active-high reset
// for both domains: it empties the FIFO and clears the memory, leaving
// Underrun high and Overrun low.
// Timing: a write is taken on the edge where wr_en is high and Overrun is low;
// the FIFO accepts one write per `wr_clk` and one read per `rd_clk`. The Gray
// pointer changes on the same edge as the operation, so a written word becomes
// readable after the next two `rd_clk` edges (the synchronizer stages), and a
// freed word becomes writable after the next two `wr_clk` edges. The flags
// are exact in the domain that raises them and pessimistic (late to fall) by
// that latency.
// Each domain learns of the other side's operations from a change of the
// synchronized pointer. If one clock were so fast that its side could make
// 2**ADDR_WIDTH operations between two edges of the other clock, the pointer
// would come back to the same value unseen; the clocks must stay well within
// that ratio (16:1 at the default size).
//
// The architecture (counters, Gray converters, two-flop synchronizers,
// previous-operation logic, memory) and the ports follow the design; the
// registered Gray code, the reset scheme and the read latency are choices of
// this implementation.
module async_fifo
  import async_fifo_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH = ADDR_W_DEFAULT,
  parameter int unsigned DATA_WIDTH = DATA_W_DEFAULT
) (
  input  logic                  wr_clk,
  input  logic                  rd_clk,
  input  logic                  rst,
  input  logic                  wr_en,
  input  logic                  rd_en,
  input  logic [DATA_WIDTH-1:0] data_in,
  output logic [DATA_WIDTH-1:0] data_out,
  output logic                  overrun,
  output logic                  underrun
);

  // Write domain
  logic                  wr_accept;
  logic [ADDR_WIDTH-1:0] wr_ptr, wr_ptr_next, wr_gray, rd_gray_sync;
  logic                  prev_write, wr_ptrs_equal;

  // Read domain
  logic                  rd_accept;
  logic [ADDR_WIDTH-1:0] rd_ptr, rd_ptr_next, rd_gray, wr_gray_sync;
  logic                  prev_read, rd_ptrs_equal;

  always_comb wr_accept = wr_en && !overrun;
  always_comb rd_accept = rd_en && !underrun;

  bit_counter #(.ADDR_WIDTH(ADDR_WIDTH)) u_wr_counter (
    .clk(wr_clk), .rst, .inc(wr_accept), .ptr(wr_ptr), .ptr_next(wr_ptr_next)
  );

  gray_code_converter #(.WIDTH(ADDR_WIDTH)) u_wr_gray (
    .clk(wr_clk), .rst, .bin_next(wr_ptr_next), .gray(wr_gray)
  );

  sync_2ff #(.WIDTH(ADDR_WIDTH)) u_sync_rd2wr (
    .clk(wr_clk), .rst, .d(rd_gray), .q(rd_gray_sync)
  );

  wr_prev_logic #(.WIDTH(ADDR_WIDTH)) u_wr_prev (
    .wr_clk, .rst, .wr_gray, .rd_gray_sync, .wr_accept,
    .overrun, .prev_write, .ptrs_equal(wr_ptrs_equal)
  );

  bit_counter #(.ADDR_WIDTH(ADDR_WIDTH)) u_rd_counter (
    .clk(rd_clk), .rst, .inc(rd_accept), .ptr(rd_ptr), .ptr_next(rd_ptr_next)
  );

  gray_code_converter #(.WIDTH(ADDR_WIDTH)) u_rd_gray (
    .clk(rd_clk), .rst, .bin_next(rd_ptr_next), .gray(rd_gray)
  );

  sync_2ff #(.WIDTH(ADDR_WIDTH)) u_sync_wr2rd (
    .clk(rd_clk), .rst, .d(wr_gray), .q(wr_gray_sync)
  );

  rd_prev_logic #(.WIDTH(ADDR_WIDTH)) u_rd_prev (
    .rd_clk, .rst, .rd_gray, .wr_gray_sync, .rd_accept,
    .underrun, .prev_read, .ptrs_equal(rd_ptrs_equal)
  );

  fifo_memory #(.ADDR_WIDTH(ADDR_WIDTH), .DATA_WIDTH(DATA_WIDTH)) u_mem (
    .wr_clk, .rd_clk, .rst,
    .we(wr_accept), .waddr(wr_ptr), .wdata(data_in),
    .re(rd_accept), .raddr(rd_ptr), .rdata(data_out)
  );

endmodule
