// fifo_memory: storage array of the FIFO, one write port and one read port
// on separate clocks.
//
// 2**ADDR_WIDTH words of DATA_WIDTH bits. A word is written at `waddr` on the
// rising edge of `wr_clk` when `we` is high. On the rising edge of `rd_clk`,
// `rdata` is loaded with the word at `raddr` when `re` is high, and with 0
// when it is low, so that the output shows a word only in the cycle after a
// read. Reset clears every word and the output, so that the memory is flushed
// to a known state; the array is therefore built from resettable flip-flops
// rather than a RAM macro.
//
// The zeroed output between reads and the flushing reset follow the design;
// the one read-clock cycle of read latency is this design's choice.
// The read port may read a word in the same period as the write port writes
// another one; the FIFO's flags keep the two ports off the same word while it
// is being written.
module fifo_memory #(
  parameter int unsigned ADDR_WIDTH = async_fifo_pkg::ADDR_W_DEFAULT,
  parameter int unsigned DATA_WIDTH = async_fifo_pkg::DATA_W_DEFAULT
) (
  input  logic                  wr_clk,
  input  logic                  rd_clk,
  input  logic                  rst,
  input  logic                  we,
  input  logic [ADDR_WIDTH-1:0] waddr,
  input  logic [DATA_WIDTH-1:0] wdata,
  input  logic                  re,
  input  logic [ADDR_WIDTH-1:0] raddr,
  output logic [DATA_WIDTH-1:0] rdata
);

  localparam int unsigned DEPTH = 2 ** ADDR_WIDTH;

  logic [DATA_WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wr_clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  always_ff @(posedge rd_clk or posedge rst) begin
    if (rst)     rdata <= '0;
    else if (re) rdata <= mem[raddr];
    else         rdata <= '0;
  end

endmodule
