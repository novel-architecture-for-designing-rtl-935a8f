// bit_counter: binary read or write pointer of the FIFO.
//
// An ADDR_WIDTH-bit up-counter that addresses the memory. It advances by one
// on every clock edge where `inc` is high and wraps from the last location
// back to 0, as the pointers of the FIFO do. There is no extra wrap bit: full
// and empty are told apart by the previous-operation logic, not by the
// pointer. The caller gates `inc` with the Overrun/Underrun flag, so a pointer
// stays put while its flag is up.
//
// Interface: `ptr` is the current (registered) pointer; `ptr_next` is the
// value it takes at the next edge, given so that the Gray converter can
// register the Gray code of the pointer on the same edge.
// Timing: `ptr` changes on the rising edge of `clk` after `inc`; `rst` is an
// asynchronous, active-high reset to 0. Reset polarity and the ptr_next output
// are choices of this design.
module bit_counter #(
  parameter int unsigned ADDR_WIDTH = async_fifo_pkg::ADDR_W_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  inc,
  output logic [ADDR_WIDTH-1:0] ptr,
  output logic [ADDR_WIDTH-1:0] ptr_next
);

  // Wrap-around is the natural overflow of the ADDR_WIDTH-bit sum.
  always_comb ptr_next = inc ? ptr + ADDR_WIDTH'(1) : ptr;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) ptr <= '0;
    else     ptr <= ptr_next;
  end

endmodule
