// gray_code_converter: binary-to-Gray conversion of a FIFO pointer.
//
// Converts the pointer to reflected binary Gray code, g = b ^ (b >> 1), so
// that consecutive pointer values differ in exactly one bit. Only one bit of
// the code can then be in transition when the other clock domain samples it,
// and the synchronized value is always either the old or the new pointer.
//
// The code is held in a register of the source domain, so that only a
// flip-flop output (never a glitching XOR output) crosses into the other
// clock domain. The register samples the Gray code of the counter's next
// value, so `gray` changes on the same clock edge as the binary pointer.
// The conversion follows the design; the output register is this design's
// choice.
//
// Interface: `bin_next` is the binary pointer's next value; `gray` is the
// Gray code of the current pointer. Reset (asynchronous, active high) gives
// gray = 0, the code of pointer 0.
module gray_code_converter #(
  parameter int unsigned WIDTH = async_fifo_pkg::ADDR_W_DEFAULT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] bin_next,
  output logic [WIDTH-1:0] gray
);

  logic [WIDTH-1:0] gray_next;

  always_comb gray_next = bin_next ^ (bin_next >> 1);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) gray <= '0;
    else     gray <= gray_next;
  end

endmodule
