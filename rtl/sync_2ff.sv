// sync_2ff: two-flip-flop synchronizer for a Gray-coded pointer.
//
// Brings a value from another clock domain into the domain of `clk` through
// two flip-flop stages. The first stage may go metastable when `d` changes
// close to the clock edge; the second stage gives it a full clock period to
// settle before the value reaches the comparator. The input must be Gray
// coded (at most one bit changing at a time) for the multi-bit result to be
// either the old or the new value.
//
// Interface: `d` from the other domain, `q` in the `clk` domain.
// Timing: `q` follows `d` two rising edges of `clk` later. Both stages reset
// to 0 (asynchronous, active high, this design's choice). The default width of
// 8 bits is that of the design's synchronizer drawing; the FIFO instantiates
// it at its pointer width.
module sync_2ff #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
