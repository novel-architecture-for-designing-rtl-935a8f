// tb_wr_prev_logic: self-checking test of the Overrun (full) flag logic.
//
// The test plays both sides of the write domain's view of the FIFO. It keeps
// a write count and a synchronized-read count as plain integers and drives the
// Gray codes of both (worked out here as b ^ (b >> 1)) into the block. The
// occupancy the write domain sees is their difference, 0 to DEPTH, and the
// expected Overrun is simply "occupancy == DEPTH": no previous-operation
// state is modelled. Each cycle the read count may advance by 0, 1 or 2
// (a fast reader), and a write is made when the test wants one and the
// expected flag is low. A directed fill/drain comes first, then random
// traffic. It also counts equal pointers with Overrun low (the empty case
// that only the previous operation tells apart) and requires both cases.
module tb_wr_prev_logic;
  localparam int unsigned W = 4;
  localparam int unsigned DEPTH = 1 << W;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic [W-1:0] wr_gray = '0, rd_gray_sync = '0;
  logic         wr_accept = 1'b0;
  logic         overrun, prev_write, ptrs_equal;

  int checks = 0, failures = 0;
  int unsigned wcount = 0, rcount = 0;
  int full_seen = 0, equal_empty_seen = 0;

  wr_prev_logic #(.WIDTH(W)) dut (
    .wr_clk(clk), .rst, .wr_gray, .rd_gray_sync, .wr_accept, .overrun, .prev_write, .ptrs_equal
  );

  always #5 clk = ~clk;

  function automatic logic [W-1:0] g(input int unsigned n);
    logic [W-1:0] b = W'(n);
    return b ^ (b >> 1);
  endfunction

  // One write-clock cycle: the read count advances by `radv`, then a write is
  // attempted if `want_wr`.
  task automatic cycle(input int unsigned radv, input bit want_wr);
    int unsigned occ;
    bit exp_full;
    @(negedge clk);
    wr_accept = 1'b0;
    if (radv > wcount - rcount) radv = wcount - rcount;
    rcount += radv;
    rd_gray_sync = g(rcount);
    wr_gray      = g(wcount);
    occ = wcount - rcount;
    exp_full = (occ == DEPTH);
    #1;
    checks++;
    if (overrun !== exp_full) begin
      failures++;
      $display("FAIL at %0t: occupancy %0d, overrun=%0b", $time, occ, overrun);
    end
    checks++;
    if (ptrs_equal !== (occ == 0 || occ == DEPTH)) begin
      failures++;
      $display("FAIL at %0t: ptrs_equal=%0b occupancy %0d", $time, ptrs_equal, occ);
    end
    if (exp_full) full_seen++;
    if (occ == 0) equal_empty_seen++;
    wr_accept = want_wr && !exp_full && !overrun;  // never break the block's own rule
    @(posedge clk);
    if (wr_accept) wcount++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (overrun) begin failures++; $display("FAIL overrun high after reset"); end
    rst = 1'b0;
    // fill and try to overfill
    repeat (DEPTH + 4) cycle(0, 1);
    // one read frees a word, then refill
    cycle(1, 0);
    repeat (3) cycle(0, 1);
    // drain completely, then wait with equal pointers
    repeat (DEPTH + 2) cycle(1, 0);
    repeat (4) cycle(0, 0);
    // random traffic
    for (int i = 0; i < 2000; i++)
      cycle($urandom_range(0, 3) == 0 ? 2 : $urandom_range(0, 1), $urandom_range(0, 2) != 0);
    checks++;
    if (full_seen == 0 || equal_empty_seen == 0) begin
      failures++;
      $display("FAIL full (%0d) and empty with equal pointers (%0d) both needed", full_seen, equal_empty_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
