// tb_rd_prev_logic: self-checking test of the Underrun (empty) flag logic.
//
// The test plays both sides of the read domain's view of the FIFO. It keeps a
// synchronized-write count and a read count as plain integers and drives the
// Gray codes of both (b ^ (b >> 1), worked out here) into the block. The
// occupancy the read domain sees is their difference, and the expected
// Underrun is simply "occupancy == 0": no previous-operation state is
// modelled. Each cycle the write count may advance by 0, 1 or 2 (a fast
// writer, never beyond DEPTH words ahead), and a read is made when the test
// wants one and the expected flag is low. A directed drain/fill comes first,
// then random traffic. Equal pointers with Underrun low (the full case) must
// be seen as well as the empty case.
module tb_rd_prev_logic;
  localparam int unsigned W = 4;
  localparam int unsigned DEPTH = 1 << W;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic [W-1:0] rd_gray = '0, wr_gray_sync = '0;
  logic         rd_accept = 1'b0;
  logic         underrun, prev_read, ptrs_equal;

  int checks = 0, failures = 0;
  int unsigned wcount = 0, rcount = 0;
  int empty_seen = 0, equal_full_seen = 0;

  rd_prev_logic #(.WIDTH(W)) dut (
    .rd_clk(clk), .rst, .rd_gray, .wr_gray_sync, .rd_accept, .underrun, .prev_read, .ptrs_equal
  );

  always #5 clk = ~clk;

  function automatic logic [W-1:0] g(input int unsigned n);
    logic [W-1:0] b = W'(n);
    return b ^ (b >> 1);
  endfunction

  task automatic cycle(input int unsigned wadv, input bit want_rd);
    int unsigned occ;
    bit exp_empty;
    @(negedge clk);
    rd_accept = 1'b0;
    if (wadv > DEPTH - (wcount - rcount)) wadv = DEPTH - (wcount - rcount);
    wcount += wadv;
    wr_gray_sync = g(wcount);
    rd_gray      = g(rcount);
    occ = wcount - rcount;
    exp_empty = (occ == 0);
    #1;
    checks++;
    if (underrun !== exp_empty) begin
      failures++;
      $display("FAIL at %0t: occupancy %0d, underrun=%0b", $time, occ, underrun);
    end
    checks++;
    if (ptrs_equal !== (occ == 0 || occ == DEPTH)) begin
      failures++;
      $display("FAIL at %0t: ptrs_equal=%0b occupancy %0d", $time, ptrs_equal, occ);
    end
    if (exp_empty) empty_seen++;
    if (occ == DEPTH) equal_full_seen++;
    rd_accept = want_rd && !exp_empty && !underrun;  // never break the block's own rule
    @(posedge clk);
    if (rd_accept) rcount++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (!underrun) begin failures++; $display("FAIL underrun low after reset"); end
    rst = 1'b0;
    // empty: reads are refused
    repeat (4) cycle(0, 1);
    // fill completely with no reads
    repeat (DEPTH + 2) cycle(1, 0);
    repeat (3) cycle(0, 0);
    // drain and try to overdrain
    repeat (DEPTH + 4) cycle(0, 1);
    // random traffic
    for (int i = 0; i < 2000; i++)
      cycle($urandom_range(0, 3) == 0 ? 2 : $urandom_range(0, 1), $urandom_range(0, 2) != 0);
    checks++;
    if (empty_seen == 0 || equal_full_seen == 0) begin
      failures++;
      $display("FAIL empty (%0d) and full with equal pointers (%0d) both needed", empty_seen, equal_full_seen);
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
