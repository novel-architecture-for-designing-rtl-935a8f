// tb_fifo_memory: self-checking test of the dual-clock storage array.
//
// Write and read clocks run at unrelated periods. The test checks that reset
// clears every word (by reading all of them), then writes random words to
// random addresses on the write clock while reading random addresses on the
// read clock, keeping its own copy of the array. After each read edge it
// checks `rdata` against that copy, and after each edge without a read it
// checks that `rdata` is 0. Reads only target addresses whose last write
// finished at least a full write period earlier.
module tb_fifo_memory;
  localparam int unsigned AW = 4;
  localparam int unsigned DW = 8;
  localparam int unsigned DEPTH = 1 << AW;

  logic          wr_clk = 1'b0, rd_clk = 1'b0;
  logic          rst = 1'b1;
  logic          we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0;
  logic [DW-1:0] rdata;

  logic [DW-1:0] model [DEPTH];
  bit            busy  [DEPTH];   // address being written in the current write period

  int checks = 0, failures = 0, reads = 0, idles = 0;
  bit done_w = 0;

  fifo_memory #(.ADDR_WIDTH(AW), .DATA_WIDTH(DW)) dut (
    .wr_clk, .rd_clk, .rst, .we, .waddr, .wdata, .re, .raddr, .rdata
  );

  always #5 wr_clk = ~wr_clk;
  always #7 rd_clk = ~rd_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: raddr=%0d rdata=%0h", what, $time, raddr, rdata);
    end
  endtask

  // Write side
  initial begin
    foreach (model[i]) begin model[i] = '0; busy[i] = 1'b0; end
    repeat (3) @(negedge wr_clk);
    rst = 1'b0;
    // let the read side check the cleared array first
    repeat (2 * DEPTH + 8) @(negedge wr_clk);
    for (int i = 0; i < 300; i++) begin
      @(negedge wr_clk);
      foreach (busy[k]) busy[k] = 1'b0;
      we    = 1'($urandom_range(0, 1));
      waddr = AW'($urandom);
      wdata = DW'($urandom);
      busy[waddr] = we;
      @(posedge wr_clk);
      if (we) model[waddr] = wdata;
    end
    @(negedge wr_clk);
    we = 1'b0;
    foreach (busy[k]) busy[k] = 1'b0;
    done_w = 1;
  end

  // Read side
  initial begin
    logic [DW-1:0] expect_q;
    bit            did_read;
    repeat (3) @(negedge rd_clk);
    @(negedge rd_clk);
    // reset must have cleared every word
    for (int a = 0; a < DEPTH; a++) begin
      re = 1'b1; raddr = AW'(a);
      @(negedge rd_clk);
      check(rdata == '0, "word cleared by reset");
    end
    re = 1'b0;
    while (!done_w) begin
      @(negedge rd_clk);
      raddr = AW'($urandom);
      re    = ($urandom_range(0, 2) != 0) && !busy[raddr];
      expect_q = model[raddr];
      did_read = re;
      @(negedge rd_clk);
      if (did_read) begin
        reads++;
        check(rdata == expect_q, "read data");
      end else begin
        idles++;
        check(rdata == '0, "output is 0 after an edge without read");
      end
      re = 1'b0;
    end
    check(reads > 50 && idles > 10, "enough reads and idle cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge wr_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
