// tb_bit_counter: self-checking test of the FIFO pointer counter.
//
// Drives `inc` at random for a few hundred cycles (enough for several
// wrap-arounds of a 4-bit pointer) and compares `ptr` and `ptr_next` with a
// reference count kept modulo 2**ADDR_WIDTH. Also checks the reset value and
// that the pointer holds while `inc` is low.
module tb_bit_counter;
  localparam int unsigned AW = 4;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          inc = 1'b0;
  logic [AW-1:0] ptr, ptr_next;

  int checks = 0, failures = 0, wraps = 0;
  int unsigned ref_ptr = 0;

  bit_counter #(.ADDR_WIDTH(AW)) dut (.clk, .rst, .inc, .ptr, .ptr_next);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: ptr=%0d ptr_next=%0d ref=%0d inc=%0b", what, ptr, ptr_next, ref_ptr, inc);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(ptr == 0, "reset value");
    rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      inc = ($urandom_range(0, 3) != 0);
      #1;
      check(ptr == AW'(ref_ptr), "ptr");
      check(ptr_next == AW'(inc ? ref_ptr + 1 : ref_ptr), "ptr_next");
      @(posedge clk);
      if (inc) begin
        if (ref_ptr == (1 << AW) - 1) wraps++;
        ref_ptr = (ref_ptr + 1) % (1 << AW);
      end
    end
    check(wraps > 0, "pointer wrapped at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
