// tb_sync_2ff: self-checking test of the two-flip-flop synchronizer.
//
// Drives a new random value into `d` between clock edges every cycle and
// checks that `q` equals the value `d` had two rising edges earlier, i.e. a
// latency of exactly two destination clocks, and that reset clears both
// stages.
module tb_sync_2ff;
  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic [W-1:0] d = '0;
  logic [W-1:0] q;
  logic [W-1:0] hist [3];

  int checks = 0, failures = 0;

  sync_2ff #(.WIDTH(W)) dut (.clk, .rst, .d, .q);

  always #5 clk = ~clk;

  initial begin
    hist = '{default: '0};
    repeat (2) @(negedge clk);
    checks++;
    if (q != 0) begin failures++; $display("FAIL reset value q=%0h", q); end
    rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      // hist[k] is the value d had at the k-th most recent rising edge
      checks++;
      if (i >= 2 && q != hist[1]) begin
        failures++;
        $display("FAIL cycle %0d: q=%0h expected %0h", i, q, hist[1]);
      end
      d = W'($urandom);
      @(posedge clk);
      hist[2] = hist[1];
      hist[1] = hist[0];
      hist[0] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
