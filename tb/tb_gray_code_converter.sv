// tb_gray_code_converter: self-checking test of the registered binary-to-Gray
// converter.
//
// Steps `bin_next` through every value twice, in counting order, and checks
// after each clock edge that `gray` holds the reflected Gray code of the value
// (worked out bit by bit: g[i] = b[i] ^ b[i+1], g[msb] = b[msb]), that
// consecutive codes differ in exactly one bit, and that reset gives 0. The
// 3-bit codes are also compared with the reflected Gray sequence
// 000 001 011 010 110 111 101 100.
module tb_gray_code_converter;
  localparam int unsigned W = 4;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic [W-1:0] bin_next = '0;
  logic [W-1:0] gray;

  logic         clk3 = 1'b0;
  logic [2:0]   bin3 = '0;
  logic [2:0]   gray3;

  int checks = 0, failures = 0;

  gray_code_converter #(.WIDTH(W)) dut  (.clk, .rst, .bin_next, .gray);
  gray_code_converter #(.WIDTH(3)) dut3 (.clk(clk), .rst, .bin_next(bin3), .gray(gray3));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] ref_gray(input logic [W-1:0] b);
    logic [W-1:0] g;
    g[W-1] = b[W-1];
    for (int i = 0; i < W - 1; i++) g[i] = b[i] ^ b[i+1];
    return g;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: bin_next=%0h gray=%0h", what, bin_next, gray);
    end
  endtask

  logic [2:0] seq3 [8] = '{3'b000, 3'b001, 3'b011, 3'b010, 3'b110, 3'b111, 3'b101, 3'b100};

  initial begin
    logic [W-1:0] prev;
    repeat (2) @(negedge clk);
    check(gray == 0, "reset value");
    rst = 1'b0;
    prev = gray;
    for (int i = 0; i < 2 * (1 << W); i++) begin
      @(negedge clk);
      bin_next = W'(i + 1);
      bin3     = 3'(i + 1);
      @(negedge clk);
      check(gray == ref_gray(bin_next), "gray code value");
      check($countones(gray ^ prev) == 1, "one bit changes per step");
      checks++;
      if (gray3 != seq3[(i + 1) % 8]) begin
        failures++;
        $display("FAIL 3-bit sequence: step %0d gray3=%b", i + 1, gray3);
      end
      prev = gray;
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
