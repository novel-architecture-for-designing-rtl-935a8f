// tb_async_fifo: end-to-end test of the dual-clock FIFO at its default size
// (16 words of 8 bits).
//
// Write and read sides run on clocks of unrelated periods, which the test
// changes between phases (write faster, read faster, nearly equal). A queue
// in the test is the reference: every accepted write pushes data_in, every
// accepted read pops the word that data_out must show after the next read
// clock edge, and data_out must be 0 after an edge without an accepted read.
// A write or read is "accepted" when its enable is high and the flag of its
// domain is low; the flags are stable between the edges of their own clock,
// so the test decides this half a period before the edge.
//
// Phases:
//  1. reset: Underrun high, Overrun low, data_out 0;
//  2. continuous write of 0xAA, 0xAB, ... 0xB9, no reads: exactly 16 writes are taken on consecutive
//     write edges, Overrun rises right after the 16th, more requests are
//     refused;
//  3. continuous read, no writes: Overrun falls within 2 to 4 write edges of
//     the first read, 16 words come out in order, Underrun rises right after
//     the 16th, more requests are refused;
//  4. a write to the empty FIFO clears Underrun within 2 to 4 read edges;
//  5. random simultaneous traffic at three clock ratios, each followed by a
//     quiet period after which Overrun must equal "16 words stored" and
//     Underrun "no word stored".
// At every edge it also checks that Overrun is never high with fewer words
// stored than a full FIFO less the reads still in flight, and that Underrun
// is never high while more words are stored than writes in flight.
// Mechanisms counted (each must happen): Overrun raised, write refused,
// Underrun raised, read refused, read and write in the same window, pointer
// wrap-around, equal pointers read as full and as empty.
module tb_async_fifo;
  localparam int unsigned DW = 8;
  localparam int unsigned DEPTH = 16;

  logic          wr_clk = 1'b0, rd_clk = 1'b0;
  logic          rst = 1'b1;
  logic          wr_en = 1'b0, rd_en = 1'b0;
  logic [DW-1:0] data_in = '0;
  logic [DW-1:0] data_out;
  logic          overrun, underrun;

  int unsigned wr_half = 5, rd_half = 7;   // half periods in ns

  async_fifo dut (
    .wr_clk, .rd_clk, .rst, .wr_en, .rd_en, .data_in, .data_out, .overrun, .underrun
  );

  // constant delays, chosen by the half periods set for each phase
  always begin
    case (wr_half)
      9:       #9;
      6:       #6;
      default: #5;
    endcase
    wr_clk = ~wr_clk;
  end

  always begin
    case (rd_half)
      4:       #4;
      6:       #6;
      default: #7;
    endcase
    rd_clk = ~rd_clk;
  end

  int checks = 0, failures = 0;
  logic [DW-1:0] q [$];
  int unsigned n_writes = 0, n_reads = 0;

  // traffic control
  int unsigned wr_pct = 0, rd_pct = 0;     // request probability in percent
  bit          w_run = 0, r_run = 0;
  bit          fill_pattern = 1;           // first fill writes 0xAA, 0xAB, ... 0xB9
  int unsigned w_accepts_run = 0, r_accepts_run = 0;
  longint      last_w_time = -1000, last_r_time = -1000;

  // mechanism counters
  int m_overrun_rise = 0, m_wr_refused = 0, m_underrun_rise = 0, m_rd_refused = 0;
  int m_simultaneous = 0, m_wrap = 0, m_eq_full = 0, m_eq_empty = 0;
  logic overrun_d = 0, underrun_d = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (stored %0d, overrun=%0b underrun=%0b)", what, $time, q.size(), overrun, underrun);
    end
  endtask

  // ---------------------------------------------------------------- write side
  always @(negedge wr_clk) begin
    if (!rst) begin
      // flag sanity: Overrun means full, allowing for up to 3 reads not yet seen
      if (overrun) check(q.size() + 4 > DEPTH, "overrun only when (nearly) full");
      if (overrun && !overrun_d) m_overrun_rise++;
      overrun_d = overrun;
      // equal pointers: full (Overrun) or empty after a wrap-around, where
      // only the previous operation tells the two apart
      if (overrun) m_eq_full++;
      if (!overrun && q.size() == 0 && n_writes >= DEPTH && n_writes % DEPTH == 0) m_eq_empty++;
      if (w_run) begin
        wr_en   = ($urandom_range(1, 100) <= wr_pct);
        data_in = fill_pattern ? DW'(8'hAA + n_writes) : DW'($urandom);
        if (wr_en && overrun) m_wr_refused++;
        if (wr_en && !overrun) begin
          check(q.size() < DEPTH, "write accepted only when not full");
          q.push_back(data_in);
          n_writes++;
          w_accepts_run++;
          if (n_writes % DEPTH == 0) m_wrap++;
          if ($time - last_r_time < 2 * rd_half) m_simultaneous++;
          last_w_time = $time;
        end
      end else begin
        wr_en = 1'b0;
      end
    end
  end

  // ----------------------------------------------------------------- read side
  bit            rd_pending = 0;
  logic [DW-1:0] rd_expect;

  always @(negedge rd_clk) begin
    if (!rst) begin
      // result of the previous edge
      if (rd_pending) check(data_out == rd_expect, "data_out is the oldest word");
      else            check(data_out == '0, "data_out is 0 without a read");
      rd_pending = 0;
      if (underrun) check(q.size() < 4, "underrun only when (nearly) empty");
      if (underrun && !underrun_d) m_underrun_rise++;
      underrun_d = underrun;
      if (r_run) begin
        rd_en = ($urandom_range(1, 100) <= rd_pct);
        if (rd_en && underrun) m_rd_refused++;
        if (rd_en && !underrun) begin
          check(q.size() > 0, "read accepted only when not empty");
          if (q.size() > 0) begin
            rd_expect  = q.pop_front();
            rd_pending = 1;
          end
          n_reads++;
          r_accepts_run++;
          if ($time - last_w_time < 2 * wr_half) m_simultaneous++;
          last_r_time = $time;
        end
      end else begin
        rd_en = 1'b0;
      end
    end
  end

  task automatic quiet_and_check(input string phase);
    w_run = 0; r_run = 0;
    repeat (8) @(posedge wr_clk);
    repeat (8) @(posedge rd_clk);
    @(negedge wr_clk);
    check(overrun == (q.size() == DEPTH), {phase, ": overrun settles to full"});
    @(negedge rd_clk);
    check(underrun == (q.size() == 0), {phase, ": underrun settles to empty"});
  endtask

  int edges;

  initial begin
    // 1. reset
    repeat (3) @(posedge rd_clk);
    check(underrun && !overrun && data_out == '0, "state after reset");
    @(negedge wr_clk);
    rst = 1'b0;

    // 2. continuous write, no reads
    wr_pct = 100; rd_pct = 0;
    @(posedge wr_clk);
    w_accepts_run = 0;
    w_run = 1;
    edges = 0;
    // negedge 1 raises wr_en; writes are taken on the next 16 rising edges,
    // so Overrun must first be seen at negedge 17
    do begin
      @(negedge wr_clk); edges++;
    end while (!overrun && edges < 40);
    check(edges == DEPTH + 1, "16 writes on 16 consecutive write edges, then overrun");
    @(posedge wr_clk);
    check(w_accepts_run == DEPTH, "exactly 16 writes taken");
    repeat (6) @(posedge wr_clk);
    check(w_accepts_run == DEPTH && overrun, "writes refused while full");
    w_run = 0;
    fill_pattern = 0;

    // 3. continuous read, no writes (the scoreboard expects 0xAA ... 0xB9)
    rd_pct = 100;
    @(posedge rd_clk);
    r_accepts_run = 0;
    r_run = 1;
    @(posedge rd_clk);
    edges = 0;
    while (overrun) begin
      @(posedge wr_clk); edges++;
      if (edges > 10) break;
    end
    check(edges >= 2 && edges <= 4, "overrun falls 2 to 4 write edges after the first read");
    while (!underrun) begin
      @(posedge rd_clk);
      if (r_accepts_run > 40) break;
    end
    check(r_accepts_run == DEPTH, "16 reads, then underrun");
    repeat (6) @(posedge rd_clk);
    check(r_accepts_run == DEPTH && underrun, "reads refused while empty");

    // 4. one write into the empty FIFO clears Underrun
    r_run = 0;
    @(negedge wr_clk);
    w_run = 1; wr_pct = 100;
    @(posedge wr_clk);
    @(negedge wr_clk);
    w_run = 0;
    @(posedge rd_clk);
    edges = 0;
    while (underrun) begin
      @(posedge rd_clk); edges++;
      if (edges > 10) break;
    end
    check(edges >= 1 && edges <= 4, "underrun falls within 4 read edges of a write");
    r_run = 1; rd_pct = 100;
    repeat (4) @(posedge rd_clk);
    r_run = 0;
    quiet_and_check("single word");

    // 5. random simultaneous traffic at three clock ratios
    for (int ph = 0; ph < 6; ph++) begin
      case (ph % 3)
        0: begin wr_half = 5; rd_half = 7; end
        1: begin wr_half = 9; rd_half = 4; end
        default: begin wr_half = 6; rd_half = 6; end
      endcase
      wr_pct = (ph < 3) ? 80 : 50;
      rd_pct = (ph < 3) ? 50 : 80;
      w_run = 1; r_run = 1;
      repeat (1500) @(posedge wr_clk);
      quiet_and_check($sformatf("random phase %0d", ph));
    end

    // drain what is left and check it
    r_run = 1; rd_pct = 100;
    repeat (3 * DEPTH) @(posedge rd_clk);
    quiet_and_check("final drain");
    check(q.size() == 0, "all words read back");

    $display("words written %0d, read %0d", n_writes, n_reads);
    $display("mechanisms: overrun raised %0d, write refused %0d, underrun raised %0d, read refused %0d",
             m_overrun_rise, m_wr_refused, m_underrun_rise, m_rd_refused);
    $display("            simultaneous %0d, wrap-around %0d, equal pointers full %0d / empty %0d",
             m_simultaneous, m_wrap, m_eq_full, m_eq_empty);
    check(m_overrun_rise > 0, "overrun happened");
    check(m_wr_refused > 0, "write refused happened");
    check(m_underrun_rise > 0, "underrun happened");
    check(m_rd_refused > 0, "read refused happened");
    check(m_simultaneous > 0, "simultaneous read and write happened");
    check(m_wrap > 0, "pointer wrap-around happened");
    check(m_eq_full > 0 && m_eq_empty > 0, "equal pointers seen as full and as empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge wr_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
