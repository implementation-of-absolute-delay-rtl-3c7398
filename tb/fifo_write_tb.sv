// fifo_write_tb: checks the traffic source.
// Every write must fall on a tick, carry the current tick count as its
// time stamp, and come in bursts of 1..16 bytes separated by 1..16 idle
// ticks; the long-run load must be near one half. After en falls the
// burst in progress ends and no further bytes are written.
module fifo_write_tb;
  import add_pkg::*;
  logic clk = 0, rst = 1, tick = 0, en = 0;
  logic wen;
  logic [TS_W-1:0] wdt, now;
  int checks = 0, failures = 0;

  fifo_write dut (.clk, .rst, .tick, .en, .wen, .wdt, .now);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tick every 4th cycle
  int phase = 0;
  always @(posedge clk) begin
    phase <= (phase + 1) % 4;
    tick  <= (phase == 2);
  end

  initial begin
    int ref_now = 0, writes = 0, total = 0, run = 0, gap = 0;
    int max_run = 0, min_run = 99, max_gap = 0, min_gap = 99;
    bit first = 1;
    repeat (4) @(posedge clk);
    rst <= 0;
    en  <= 1;
    for (int c = 0; c < 4 * 20000; c++) begin
      @(negedge clk);
      if (wen) begin
        check(tick, "write only on a tick");
        check(wdt == TS_W'(ref_now), $sformatf("time stamp %0d, expected %0d", wdt, ref_now));
      end
      if (tick) begin
        check(now == TS_W'(ref_now), "now counts ticks");
        total++;
        if (wen) begin
          writes++;
          if (gap > 0 && !first) begin
            if (gap > max_gap) max_gap = gap;
            if (gap < min_gap) min_gap = gap;
          end
          gap = 0;
          run++;
        end else begin
          if (run > 0) begin
            if (run > max_run) max_run = run;
            if (run < min_run) min_run = run;
            first = 0;
          end
          run = 0;
          gap++;
        end
        ref_now++;
      end
    end
    check(min_run >= 1 && max_run <= 16, $sformatf("burst length %0d..%0d", min_run, max_run));
    check(max_run >= 12, "long bursts occur");
    check(min_gap >= 1 && max_gap <= 16, $sformatf("gap length %0d..%0d", min_gap, max_gap));
    check(max_gap >= 12, "long gaps occur");
    check(writes * 100 > total * 42 && writes * 100 < total * 58,
          $sformatf("load %0d of %0d ticks", writes, total));
    // disable: at most 16 more bytes, then silence
    en <= 0;
    writes = 0;
    for (int c = 0; c < 4 * 200; c++) begin
      @(negedge clk);
      if (wen) begin
        writes++;
        check(c < 4 * 17, "no write after the burst in progress");
      end
    end
    check(writes <= 16, "burst in progress completes only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
