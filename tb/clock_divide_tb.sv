// clock_divide_tb: checks the divide-by-4 tick and divided clock.
// After reset, tick must be high on exactly every 4th clk cycle and clk_div
// must be high for two cycles and low for two, with a period of 4 cycles.
module clock_divide_tb;
  logic clk = 0, rst = 1;
  logic clk_div, tick;
  int checks = 0, failures = 0;

  clock_divide #(.DIV(4)) dut (.clk, .rst, .clk_div, .tick);

  always #10 clk = ~clk;  // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc = 0, last_tick = -1, ticks = 0, high = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      cyc++;
      if (tick) begin
        ticks++;
        if (last_tick >= 0) check(cyc - last_tick == 4, "tick spacing");
        else check(cyc == 4, "first tick on 4th cycle");
        last_tick = cyc;
      end
      if (clk_div) high++;
      @(negedge clk);
    end
    check(ticks == 100, $sformatf("100 ticks in 400 cycles, got %0d", ticks));
    check(high == 200, $sformatf("clk_div 50%% duty, high %0d of 400", high));
    // clk_div is high for 2 consecutive cycles, low for 2
    begin
      logic [3:0] pat;
      for (int i = 0; i < 4; i++) begin pat[i] = clk_div; @(negedge clk); end
      check(pat == 4'b0011 || pat == 4'b0110 || pat == 4'b1100 || pat == 4'b1001,
            $sformatf("clk_div pattern %b", pat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
