// performance_measure_tb: checks delay summation and counting.
// Served words carry random arrival stamps behind a running clock; the
// bench keeps its own sum and count of the delays (now - stamp) of words
// served while a measurement is open, and compares them with delay_sum and
// delay_cnt. Also checks that start clears, stop freezes, words outside a
// measurement are ignored, time stamps wrap correctly and the sum
// saturates at 2**31 - 1.
module performance_measure_tb;
  logic clk = 0, rst = 1, start = 0, stop = 0, rvalid = 0;
  logic [31:0] rddt = '0, now = '0;
  logic [30:0] delay_sum, delay_cnt;
  logic measuring;
  int checks = 0, failures = 0;

  performance_measure dut (.clk, .rst, .start, .stop, .rvalid, .rddt, .now,
                           .delay_sum, .delay_cnt, .measuring);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ref_sum, ref_cnt;

  task automatic serve(input int n, input bit open, input int maxd);
    for (int i = 0; i < n; i++) begin
      int d = $urandom_range(maxd);
      @(negedge clk);
      now = now + 32'($urandom_range(3));
      rvalid = ($urandom_range(3) != 0);
      rddt = now - 32'(d);
      if (rvalid && open) begin
        ref_sum += d; ref_cnt++;
        if (ref_sum > 64'h7FFF_FFFF) ref_sum = 64'h7FFF_FFFF;
      end
      @(negedge clk);
      rvalid = 0;
      check(delay_sum == 31'(ref_sum), $sformatf("sum %0d expected %0d", delay_sum, ref_sum));
      check(delay_cnt == 31'(ref_cnt), $sformatf("count %0d expected %0d", delay_cnt, ref_cnt));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    ref_sum = 0; ref_cnt = 0;
    serve(20, 0, 50);                      // before start: ignored
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check(measuring, "measuring after start");
    serve(500, 1, 400);
    now = 32'hFFFF_FF00;                   // stamps wrap through zero
    serve(300, 1, 400);
    @(negedge clk); stop = 1; @(negedge clk); stop = 0;
    check(!measuring, "stopped");
    serve(50, 0, 50);                      // after stop: frozen
    // a new start clears, then large delays saturate the sum
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    ref_sum = 0; ref_cnt = 0;
    check(delay_sum == 0 && delay_cnt == 0, "start clears the results");
    serve(200, 1, 32'h7FFF_FFFF);
    check(delay_sum == 31'h7FFF_FFFF, "sum saturates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
