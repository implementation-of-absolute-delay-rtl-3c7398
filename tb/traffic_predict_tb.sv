// traffic_predict_tb: checks the weighted moving average prediction
//   pred(n) = ceil((0.1 * (l(n-2)+l(n-3)+l(n-4)) + 0.9 * l(n-1)) )
// (rho = 0.9, N = 5) and the error err = l(n-1) - pred(n-1) against a
// reference computed here from the measured values, including a step, a
// burst and a drop to zero so that the error takes both signs.
module traffic_predict_tb;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [31:0] in_count = '0, pred;
  logic signed [32:0] err;
  logic valid;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;

  traffic_predict dut (.clk, .rst, .in_valid, .in_count, .pred, .err, .valid);

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

  longint hist[4];   // l(n-1) .. l(n-4)
  longint prev_pred = 0;

  initial begin
    longint p, s;
    hist = '{default: 0};
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 300; i++) begin
      longint x;
      if (i < 20)       x = 60;
      else if (i < 25)  x = 120;                    // burst
      else if (i < 30)  x = 0;                      // silence
      else if (i < 280) x = $urandom_range(125);
      else              x = 64'hFFFF_FFF0 - i;      // large values
      @(negedge clk);
      in_valid = 1;
      in_count = 32'(x);
      @(negedge clk);
      in_valid = 0;
      // reference
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = x;
      s = hist[1] + hist[2] + hist[3];
      p = (1 * s + 9 * hist[0] + 9) / 10;
      if (p > 64'hFFFF_FFFF) p = 64'hFFFF_FFFF;
      check(valid, "valid one cycle after in_valid");
      check(pred == 32'(p), $sformatf("slot %0d pred %0d expected %0d", i, pred, p));
      check(err == 33'(x - prev_pred), $sformatf("slot %0d err %0d expected %0d", i, err, x - prev_pred));
      if (x - prev_pred > 0) n_pos++;
      if (x - prev_pred < 0) n_neg++;
      prev_pred = p;
      @(negedge clk);
      check(!valid, "valid lasts one cycle");
    end
    check(n_pos > 0 && n_neg > 0, "error of both signs exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
