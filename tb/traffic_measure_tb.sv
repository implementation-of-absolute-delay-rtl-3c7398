// traffic_measure_tb: random arrivals against a per-slot reference count.
// Checks that valid comes once per slot of T_SLOT ticks, that count holds
// the number of arrivals of the slot just ended, and that an arrival on
// the last tick of a slot is counted in that slot.
module traffic_measure_tb;
  localparam int T = 10;
  logic clk = 0, rst = 1, tick = 0, arrive = 0;
  logic [31:0] count;
  logic valid;
  int checks = 0, failures = 0;

  traffic_measure #(.T_SLOT(T)) dut (.clk, .rst, .tick, .arrive, .count, .valid);

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

  int slot_counts[$];
  int ticks = 0, in_slot = 0, valids = 0, last_valid_tick = -1;

  // stimulus and reference, on the falling edge
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 4 * 2000; c++) begin
      @(negedge clk);
      if (valid) begin
        valids++;
        check(slot_counts.size() > 0, "valid only after a full slot");
        if (slot_counts.size() > 0)
          check(count == 32'(slot_counts.pop_front()), "slot count");
        if (last_valid_tick >= 0) check(ticks - last_valid_tick == T, "one valid per slot");
        last_valid_tick = ticks;
      end
      tick = (c % 4 == 3);
      arrive = tick && ($urandom_range(99) < ((c / 400) % 2 ? 90 : 20));
      if (tick) begin
        in_slot += arrive;
        ticks++;
        if (ticks % T == 0) begin
          slot_counts.push_back(in_slot);
          in_slot = 0;
        end
      end
    end
    check(valids == 2000 / T - 1 || valids == 2000 / T, $sformatf("slot count %0d", valids));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
