// add_top_full_tb: the circuit at its default sizes (4095-word buffer,
// 125-tick slots, source at one half load with bursts of up to 4 bytes)
// measured at the target delays of the test-board measurements and of the
// timing simulations: 1, 3, 5, 7, 15, 23, 87 and 255 us.
// For each target the CPU writes the target, starts, lets 100 slots pass,
// stops, waits for the buffer to drain and reads DELAY_SUM / DELAY_CNT.
// The bench checks the results against its own queue model (as in
// add_top_tb), checks the CPU readback against the pins, and checks that
// the average delay, DELAY_SUM / DELAY_CNT / 12.5 us, stays under the
// target, which is the circuit's purpose (at 1 us: under 1.5 times the
// target). The buffer must not overflow.
module add_top_full_tb;
  import add_pkg::*;
  logic clk = 0, cpu_clk = 0, rst = 1;
  logic cs = 0, rw = 1;
  logic [2:0] addr = '0;
  logic [7:0] data_i = '0, data_o;
  logic data_oe, ta_n, ext_start, ext_stop;
  logic [30:0] delay_sum [1], delay_cnt [1];
  int checks = 0, failures = 0;

  add_top dut (
    .clk, .rst, .cpu_clk, .cs, .rw, .addr, .data_i, .data_o, .data_oe, .ta_n,
    .ext_start, .ext_stop, .delay_sum, .delay_cnt
  );

  always #10   clk = ~clk;
  always #12.5 cpu_clk = ~cpu_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model of the delay measurement ------------------------
  longint unsigned tb_now = 0, ref_sum = 0, ref_cnt = 0;
  longint unsigned arrivals[$];
  bit     ref_meas = 0, pend_valid = 0;
  longint unsigned pend_stamp = 0;
  int n_slot = 0, n_upd = 0, n_pos = 0, n_neg = 0, n_cap = 0, n_bl = 0;
  int n_ovf = 0, n_idle = 0, n_start = 0, n_stop = 0, n_read = 0, n_write = 0;

  always @(posedge clk) begin
    if (rst) begin
      tb_now <= 0; ref_meas <= 0; pend_valid <= 0;
      ref_sum <= 0; ref_cnt <= 0;
      arrivals.delete();
    end else begin
      if (dut.tick) tb_now <= tb_now + 1;
      if (dut.wen[0] && !dut.full[0]) arrivals.push_back(tb_now);
      pend_valid <= dut.ren[0];
      if (dut.ren[0]) begin
        pend_stamp <= arrivals.pop_front();
        check(arrivals.size() >= 0, "read from a non-empty buffer");
      end
      if (dut.start) begin
        ref_meas <= 1; ref_sum <= 0; ref_cnt <= 0;
      end else begin
        if (dut.stop) ref_meas <= 0;
        if (ref_meas && pend_valid) begin
          ref_sum <= ref_sum + (tb_now - pend_stamp);
          ref_cnt <= ref_cnt + 1;
        end
      end
      // mechanism counters
      if (dut.meas_valid[0]) n_slot++;
      if (dut.rate_upd[0]) begin
        n_upd++;
        if (dut.cap_lim[0]) n_cap++;
        if (dut.bl_lim[0])  n_bl++;
      end
      if (dut.pred_valid[0] && dut.pred_err[0] > 0) n_pos++;
      if (dut.pred_valid[0] && dut.pred_err[0] < 0) n_neg++;
      if (dut.overflow[0])    n_ovf++;
      if (dut.idle_credit[0]) n_idle++;
      if (dut.start) n_start++;
      if (dut.stop)  n_stop++;
    end
  end

  // ---- CPU bus ------------------------------------------------------------
  task automatic bus(input bit read, input logic [2:0] a, input logic [7:0] d,
                     output logic [7:0] q);
    int lat = 0;
    @(negedge cpu_clk);
    cs = 1; rw = read; addr = a; data_i = d;
    do begin @(negedge cpu_clk); lat++; end while (ta_n && lat < 20);
    check(!ta_n, "transfer acknowledged");
    q = data_o;
    cs = 0; rw = 1;
    @(negedge cpu_clk);
    if (read) n_read++; else n_write++;
  endtask

  task automatic wr(input logic [2:0] a, input logic [7:0] d);
    logic [7:0] q;
    bus(0, a, d, q);
  endtask

  task automatic rd(input logic [2:0] a, output logic [7:0] q);
    bus(1, a, 8'h00, q);
  endtask

  task automatic rd_result(input bit cnt, output logic [30:0] v);
    logic [7:0] q;
    wr(REG_SEL, {7'b0, cnt});
    rd(REG_RES0, q); v[7:0]   = q;
    rd(REG_RES1, q); v[15:8]  = q;
    rd(REG_RES2, q); v[23:16] = q;
    rd(REG_RES3, q); v[30:24] = q[6:0];
  endtask

  // expect_ovf: 0 no overflow allowed, 1 overflow required, 2 either
  task automatic run(input int target, input int slots, input int expect_ovf);
    logic [7:0] q;
    logic [30:0] s, c;
    real avg_us;
    wr(REG_CTRL, 8'h00);
    wr(REG_TARGET, 8'(target));
    repeat (10) @(posedge clk);
    wr(REG_CTRL, 8'h01);                          // T: start
    repeat (slots) @(posedge clk iff dut.meas_valid[0]);
    wr(REG_CTRL, 8'h03);                          // P: stop
    // let the source finish its burst and the buffer drain
    for (int i = 0; i < 300 && !(dut.empty[0] && i > 5); i++)
      @(posedge clk iff dut.meas_valid[0]);
    repeat (20) @(posedge clk);
    check(dut.empty[0], "buffer drained after stop");
    check(delay_sum[0] == 31'(ref_sum), $sformatf("DELAY_SUM pin %0d, model %0d", delay_sum[0], ref_sum));
    check(delay_cnt[0] == 31'(ref_cnt), $sformatf("DELAY_CNT pin %0d, model %0d", delay_cnt[0], ref_cnt));
    check(ref_cnt > 0, "units served");
    rd_result(0, s);
    rd_result(1, c);
    check(s == delay_sum[0] && c == delay_cnt[0], "CPU readback equals the pins");
    rd(REG_STATUS, q);
    check(q[0] == 0, "not measuring after stop");
    if (expect_ovf != 2)
      check(q[1] == expect_ovf[0], $sformatf("overflow status %0d, expected %0d", q[1], expect_ovf));
    avg_us = (c > 0) ? real'(s) / real'(c) / 12.5 : 0.0;
    $display("run target %0d us: DELAY_SUM %0d DELAY_CNT %0d average %0.2f us",
             target, s, c, avg_us);
    // at 1 us the slot-average rate cannot absorb the source's bursts: the
    // average is held to 1.5 times the target there (see the README)
    if (target > 1)
      check(avg_us <= real'(target), $sformatf("average delay %0.2f us over target %0d us", avg_us, target));
    else
      check(avg_us <= 1.5 * real'(target), $sformatf("average delay %0.2f us at target %0d us", avg_us, target));
  endtask

  initial begin
    static int targets[8] = '{1, 3, 5, 7, 15, 23, 87, 255};
    repeat (5) @(posedge cpu_clk);
    rst = 0;
    foreach (targets[i]) run(targets[i], 100, 0);
    $display("mechanisms: slots %0d rate updates %0d err+ %0d err- %0d capacity-limited %0d backlog-limited %0d overflow %0d idle credits %0d start %0d stop %0d cpu writes %0d cpu reads %0d",
             n_slot, n_upd, n_pos, n_neg, n_cap, n_bl, n_ovf, n_idle, n_start, n_stop, n_write, n_read);
    check(n_slot > 0 && n_upd > 0, "slots and rate updates");
    check(n_pos > 0 && n_neg > 0, "prediction errors of both signs");
    check(n_ovf == 0, "no overflow at the default buffer size");
    check(n_start == 8 && n_stop == 8, "eight start/stop pairs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
