// add_top_tb: end-to-end test of the delay differentiation circuit with
// two classes sharing the link.
//
// The host CPU is modelled by bus tasks. The bench shrinks the buffers to a
// 6-bit count (63 words) and makes the sources burstier (bursts of 1..16
// bytes, gaps of 1..16 ticks) so that every mechanism shows within a few
// dozen slots. Three runs are made, each with its own pair of targets
// (class 0, class 1):
//   1. 7 us and 1 us: the rates follow the traffic; capacity-limited,
//      shared-capacity and backlog-limited rates and both signs of
//      prediction error occur;
//   2. 255 us for both: the slow rates let a buffer overflow, which the
//      STATUS register must report;
//   3. 1 us and 23 us.
// In runs 1 and 3 a buffer may overflow, as the two sources together can
// offer more than the link carries.
// Independently of the circuit, the bench keeps its own queue of arrival
// times per class (from the accepted writes) and its own delay sum and
// count over the served units, and compares them with the DELAY_SUM /
// DELAY_CNT pins and with the values read back over the CPU bus. At every
// rate update the rates of the two classes must add up to at most the link
// capacity (T units per slot), and in runs with different targets the
// class with the smaller target must see the smaller average delay.
// Mechanism counts are printed and each must
// be non-zero.
module add_top_tb;
  import add_pkg::*;
  localparam int K = 2;
  localparam int SRC_ON_W = 4;
  logic clk = 0, cpu_clk = 0, rst = 1;
  logic cs = 0, rw = 1;
  logic [2:0] addr = '0;
  logic [7:0] data_i = '0, data_o;
  logic data_oe, ta_n, ext_start, ext_stop;
  logic [30:0] delay_sum [K], delay_cnt [K];
  int checks = 0, failures = 0;

  add_top #(.NUM_CLASSES(K), .FIFO_CNT(6), .SRC_ON_W(SRC_ON_W), .SRC_OFF_W(4)) dut (
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
  longint unsigned tb_now = 0;
  longint unsigned ref_sum[K], ref_cnt[K], pend_stamp[K];
  longint unsigned arrivals[K][$];
  bit     ref_meas = 0;
  bit     pend_valid[K];
  int n_slot = 0, n_upd = 0, n_pos = 0, n_neg = 0, n_cap = 0, n_bl = 0, n_share = 0;
  int n_ovf = 0, n_idle = 0, n_coll = 0, n_start = 0, n_stop = 0, n_read = 0, n_write = 0;
  longint unsigned rate_sum;

  always @(posedge clk) begin
    if (rst) begin
      tb_now <= 0; ref_meas <= 0;
      for (int c = 0; c < K; c++) begin
        pend_valid[c] <= 0; ref_sum[c] <= 0; ref_cnt[c] <= 0;
        arrivals[c].delete();
      end
    end else begin
      if (dut.tick) tb_now <= tb_now + 1;
      if (dut.start) ref_meas <= 1;
      else if (dut.stop) ref_meas <= 0;
      for (int c = 0; c < K; c++) begin
        if (dut.wen[c] && !dut.full[c]) arrivals[c].push_back(tb_now);
        pend_valid[c] <= dut.ren[c];
        if (dut.ren[c]) begin
          check(arrivals[c].size() > 0, "read from a non-empty buffer");
          pend_stamp[c] <= arrivals[c].pop_front();
        end
        if (dut.start) begin
          ref_sum[c] <= 0; ref_cnt[c] <= 0;
        end else if (ref_meas && pend_valid[c]) begin
          ref_sum[c] <= ref_sum[c] + (tb_now - pend_stamp[c]);
          ref_cnt[c] <= ref_cnt[c] + 1;
        end
        // mechanism counters
        if (dut.rate_upd[c]) begin
          n_upd++;
          if (dut.cap_lim[c]) n_cap++;
          if (dut.cap_lim[c] && dut.others[c] > 0) n_share++;
          if (dut.bl_lim[c])  n_bl++;
        end
        if (dut.pred_valid[c] && dut.pred_err[c] > 0) n_pos++;
        if (dut.pred_valid[c] && dut.pred_err[c] < 0) n_neg++;
        if (dut.overflow[c])    n_ovf++;
        if (dut.idle_credit[c]) n_idle++;
      end
      if (dut.rate_upd[0]) begin
        rate_sum = 0;
        for (int c = 0; c < K; c++) rate_sum += 64'(dut.rate[c]);
        check(rate_sum <= 64'(dut.T_SLOT), $sformatf("rates add up to %0d, over the link capacity", rate_sum));
        check(dut.rate_upd == '1, "all classes update together");
      end
      check($countones(dut.ren) <= 1, "one unit per tick on the link");
      if (dut.meas_valid[0]) n_slot++;
      if (dut.collision) n_coll++;
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

  task automatic rd_result(input int cls, input bit cnt, output logic [30:0] v);
    logic [7:0] q;
    wr(REG_SEL, {1'b0, 3'(cls), 3'b0, cnt});
    rd(REG_RES0, q); v[7:0]   = q;
    rd(REG_RES1, q); v[15:8]  = q;
    rd(REG_RES2, q); v[23:16] = q;
    rd(REG_RES3, q); v[30:24] = q[6:0];
  endtask

  // expect_ovf: 0 no overflow allowed, 1 overflow required, 2 either
  task automatic run(input int tgt0, input int tgt1, input int slots, input int expect_ovf);
    logic [7:0] q;
    logic [30:0] s, c;
    int tgt[K];
    real avg_us, avg[K];
    tgt[0] = tgt0; tgt[1] = tgt1;
    wr(REG_CTRL, 8'h00);
    for (int k = 0; k < K; k++) begin
      wr(REG_SEL, {1'b0, 3'(k), 4'b0});
      wr(REG_TARGET, 8'(tgt[k]));
    end
    // start late in a slot: the first, partial slot then carries little
    // traffic, and the jump to full traffic in the next slot gives a large
    // positive prediction error on a small backlog
    @(posedge clk iff dut.meas_valid[0]);
    repeat ((dut.T_SLOT - 30) * 4) @(posedge clk);
    wr(REG_CTRL, 8'h01);                          // T: start
    repeat (slots) @(posedge clk iff dut.meas_valid[0]);
    wr(REG_CTRL, 8'h03);                          // P: stop
    // let the sources finish their bursts and the buffers drain
    for (int i = 0; i < 300 && !(dut.empty == '1 && i > 5); i++)
      @(posedge clk iff dut.meas_valid[0]);
    repeat (20) @(posedge clk);
    check(dut.empty == '1, "buffers drained after stop");
    for (int k = 0; k < K; k++) begin
      check(delay_sum[k] == 31'(ref_sum[k]),
            $sformatf("class %0d DELAY_SUM pin %0d, model %0d", k, delay_sum[k], ref_sum[k]));
      check(delay_cnt[k] == 31'(ref_cnt[k]),
            $sformatf("class %0d DELAY_CNT pin %0d, model %0d", k, delay_cnt[k], ref_cnt[k]));
      check(ref_cnt[k] > 0, "units served");
      rd_result(k, 0, s);
      rd_result(k, 1, c);
      check(s == delay_sum[k] && c == delay_cnt[k], "CPU readback equals the pins");
      avg_us = (c > 0) ? real'(s) / real'(c) / 12.5 : 0.0;
      avg[k] = avg_us;
      $display("run class %0d target %0d us: DELAY_SUM %0d DELAY_CNT %0d average %0.2f us",
               k, tgt[k], s, c, avg_us);
    end
    // the class with the smaller target must see the smaller delay
    if (tgt[0] != tgt[1])
      check((tgt[0] < tgt[1]) == (avg[0] < avg[1]), "delays ordered as the targets");
    rd(REG_STATUS, q);
    check(q[0] == 0, "not measuring after stop");
    if (expect_ovf != 2)
      check(q[1] == expect_ovf[0], $sformatf("overflow status %0d, expected %0d", q[1], expect_ovf));
  endtask

  initial begin
    repeat (5) @(posedge cpu_clk);
    rst = 0;
    run(7, 1, 60, 2);
    run(255, 255, 30, 1);
    run(1, 23, 60, 2);
    $display("mechanisms: slots %0d rate updates %0d err+ %0d err- %0d capacity-limited %0d shared-capacity %0d backlog-limited %0d overflow %0d idle credits %0d collisions %0d start %0d stop %0d cpu writes %0d cpu reads %0d",
             n_slot, n_upd, n_pos, n_neg, n_cap, n_share, n_bl, n_ovf, n_idle, n_coll, n_start, n_stop, n_write, n_read);
    check(n_slot > 0, "slot boundaries");
    check(n_upd > 0, "rate updates");
    check(n_pos > 0, "positive prediction error");
    check(n_neg > 0, "negative prediction error");
    check(n_cap > 0, "capacity-limited rate");
    check(n_share > 0, "rate limited by the capacity left to a class");
    check(n_bl > 0, "backlog-limited rate");
    check(n_coll > 0, "both classes ready on one tick");
    check(n_ovf > 0, "buffer overflow");
    check(n_idle > 0, "service credit lost on an empty buffer");
    check(n_start == 3 && n_stop == 3, "three start/stop pairs");
    check(n_read > 0 && n_write > 0, "CPU reads and writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
