// add_top_classes_tb: two absolute-delay classes sharing the link, the
// absolute part of the two-router network experiment: class targets in the
// ratio 20 : 40 and the two classes together at about half the link.
// The experiment's targets (20 ms and 40 ms with 0.1 s slots) are beyond
// the 8-bit microsecond target register, so they are scaled to 20 us and
// 40 us on the circuit's 10 us slots; its exponential sources are replaced
// by the circuit's ON/OFF sources (bursts of 1..2 bytes, gaps of 1..8
// ticks, about one quarter load each). The proportional classes of that
// experiment are not part of the circuit.
// Two runs of 150 slots each, with the targets on either class so that the
// fixed scheduler order does not decide the outcome:
//   1. class 0 at 20 us, class 1 at 40 us;
//   2. class 0 at 40 us, class 1 at 20 us.
// Checks per run and class: DELAY_SUM / DELAY_CNT against the bench's own
// queue model and against the CPU readback, average delay under the
// target, the class with the smaller target sees the smaller delay, no
// buffer overflow, and the rates of the two classes never add up to more
// than the link.
module add_top_classes_tb;
  import add_pkg::*;
  localparam int K = 2;
  localparam int SRC_ON_W = 1;
  logic clk = 0, cpu_clk = 0, rst = 1;
  logic cs = 0, rw = 1;
  logic [2:0] addr = '0;
  logic [7:0] data_i = '0, data_o;
  logic data_oe, ta_n, ext_start, ext_stop;
  logic [30:0] delay_sum [K], delay_cnt [K];
  int checks = 0, failures = 0;

  add_top #(.NUM_CLASSES(K), .SRC_ON_W(SRC_ON_W), .SRC_OFF_W(3)) dut (
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
    for (int k = 0; k < K; k++)
      check(avg[k] <= real'(tgt[k]), $sformatf("class %0d average %0.2f us over the target %0d us",
                                                k, avg[k], tgt[k]));
    rd(REG_STATUS, q);
    check(q[0] == 0, "not measuring after stop");
    if (expect_ovf != 2)
      check(q[1] == expect_ovf[0], $sformatf("overflow status %0d, expected %0d", q[1], expect_ovf));
  endtask

  initial begin
    repeat (5) @(posedge cpu_clk);
    rst = 0;
    run(20, 40, 150, 0);
    run(40, 20, 150, 0);
    $display("slots %0d rate updates %0d capacity-limited %0d overflow %0d collisions %0d",
             n_slot, n_upd, n_cap, n_ovf, n_coll);
    check(n_slot >= 300, "slots run");
    check(n_coll > 0, "both classes ready on one tick");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
