// scheduler_tb: checks the rate-paced, class-prioritised link scheduler.
// Part 1, one class: with a non-empty buffer exactly G reads are issued in
// every window of T consecutive ticks, only on ticks, for several rates;
// with an empty buffer no read is issued and each credit is reported lost.
// Part 2, three classes: random rates summing to at most T and random empty
// flags; every tick the grants, lost credits and collision flag are compared
// with a credit-counting reference, at most one grant may be given, and
// over whole runs with full buffers each class must get its rate per slot.
`timescale 1ns/1ps
module scheduler_tb;
  import add_pkg::*;
  localparam int T = 25;
  localparam int K = 3;

  logic clk = 0, rst = 1, tick = 0;
  logic [RATE_W-1:0] rate1 [1];
  logic [RATE_W-1:0] rate3 [K];
  logic [0:0]   empty1 = 1'b0, ren1, idle1;
  logic [K-1:0] empty3 = '0, ren3, idle3;
  logic coll1, coll3;
  int checks = 0, failures = 0;

  scheduler #(.NUM_CLASSES(1), .T_SLOT(T)) dut1 (
    .clk, .rst, .tick, .rate(rate1), .empty(empty1), .ren(ren1),
    .idle_credit(idle1), .collision(coll1)
  );
  scheduler #(.NUM_CLASSES(K), .T_SLOT(T)) dut3 (
    .clk, .rst, .tick, .rate(rate3), .empty(empty3), .ren(ren3),
    .idle_credit(idle3), .collision(coll3)
  );

  always #10 clk = ~clk;

  initial begin
    #20_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("TIMEOUT");
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // reference state for the three-class instance
  int macc [K];
  int mpend[K];
  int served[K];
  int n_coll = 0, n_idle = 0, n_pend = 0;

  // one clock cycle: optionally a tick, outputs checked before the edge
  task automatic cycle(input bit t);
    int earn[K], want[K];
    int g, nw;
    @(negedge clk);
    tick = t;
    #1;
    check(!$isunknown(ren1) && !$isunknown(ren3), "grants known");
    check(t || (ren1 == 0 && ren3 == 0 && idle1 == 0 && idle3 == 0), "nothing between ticks");
    check($countones(ren3) <= 1, "at most one grant per tick");
    // reference for the three-class instance
    g = -1; nw = 0;
    for (int c = K - 1; c >= 0; c--) begin
      earn[c] = int'(t && (macc[c] + int'(rate3[c]) >= T));
      want[c] = int'(t && !empty3[c] && (earn[c] != 0 || mpend[c] > 0));
      if (want[c] != 0) begin
        nw++;
        if (g < 0) g = c;
      end
      check(idle3[c] == (t && empty3[c] && (earn[c] != 0 || mpend[c] > 0)),
            $sformatf("class %0d lost credit flag", c));
      if (idle3[c]) n_idle++;
    end
    for (int c = 0; c < K; c++)
      check(ren3[c] == (c == g), $sformatf("class %0d grant: got %b, expected class %0d", c, ren3, g));
    check(coll3 == (nw > 1), "collision flag");
    if (nw > 1) n_coll++;
    if (t) begin
      for (int c = 0; c < K; c++) begin
        macc[c] = earn[c] != 0 ? macc[c] + int'(rate3[c]) - T : macc[c] + int'(rate3[c]);
        if (empty3[c]) mpend[c] = 0;
        else if (earn[c] != 0 && c != g && mpend[c] < 15) mpend[c]++;
        else if (earn[c] == 0 && c == g) mpend[c]--;
        if (mpend[c] > 0) n_pend++;
        if (c == g) served[c]++;
      end
    end
  endtask

  task automatic ticks(input int n);
    repeat (n) begin
      cycle(1'b0); cycle(1'b0); cycle(1'b1); cycle(1'b0);
    end
  endtask

  int hist[$];
  int win, lost;

  initial begin
    rate1[0] = 0;
    for (int c = 0; c < K; c++) begin
      rate3[c] = 0; macc[c] = 0; mpend[c] = 0; served[c] = 0;
    end
    repeat (4) @(negedge clk);
    rst = 0;

    // ---- part 1: one class, sliding-window count of reads ----
    for (int r = 0; r <= T; r += 4) begin
      @(negedge clk);
      rate1[0] = RATE_W'(r);
      hist.delete();
      for (int i = 0; i < 4 * T; i++) begin
        cycle(1'b0); cycle(1'b0); cycle(1'b1);
        hist.push_back(int'(ren1[0]));
        cycle(1'b0);
        if (hist.size() > T) void'(hist.pop_front());
        if (hist.size() == T && i >= T + 1) begin
          win = 0;
          foreach (hist[k]) win += hist[k];
          check(win == r, $sformatf("rate %0d: %0d reads in a window of %0d ticks", r, win, T));
        end
      end
    end
    // empty buffer: no reads, one lost credit per earned credit
    rate1[0] = RATE_W'(T / 2);
    empty1 = 1'b1;
    lost = 0;
    for (int i = 0; i < 2 * T; i++) begin
      cycle(1'b0); cycle(1'b0); cycle(1'b1);
      check(ren1 == 0, "no read from an empty buffer");
      if (idle1[0]) lost++;
      cycle(1'b0);
    end
    check(lost == 2 * (T / 2), $sformatf("%0d credits lost on an empty buffer, expected %0d", lost, 2 * (T / 2)));
    check(coll1 == 1'b0, "no collision with one class");
    empty1 = 1'b0;
    rate1[0] = 0;

    // ---- part 2: three classes against the reference ----
    for (int run = 0; run < 40; run++) begin
      int left, sr[K], base[K];
      @(negedge clk);
      left = T;
      for (int c = 0; c < K; c++) begin
        sr[c] = $urandom_range(left);
        if (run % 5 == 0) sr[c] = (c == K - 1) ? left : 0;  // one class takes the link
        left -= sr[c];
        rate3[c] = RATE_W'(sr[c]);
        base[c] = served[c];
      end
      if (run % 2 == 0) begin
        // full buffers for whole slots: every class gets its rate
        empty3 = '0;
        ticks(4 * T);
        for (int c = 0; c < K; c++)
          check(served[c] - base[c] >= 4 * sr[c] - 16 && served[c] - base[c] <= 4 * sr[c] + 16,
                $sformatf("class %0d served %0d in 4 slots at rate %0d", c, served[c] - base[c], sr[c]));
      end else begin
        for (int i = 0; i < 3 * T; i++) begin
          if ($urandom_range(7) == 0) empty3 = K'($urandom);
          ticks(1);
        end
      end
    end
    // rates over the link capacity: grants stay one per tick
    for (int c = 0; c < K; c++) rate3[c] = RATE_W'(T);
    empty3 = '0;
    ticks(2 * T);
    check(n_coll > 0, "collisions between classes seen");
    check(n_idle > 0, "lost credits seen");
    check(n_pend > 0, "waiting credits seen");
    $display("collisions %0d, lost credits %0d", n_coll, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
