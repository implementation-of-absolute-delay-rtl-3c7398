// service_rate_control_tb: checks the rate derivation.
// For random backlogs, predictions, prediction errors, target delays and
// minimum rates of other classes the new rate must equal the reference
//   Gmin = ceil(T * max(B + P + E, 0) / (D + T - 1)),  D = floor(12.5 * target_us)
//   Gcap = max(T - others, 0)
//   G    = min(Gmin, min(Gcap, P + B))
// and be loaded within 60 clk cycles of in_valid, two cycles after gmin
// (which must equal Gmin) is flagged valid. Cases where the link capacity,
// the capacity left by other classes and the backlog bound limit the rate
// must all occur.
module service_rate_control_tb;
  localparam int T = 125;
  logic clk = 0, rst = 1;
  logic [7:0] target_us = 8'd1;
  logic in_valid = 0;
  logic [31:0] pred = '0;
  logic signed [32:0] err = '0;
  logic [11:0] backlog = '0;
  logic [31:0] others_gmin = '0;
  logic upd, cap_lim, bl_lim, gmin_valid;
  logic [31:0] rate, gmin;
  int checks = 0, failures = 0, n_cap = 0, n_bl = 0, n_min = 0, n_share = 0;

  service_rate_control #(.T_SLOT(T)) dut (
    .clk, .rst, .target_us, .in_valid, .pred, .err, .backlog, .others_gmin,
    .gmin, .gmin_valid, .rate, .upd, .cap_lim, .bl_lim
  );

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_case(input int b, input int p, input int e, input int tgt,
                          input int others);
    longint d, den, num, gmin_ref, gcap, gmax, g;
    int lat, vlat;
    d   = (longint'(tgt) * 25) / 2;
    den = d + T - 1;
    num = b + p + e;
    gmin_ref = (num <= 0) ? 0 : (T * num + den - 1) / den;
    gcap = (others >= T) ? 0 : T - others;
    gmax = (p + b < gcap) ? p + b : gcap;
    g    = (gmin_ref > gmax) ? gmax : gmin_ref;
    @(negedge clk);
    target_us = 8'(tgt);
    backlog = 12'(b); pred = 32'(p); err = 33'(e); others_gmin = 32'(others);
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    vlat = -1;
    while (!upd && lat < 200) begin
      if (gmin_valid) begin
        vlat = lat;
        check(gmin == 32'(gmin_ref), $sformatf("gmin %0d expected %0d", gmin, gmin_ref));
      end
      @(negedge clk); lat++;
    end
    check(upd, "rate update arrives");
    check(vlat == lat - 2, "gmin valid two cycles before the update");
    check(lat <= 60, $sformatf("update latency %0d cycles", lat));
    check(rate == 32'(g), $sformatf("B=%0d P=%0d E=%0d D*=%0dus others=%0d: rate %0d expected %0d",
                                    b, p, e, tgt, others, rate, g));
    check(cap_lim == (gmin_ref > gcap), "capacity limit flag");
    check(bl_lim == (gmin_ref > p + b && p + b < gcap), "backlog limit flag");
    if (gmin_ref > gcap) begin
      n_cap++;
      if (others > 0 && gmin_ref <= T) n_share++;
    end
    else if (gmin_ref > p + b) n_bl++;
    else n_min++;
    repeat ($urandom_range(3)) @(negedge clk);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    one_case(0, 0, 0, 1, 0);             // idle
    one_case(30, 60, 0, 1, 0);           // plain
    one_case(4000, 100, 20, 255, 0);     // capacity limited
    one_case(10, 40, 60, 1, 0);          // backlog bound
    one_case(0, 50, -80, 7, 0);          // negative numerator
    one_case(200, 60, -10, 23, 0);
    one_case(30, 60, 0, 1, 50);          // capacity taken by another class
    one_case(30, 60, 0, 1, 200);         // no capacity left
    for (int i = 0; i < 300; i++)
      one_case($urandom_range(400), $urandom_range(130), int'($urandom_range(160)) - 80,
               $urandom_range(1, 255), ($urandom_range(1) == 0) ? 0 : $urandom_range(140));
    check(n_cap > 0 && n_bl > 0 && n_min > 0 && n_share > 0,
          "capacity, shared capacity, backlog and delay bound cases all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
