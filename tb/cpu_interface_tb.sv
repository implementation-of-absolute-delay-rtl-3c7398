// cpu_interface_tb: drives the CPU bus on its own clock and checks the
// registers and the crossing into the core clock domain.
// Checks: ta_n answers each bus cycle once, one cpu_clk cycle after cs is
// seen; TARGET, CTRL and SEL read back what was written; the target delay
// reaches the core domain; a rising T gives exactly one start pulse and a
// rising P exactly one stop pulse, with ext_start/ext_stop following the
// levels; the result bytes read back DELAY_SUM or DELAY_CNT as selected;
// STATUS reflects measuring and overflow. With three classes the class
// field of SEL picks which class's TARGET is written and read and whose
// results are shown; a class number past the last one selects class 0.
module cpu_interface_tb;
  import add_pkg::*;
  localparam int K = 3;
  logic cpu_clk = 0, clk = 0, rst = 1;
  logic cs = 0, rw = 1;
  logic [2:0] addr = '0;
  logic [7:0] data_i = '0, data_o;
  logic data_oe, ta_n;
  logic start, stop, ext_start, ext_stop;
  logic [7:0] target_us [K];
  logic measuring = 0, ovf_seen = 0;
  logic [30:0] delay_sum [K], delay_cnt [K];
  int checks = 0, failures = 0, n_start = 0, n_stop = 0;

  cpu_interface #(.NUM_CLASSES(K)) dut (
    .cpu_clk, .rst, .cs, .rw, .addr, .data_i, .data_o, .data_oe, .ta_n,
    .clk, .start, .stop, .target_us, .ext_start, .ext_stop,
    .measuring, .ovf_seen, .delay_sum, .delay_cnt
  );

  always #10   clk = ~clk;       // 50 MHz core
  always #12.5 cpu_clk = ~cpu_clk; // 40 MHz bus

  always @(posedge clk) begin
    if (!rst && start) n_start++;
    if (!rst && stop)  n_stop++;
  end

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

  task automatic bus(input bit read, input logic [2:0] a, input logic [7:0] d,
                     output logic [7:0] q);
    int lat = 0;
    @(negedge cpu_clk);
    cs = 1; rw = read; addr = a; data_i = d;
    #1;
    check(data_oe == read, "data_oe during the cycle");
    do begin @(negedge cpu_clk); lat++; end while (ta_n && lat < 20);
    check(lat == 1, $sformatf("ta_n latency %0d", lat));
    q = data_o;
    cs = 0; rw = 1;
    @(negedge cpu_clk);
    check(ta_n, "ta_n for one cycle");
    check(!data_oe, "bus released");
  endtask

  task automatic wr(input logic [2:0] a, input logic [7:0] d);
    logic [7:0] q;
    bus(0, a, d, q);
  endtask

  task automatic rd(input logic [2:0] a, output logic [7:0] q);
    bus(1, a, 8'h00, q);
  endtask

  task automatic wait_core(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    logic [7:0] q;
    logic [30:0] got;
    int cl;
    for (int c = 0; c < K; c++) begin delay_sum[c] = '0; delay_cnt[c] = '0; end
    repeat (4) @(posedge cpu_clk);
    rst = 0;
    wr(REG_TARGET, 8'd87);
    rd(REG_TARGET, q);  check(q == 8'd87, "TARGET readback");
    for (int c = 1; c < K; c++) begin
      wr(REG_SEL, 8'(c << 4));
      rd(REG_SEL, q); check(q == 8'(c << 4), "SEL class readback");
      wr(REG_TARGET, 8'(10 + c));
    end
    for (int c = 0; c < K; c++) begin
      wr(REG_SEL, 8'(c << 4));
      rd(REG_TARGET, q);
      check(q == ((c == 0) ? 8'd87 : 8'(10 + c)), $sformatf("class %0d TARGET readback %0d", c, q));
    end
    wr(REG_SEL, 8'h70);              // no class 7: class 0
    rd(REG_TARGET, q);  check(q == 8'd87, "out-of-range class selects class 0");
    wait_core(5);
    check(target_us[0] == 8'd87, "target delay in the core domain");
    for (int c = 1; c < K; c++)
      check(target_us[c] == 8'(10 + c), $sformatf("class %0d target in the core domain", c));
    check(n_start == 0 && n_stop == 0, "no pulses before CTRL is written");
    wr(REG_CTRL, 8'h01);
    wait_core(6);
    check(n_start == 1 && ext_start && !ext_stop, "one start pulse, ext_start high");
    wr(REG_CTRL, 8'h01);             // T already set: no new pulse
    wait_core(6);
    check(n_start == 1, "no second start while T stays set");
    rd(REG_CTRL, q);  check(q == 8'h01, "CTRL readback");
    wr(REG_CTRL, 8'h03);
    wait_core(6);
    check(n_stop == 1 && n_start == 1 && ext_stop, "one stop pulse, ext_stop high");
    wr(REG_CTRL, 8'h00);
    wait_core(6);
    check(!ext_start && !ext_stop, "re-armed");
    wr(REG_CTRL, 8'h01);
    wait_core(6);
    check(n_start == 2, "start again after re-arming");
    // results
    for (int i = 0; i < 20; i++) begin
      for (int c = 0; c < K; c++) begin
        delay_sum[c] = 31'($urandom);
        delay_cnt[c] = 31'($urandom);
      end
      measuring = i[0];
      ovf_seen  = i[1];
      cl = i % K;
      wait_core(4);
      wr(REG_SEL, 8'(cl << 4));
      rd(REG_SEL, q); check(q == 8'(cl << 4), "SEL readback");
      rd(REG_RES0, q); got[7:0] = q;
      rd(REG_RES1, q); got[15:8] = q;
      rd(REG_RES2, q); got[23:16] = q;
      rd(REG_RES3, q); got[30:24] = q[6:0]; check(!q[7], "bit 31 reads zero");
      check(got == delay_sum[cl], $sformatf("class %0d DELAY_SUM readback %h vs %h", cl, got, delay_sum[cl]));
      wr(REG_SEL, 8'(cl << 4) | 8'h01);
      rd(REG_RES0, q); got[7:0] = q;
      rd(REG_RES1, q); got[15:8] = q;
      rd(REG_RES2, q); got[23:16] = q;
      rd(REG_RES3, q); got[30:24] = q[6:0];
      check(got == delay_cnt[cl], $sformatf("class %0d DELAY_CNT readback %h vs %h", cl, got, delay_cnt[cl]));
      rd(REG_STATUS, q);
      check(q == {6'b0, ovf_seen, measuring}, "STATUS");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
