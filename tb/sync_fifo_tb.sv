// sync_fifo_tb: random writes and reads against a queue model.
// Uses a 4-bit count (15 usable words) so that full, overflow and empty
// are reached often. Checks read data order, the read latency of one
// cycle, the fill count, the flags and that writes into a full buffer
// are dropped.
module sync_fifo_tb;
  localparam int CW = 4;
  logic clk = 0, rst = 1;
  logic wen = 0, ren = 0;
  logic [31:0] wdt = '0, rddt;
  logic rvalid, empty, full, overflow;
  logic [CW-1:0] count;
  int checks = 0, failures = 0;
  int n_full = 0, n_ovf = 0, n_empty_rd = 0;

  sync_fifo #(.DATA_W(32), .CNT_W(CW)) dut (
    .clk, .rst, .wen, .wdt, .ren, .rddt, .rvalid, .count, .empty, .full, .overflow
  );

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

  logic [31:0] model[$];
  logic [31:0] expect_rd;
  bit          expect_valid = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int i = 0; i < 20000; i++) begin
      // bias phases: fill for a while, then drain
      int wprob = ((i / 500) % 2) ? 30 : 70;
      wen = ($urandom_range(99) < wprob);
      ren = ($urandom_range(99) < 50);
      wdt = $urandom;
      #1;
      // check outputs of this cycle against the model
      check(count == CW'(model.size()), $sformatf("count %0d vs %0d", count, model.size()));
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == 2**CW - 1), "full flag");
      check(overflow == (wen && model.size() == 2**CW - 1), "overflow flag");
      check(rvalid == expect_valid, "rvalid one cycle after a read");
      if (expect_valid) check(rddt == expect_rd, $sformatf("read data %h vs %h", rddt, expect_rd));
      if (full) n_full++;
      if (overflow) n_ovf++;
      if (ren && empty) n_empty_rd++;
      @(posedge clk);
      // update the model with what the buffer accepted at this edge
      expect_valid = ren && model.size() > 0;
      if (expect_valid) expect_rd = model.pop_front();
      if (wen && model.size() + (expect_valid ? 1 : 0) < 2**CW - 1)
        model.push_back(wdt);
      @(negedge clk);
    end
    check(n_full > 0 && n_ovf > 0 && n_empty_rd > 0, "full, overflow and empty reads exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
