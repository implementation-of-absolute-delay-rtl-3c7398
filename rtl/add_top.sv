// add_top: absolute delay differentiation circuit.
//
// The circuit keeps the queueing delay of each class buffer under a target
// set by the host CPU. Time is cut into slots of T_SLOT ticks. At the end
// of every slot the arrivals of the slot are measured, the arrivals of the
// next slot are predicted by a weighted moving average, and the service
// rate of the next slot is set to the lowest rate that keeps the predicted
// worst-case delay under the target, with the error of the last prediction
// added back in. A scheduler then reads the buffers at those rates over one
// link of one unit per tick, and every served unit's delay is measured.
//
// Blocks (names as in the document's block diagram), per class c:
//   fifo_write           ON/OFF traffic source, words = arrival time stamps
//   sync_fifo            class buffer, 12-bit fill count
//   traffic_measure      arrivals per slot (COUNT, VALID)
//   traffic_predict      predicted arrivals and prediction error
//   service_rate_control service rate per slot; the classes share the link
//                        capacity through their minimum rates
//   performance_measure  DELAY_SUM / DELAY_CNT between start and stop
// and shared by all classes:
//   clock_divide         50 MHz clk -> 12.5 MHz tick (one byte per tick)
//   scheduler            rate-paced reads, one unit per tick on the link
//   cpu_interface        host bus: targets, start/stop, results
// NUM_CLASSES = 1, the default, is the single-FIFO circuit; more classes
// give the multi-class node of the same algorithm, each class with its own
// source (they stand in for a classifier, whose rule is not given).
// The sources run while a measurement is open (between the start and stop
// written by the CPU); the scheduler keeps serving after a stop, so the
// buffers drain. delay_sum[c] and delay_cnt[c] are brought out as pins
// (31 bits each), as are ext_start / ext_stop. The average delay of class c
// in microseconds is delay_sum[c] / delay_cnt[c] / 12.5.
// All core logic is on clk (advancing on tick); the CPU bus is on cpu_clk.
// rst is synchronous and active high in both domains; hold it for a few
// cycles of both clocks.
module add_top
  import add_pkg::*;
#(
  parameter int unsigned NUM_CLASSES = 1,
  parameter int unsigned CLK_DIV     = 4,
  parameter int unsigned T_SLOT      = 125,
  parameter int unsigned PRED_N      = 5,
  parameter int unsigned RHO_NUM     = 9,
  parameter int unsigned RHO_DEN     = 10,
  parameter int unsigned FIFO_CNT    = FIFO_CNT_W,
  parameter int unsigned SRC_ON_W    = 2,
  parameter int unsigned SRC_OFF_W   = 2
) (
  input  logic             clk,        // 50 MHz
  input  logic             rst,
  // host CPU bus
  input  logic             cpu_clk,
  input  logic             cs,
  input  logic             rw,
  input  logic [2:0]       addr,
  input  logic [7:0]       data_i,
  output logic [7:0]       data_o,
  output logic             data_oe,
  output logic             ta_n,
  // run markers and results, per class
  output logic             ext_start,
  output logic             ext_stop,
  output logic [DLY_W-1:0] delay_sum [NUM_CLASSES],
  output logic [DLY_W-1:0] delay_cnt [NUM_CLASSES]
);
  localparam int unsigned K = NUM_CLASSES;

  logic                    tick, clk_div;
  logic                    start, stop, ovf_seen;
  logic [K-1:0]            measuring, overflow, empty, full, ren, rvalid;
  logic [K-1:0]            idle_credit, wen, meas_valid, pred_valid;
  logic [K-1:0]            gmin_valid, rate_upd, cap_lim, bl_lim;
  logic                    collision;
  logic [7:0]              target_us  [K];
  logic [TS_W-1:0]         wdt        [K];
  logic [TS_W-1:0]         rddt       [K];
  logic [TS_W-1:0]         now        [K];
  logic [FIFO_CNT-1:0]     backlog    [K];
  logic [COUNT_W-1:0]      meas_count [K];
  logic [COUNT_W-1:0]      pred_count [K];
  logic signed [COUNT_W:0] pred_err   [K];
  logic [RATE_W-1:0]       rate       [K];
  logic [RATE_W-1:0]       gmin       [K];
  logic [RATE_W-1:0]       others     [K];

  clock_divide #(.DIV(CLK_DIV)) u_clock_divide (
    .clk, .rst, .clk_div, .tick
  );

  cpu_interface #(.NUM_CLASSES(K)) u_cpu_interface (
    .cpu_clk, .rst, .cs, .rw, .addr, .data_i, .data_o, .data_oe, .ta_n,
    .clk, .start, .stop, .target_us, .ext_start, .ext_stop,
    .measuring(measuring[0]), .ovf_seen, .delay_sum, .delay_cnt
  );

  for (genvar c = 0; c < K; c++) begin : g_class
    fifo_write #(
      .ON_W(SRC_ON_W), .OFF_W(SRC_OFF_W),
      .SEED(32'h1ACE_B00C ^ (32'(c) * 32'h9E37_79B9))
    ) u_fifo_write (
      .clk, .rst, .tick, .en(measuring[c]), .wen(wen[c]), .wdt(wdt[c]),
      .now(now[c])
    );

    sync_fifo #(.DATA_W(TS_W), .CNT_W(FIFO_CNT)) u_fifo (
      .clk, .rst, .wen(wen[c]), .wdt(wdt[c]), .ren(ren[c]), .rddt(rddt[c]),
      .rvalid(rvalid[c]), .count(backlog[c]), .empty(empty[c]),
      .full(full[c]), .overflow(overflow[c])
    );

    traffic_measure #(.T_SLOT(T_SLOT)) u_traffic_measure (
      .clk, .rst, .tick, .arrive(wen[c]), .count(meas_count[c]),
      .valid(meas_valid[c])
    );

    traffic_predict #(.N(PRED_N), .RHO_NUM(RHO_NUM), .RHO_DEN(RHO_DEN))
    u_traffic_predict (
      .clk, .rst, .in_valid(meas_valid[c]), .in_count(meas_count[c]),
      .pred(pred_count[c]), .err(pred_err[c]), .valid(pred_valid[c])
    );

    service_rate_control #(.T_SLOT(T_SLOT), .BL_W(FIFO_CNT))
    u_service_rate_control (
      .clk, .rst, .target_us(target_us[c]),
      .in_valid(pred_valid[c]), .pred(pred_count[c]), .err(pred_err[c]),
      .backlog(backlog[c]), .others_gmin(others[c]),
      .gmin(gmin[c]), .gmin_valid(gmin_valid[c]), .rate(rate[c]),
      .upd(rate_upd[c]), .cap_lim(cap_lim[c]), .bl_lim(bl_lim[c])
    );

    performance_measure u_performance_measure (
      .clk, .rst, .start, .stop, .rvalid(rvalid[c]), .rddt(rddt[c]),
      .now(now[c]), .delay_sum(delay_sum[c]), .delay_cnt(delay_cnt[c]),
      .measuring(measuring[c])
    );
  end

  // eq. (18): capacity left to class c is C*T minus the other classes'
  // minimum rates; the sum saturates at the rate width
  always_comb begin
    logic [RATE_W+7:0] total;
    logic [RATE_W+7:0] rest;
    total = '0;
    for (int c = 0; c < int'(K); c++) total += (RATE_W+8)'(gmin[c]);
    for (int c = 0; c < int'(K); c++) begin
      rest      = total - (RATE_W+8)'(gmin[c]);
      others[c] = (rest > (RATE_W+8)'({RATE_W{1'b1}})) ? '1 : rest[RATE_W-1:0];
    end
  end

  scheduler #(.NUM_CLASSES(K), .T_SLOT(T_SLOT)) u_scheduler (
    .clk, .rst, .tick, .rate, .empty, .ren, .idle_credit, .collision
  );

  // sticky overflow flag for the CPU, cleared by a new start
  always_ff @(posedge clk) begin
    if (rst || start) ovf_seen <= 1'b0;
    else if (|overflow) ovf_seen <= 1'b1;
  end
endmodule
