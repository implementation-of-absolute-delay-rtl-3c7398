// performance_measure: measures the queueing delay of the served traffic.
//
// Each FIFO word carries the tick at which its unit arrived. When a word
// is read out (rvalid, rddt) the block takes its delay as now - rddt, in
// ticks of the 12.5 MHz clock, adds it to delay_sum and counts it in
// delay_cnt. The average delay in microseconds is then
// delay_sum / delay_cnt / 12.5. A start pulse clears both results and opens
// the measurement; a stop pulse closes it and freezes the results for the
// CPU to read. Both results are 31 bits wide, as in the document's
// diagram, and saturate at all-ones instead of wrapping (this design's
// choice). measuring is high while a measurement is open.
// Timing: results are registered, one clk cycle after rvalid.
module performance_measure
  import add_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic             stop,
  input  logic             rvalid,
  input  logic [TS_W-1:0]  rddt,
  input  logic [TS_W-1:0]  now,
  output logic [DLY_W-1:0] delay_sum,
  output logic [DLY_W-1:0] delay_cnt,
  output logic             measuring
);
  logic [TS_W-1:0] delay;
  logic [DLY_W:0]  sum_next;

  assign delay    = now - rddt;   // modulo 2**32, correct across wrap
  assign sum_next = {1'b0, delay_sum} + (DLY_W+1)'(delay);

  always_ff @(posedge clk) begin
    if (rst) begin
      delay_sum <= '0;
      delay_cnt <= '0;
      measuring <= 1'b0;
    end else if (start) begin
      delay_sum <= '0;
      delay_cnt <= '0;
      measuring <= 1'b1;
    end else begin
      if (stop) measuring <= 1'b0;
      if (measuring && rvalid) begin
        delay_sum <= (sum_next[DLY_W] || delay > TS_W'({DLY_W{1'b1}}))
                     ? '1 : sum_next[DLY_W-1:0];
        if (delay_cnt != '1) delay_cnt <= delay_cnt + 1'b1;
      end
    end
  end
endmodule
