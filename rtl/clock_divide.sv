// clock_divide: derives the 12.5 MHz byte rate from the 50 MHz board clock.
//
// A free-running counter divides clk by DIV (4: 50 MHz -> 12.5 MHz, so that
// a 100 Mb/s Ethernet stream is handled one byte per divided cycle).
// Two forms of the divided clock are given:
//   clk_div - a square wave (high for the first half of each DIV period),
//             the divided clock itself;
//   tick    - a one-clk-cycle enable pulse once per DIV cycles. The rest of
//             this design stays on clk and advances on tick, which keeps the
//             whole core in one clock domain (this design's choice; the
//             division ratio follows the document).
// Timing: after reset, tick is high in the cycle where the counter is
// DIV-1, i.e. every DIV-th cycle, first on the DIV-th cycle after reset.
module clock_divide #(
  parameter int unsigned DIV = 4
) (
  input  logic clk,
  input  logic rst,      // synchronous, active high
  output logic clk_div,
  output logic tick
);
  localparam int unsigned W = (DIV > 2) ? $clog2(DIV) : 1;

  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      clk_div <= 1'b1;  // high while cnt < DIV/2
    end else begin
      cnt     <= (cnt == W'(DIV - 1)) ? '0 : cnt + 1'b1;
      clk_div <= (cnt == W'(DIV - 1)) || (cnt < W'(DIV / 2 - 1));
    end
  end

  assign tick = (cnt == W'(DIV - 1));

  initial assert (DIV >= 2) else $error("DIV must be at least 2");
endmodule
