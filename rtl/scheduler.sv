// scheduler: serves the class buffers at their service rates over one
// output link of one unit per tick.
//
// Each class c has a rate accumulator that adds rate[c] (units per slot)
// on every tick; each time it passes T_SLOT one service credit is earned,
// so a class earns exactly rate[c] credits in any T_SLOT consecutive ticks,
// evenly spread. Earned credits wait in a small per-class counter. On each
// tick the link serves one unit: of the classes holding a credit and a
// non-empty buffer, the highest-numbered one (class c+1 is the better
// class) gets ren[c] and spends a credit. A class whose buffer is empty
// loses its waiting credits (idle_credit[c] pulses), so it never bursts
// above its rate to catch up. With the rates summing to at most T_SLOT, as
// the rate control ensures, the credits waiting stay bounded; the counter
// saturates at 2**PEND_W - 1 otherwise.
// The document names the scheduler and lets it serve the class buffers at
// the adjusted rates; the credit accumulator and the fixed priority among
// classes are this design's choices. With one class a credit is served on
// the tick it is earned.
// Interface: per-class rates as an array, per-class flags as bit vectors
// indexed by class. Timing: ren is combinational, high during a tick cycle.
module scheduler
  import add_pkg::*;
#(
  parameter int unsigned NUM_CLASSES = 1,
  parameter int unsigned T_SLOT      = 125,
  parameter int unsigned PEND_W      = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              tick,
  input  logic [RATE_W-1:0] rate        [NUM_CLASSES],
  input  logic [NUM_CLASSES-1:0] empty,
  output logic [NUM_CLASSES-1:0] ren,
  output logic [NUM_CLASSES-1:0] idle_credit,
  output logic              collision
);
  logic [RATE_W-1:0] acc      [NUM_CLASSES];
  logic [RATE_W:0]   acc_next [NUM_CLASSES];
  logic [PEND_W-1:0] pend     [NUM_CLASSES];
  logic [NUM_CLASSES-1:0] earn, want;
  logic              granted;
  int unsigned       n_want;

  always_comb begin
    granted = 1'b0;
    n_want  = 0;
    for (int c = int'(NUM_CLASSES) - 1; c >= 0; c--) begin
      acc_next[c]    = {1'b0, acc[c]} + {1'b0, rate[c]};
      earn[c]        = tick && (acc_next[c] >= (RATE_W+1)'(T_SLOT));
      want[c]        = tick && !empty[c] && (earn[c] || pend[c] != '0);
      idle_credit[c] = tick && empty[c] && (earn[c] || pend[c] != '0);
      ren[c]         = want[c] && !granted;
      if (want[c]) n_want++;
      if (ren[c]) granted = 1'b1;
    end
    collision = n_want > 1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < int'(NUM_CLASSES); c++) begin
        acc[c]  <= '0;
        pend[c] <= '0;
      end
    end else if (tick) begin
      for (int c = 0; c < int'(NUM_CLASSES); c++) begin
        acc[c] <= earn[c] ? RATE_W'(acc_next[c] - (RATE_W+1)'(T_SLOT))
                          : acc_next[c][RATE_W-1:0];
        if (empty[c])
          pend[c] <= '0;
        else if (earn[c] && !ren[c] && pend[c] != '1)
          pend[c] <= pend[c] + 1'b1;
        else if (!earn[c] && ren[c])
          pend[c] <= pend[c] - 1'b1;
      end
    end
  end

  // at most one unit per tick leaves on the link
  a_one_grant: assert property (@(posedge clk) disable iff (rst)
                                $onehot0(ren));
endmodule
