// traffic_measure: measures the arrivals of each time slot.
//
// Time is cut into slots of T_SLOT ticks (the slot interval T of the rate
// adjustment algorithm). The block counts the arrivals (arrive pulses,
// each on a tick) during a slot and restarts from zero after the slot's
// last tick. In the clk cycle after that tick valid is high for one cycle
// and count holds the slot's total (held until the next slot end). count is therefore lambda(n) * T, the measured arrivals of slot n,
// in units (bytes). valid also marks the slot boundary for the blocks
// downstream. An arrival on the last tick of a slot belongs to that slot.
// The slot length is not given for the circuit; T_SLOT = 125 ticks (10 us)
// is this design's choice.
module traffic_measure
  import add_pkg::*;
#(
  parameter int unsigned T_SLOT = 125
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               tick,
  input  logic               arrive,
  output logic [COUNT_W-1:0] count,
  output logic               valid
);
  localparam int unsigned SW = (T_SLOT > 1) ? $clog2(T_SLOT) : 1;

  logic [SW-1:0]      slot_t;   // tick index within the slot
  logic [COUNT_W-1:0] acc;
  logic               last;

  assign last = tick && (slot_t == SW'(T_SLOT - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      slot_t <= '0;
      acc    <= '0;
      count  <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= last;
      if (tick) slot_t <= last ? '0 : slot_t + 1'b1;
      if (last) begin
        count <= acc + COUNT_W'(arrive);
        acc   <= '0;
      end else if (tick && arrive) begin
        acc   <= acc + 1'b1;
      end
    end
  end

  initial assert (T_SLOT >= 2) else $error("T_SLOT must be at least 2");
endmodule
