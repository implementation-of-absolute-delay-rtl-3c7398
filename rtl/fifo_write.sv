// fifo_write: traffic source of the test circuit.
//
// The document's FIFO Write part generates the Ethernet data and inserts it
// into the FIFO. Here each FIFO entry stands for one byte of the stream and
// carries its arrival time: a free-running 32-bit tick counter (now) is
// written as the FIFO word, so the delay of the byte can be measured when
// it is served. How the traffic is shaped is not given; this design uses an
// ON/OFF source driven by a 32-bit Galois LFSR:
//   ON  burst : 1 .. 2**ON_W bytes, one byte per tick (link rate, 100 Mb/s)
//   OFF gap   : 1 .. 2**OFF_W idle ticks
// so the offered load is (2**ON_W+1) / (2**ON_W + 2**OFF_W + 2), one half
// with the defaults. New bursts start only while en is high; when en falls
// the burst in progress is completed and the source then stays idle.
// Interface: wen is a one-clk-cycle pulse on a tick; wdt is valid with it.
// now counts ticks from reset and is shared with the delay measurement.
module fifo_write
  import add_pkg::*;
#(
  parameter int unsigned ON_W  = 4,
  parameter int unsigned OFF_W = 4,
  parameter logic [31:0] SEED  = 32'h1ACE_B00C
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            tick,
  input  logic            en,
  output logic            wen,
  output logic [TS_W-1:0] wdt,
  output logic [TS_W-1:0] now
);
  typedef enum logic {S_OFF, S_ON} src_state_e;

  src_state_e  state;
  logic [31:0] lfsr;
  logic [31:0] left;   // ticks remaining in the current ON or OFF period

  // Galois LFSR, taps 32,22,2,1 (maximal length)
  function automatic logic [31:0] lfsr_step(input logic [31:0] s);
    return {1'b0, s[31:1]} ^ (s[0] ? 32'h8020_0003 : 32'h0);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_OFF;
      lfsr  <= (SEED == 32'h0) ? 32'h1 : SEED;
      left  <= '0;
      now   <= '0;
    end else if (tick) begin
      now  <= now + 1'b1;
      lfsr <= lfsr_step(lfsr);
      if (left != 0) begin
        left <= left - 1'b1;
      end else if (!en) begin
        state <= S_OFF;
      end else if (state == S_OFF) begin
        // start a burst: this tick carries its first byte
        state <= S_ON;
        left  <= 32'(lfsr[ON_W-1:0]);
      end else begin
        state <= S_OFF;
        left  <= 32'(lfsr[OFF_W+7:8]);
      end
    end
  end

  // a byte is written on every tick of a burst, including its first
  always_comb begin
    wen = 1'b0;
    if (tick) begin
      if (left != 0) wen = (state == S_ON);
      else           wen = en && (state == S_OFF);
    end
  end

  assign wdt = now;
endmodule
