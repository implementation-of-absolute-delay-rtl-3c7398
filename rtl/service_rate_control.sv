// service_rate_control: adaptive service rate of one class buffer.
//
// At every slot boundary (in_valid from the traffic predictor) the block
// takes the backlog B(t_n) (FIFO fill count), the predicted arrivals of the
// next slot P = pred and the prediction error E = err of the slot just
// ended, all in units (bytes) per slot, and derives the service rate G of
// the next slot, also in units per slot (G = gamma * T):
//   Gmin = ceil( T * max(B + P + E, 0) / (D + T - L) )        (delay bound)
//   Gcap = C*T - others_gmin             (capacity left by the other classes)
//   Gmax = min( Gcap, P + B )                       (capacity, backlog)
//   G    = min( Gmin, Gmax )
// with T = T_SLOT ticks, D the target delay in ticks and L the service time
// of one unit (L_TICKS, one tick for a byte at link rate C = 1 unit per
// tick). Gmin is the lower bound of the document's eq. (17), which adds the
// error term E to the prediction; Gcap and Gmax are its eq. (18) and (19):
// others_gmin is the sum of the Gmin of all other classes of the same slot
// (zero with one class), and gmin is brought out for that sum. Serving at
// the lowest rate that meets the target, and falling back to Gmax when
// Gmin exceeds it, are this design's choices: the document allows any rate
// between the two bounds. If D + T - L is not positive (the document's
// condition T > L/C - D fails) the divisor is forced to one.
// The target delay arrives in microseconds (target_us) and is converted to
// ticks as D = floor(target_us * TICKS_PER_US_X2 / 2), 12.5 ticks per us.
// Timing: Gmin takes a sequential divider; gmin is valid from the cycle in
// which gmin_valid pulses (about 52 clk cycles after in_valid) until the
// next in_valid, and the rate is loaded at the end of the next cycle (upd
// then pulses, with cap_lim / bl_lim telling whether capacity or backlog
// limited it). Classes that share the link see their in_valid in the same
// cycle, so their gmin values are valid together.
// The previous rate applies until the new one is loaded.
module service_rate_control
  import add_pkg::*;
#(
  parameter int unsigned T_SLOT          = 125,
  parameter int unsigned L_TICKS         = 1,
  parameter int unsigned TICKS_PER_US_X2 = 25,
  parameter int unsigned BL_W            = FIFO_CNT_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [7:0]              target_us,
  input  logic                    in_valid,
  input  logic [COUNT_W-1:0]      pred,
  input  logic signed [COUNT_W:0] err,
  input  logic [BL_W-1:0]         backlog,
  input  logic [RATE_W-1:0]       others_gmin,
  output logic [RATE_W-1:0]       gmin,
  output logic                    gmin_valid,
  output logic [RATE_W-1:0]       rate,
  output logic                    upd,
  output logic                    cap_lim,
  output logic                    bl_lim
);
  localparam int unsigned NUM_W = COUNT_W + 3;       // B + P + E
  localparam int unsigned TW    = 16;                // T_SLOT width
  localparam int unsigned DW    = NUM_W + TW;        // T * (B + P + E)
  localparam int unsigned VW    = 20;                // D + T - L
  localparam int unsigned SUM_W = COUNT_W + 2;       // P + B

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_LOAD} ctl_state_e;

  ctl_state_e        state;
  logic [SUM_W-1:0]  pb;          // P + B latched at the slot boundary
  logic              div_start, div_busy, div_done;
  logic [DW-1:0]     dividend, quotient;
  logic [VW-1:0]     divisor, remainder;
  logic [VW-1:0]     d_ticks;
  logic signed [VW+1:0] den;
  logic signed [NUM_W-1:0] num;
  logic [DW-1:0]     gmin_w;
  logic [SUM_W-1:0]  gcap, gmax;

  // ---- rate derivation ------------------------------------------------
  always_comb begin
    d_ticks = VW'((32'(target_us) * TICKS_PER_US_X2) >> 1);
    den     = $signed({2'b0, d_ticks}) + (VW+2)'(T_SLOT) - (VW+2)'(L_TICKS);
    divisor = (den > 0) ? den[VW-1:0] : VW'(1);
    num     = $signed(NUM_W'(backlog)) + $signed(NUM_W'(pred))
            + $signed(NUM_W'(err));
    dividend = (num < 0) ? '0
             : DW'(T_SLOT) * DW'(num) + DW'(divisor) - DW'(1);  // rounds up
  end

  assign div_start = (state == S_IDLE) && in_valid;

  seq_divider #(.DW(DW), .VW(VW)) u_div (
    .clk, .rst,
    .start    (div_start),
    .dividend (dividend),
    .divisor  (divisor),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (quotient),
    .remainder(remainder)
  );

  assign gmin_w     = quotient;
  assign gmin       = (gmin_w > DW'({RATE_W{1'b1}})) ? '1 : gmin_w[RATE_W-1:0];
  assign gmin_valid = div_done;
  assign gcap = (SUM_W'(others_gmin) >= SUM_W'(T_SLOT)) ? '0
              : SUM_W'(T_SLOT) - SUM_W'(others_gmin);
  assign gmax = (pb < gcap) ? pb : gcap;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      pb      <= '0;
      rate    <= '0;
      upd     <= 1'b0;
      cap_lim <= 1'b0;
      bl_lim  <= 1'b0;
    end else begin
      upd <= 1'b0;
      case (state)
        S_IDLE: if (in_valid) begin
          pb    <= SUM_W'(pred) + SUM_W'(backlog);
          state <= S_DIV;
        end
        S_DIV: if (div_done) state <= S_LOAD;
        S_LOAD: begin
          if (gmin_w > DW'(gmax)) rate <= RATE_W'(gmax);
          else                    rate <= RATE_W'(gmin_w);
          cap_lim <= gmin_w > DW'(gcap);
          bl_lim  <= (gmin_w > DW'(pb)) && (pb < gcap);
          upd     <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (T_SLOT < 2 ** TW && T_SLOT >= 2)
    else $error("service_rate_control: T_SLOT out of range");
endmodule
