// seq_divider: unsigned restoring divider, one quotient bit per clk cycle.
//
// start (one cycle, ignored while busy) loads dividend and divisor; after
// DW cycles done pulses for one cycle with quotient and remainder valid,
// held until the next start. A zero divisor gives an all-ones quotient.
// Used by the service rate control, which divides once per time slot and
// so has hundreds of cycles to spare.
module seq_divider #(
  parameter int unsigned DW = 50,  // dividend / quotient width
  parameter int unsigned VW = 20   // divisor / remainder width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [VW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] quotient,
  output logic [VW-1:0] remainder
);
  localparam int unsigned CW = $clog2(DW + 1);

  logic [CW-1:0] steps;
  logic [VW-1:0] dvs;
  logic [VW:0]   trial;

  // shift the next dividend bit into the partial remainder and try
  assign trial = {remainder, quotient[DW-1]} - {1'b0, dvs};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      steps     <= '0;
      dvs       <= '0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy      <= 1'b1;
        steps     <= CW'(DW);
        dvs       <= divisor;
        quotient  <= dividend;
        remainder <= '0;
      end else if (busy) begin
        if (trial[VW]) begin         // negative: keep remainder, bit = 0
          remainder <= {remainder[VW-2:0], quotient[DW-1]};
          quotient  <= {quotient[DW-2:0], 1'b0};
        end else begin
          remainder <= trial[VW-1:0];
          quotient  <= {quotient[DW-2:0], 1'b1};
        end
        steps <= steps - 1'b1;
        if (steps == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
