// traffic_predict: predicts the arrivals of the next slot and the error of
// the last prediction.
//
// When the measured arrivals lambda(n-1) of the slot just ended arrive
// (in_valid), the prediction for slot n is the weighted moving average of
// the document:
//   pred(n) = (1 - rho) * sum_{k=n-N+1}^{n-2} lambda(k) + rho * lambda(n-1)
// with rho = RHO_NUM / RHO_DEN = 0.9 and N = 5, as in the document (the
// sum then spans the three slots before the last one; its weights add up to
// 1 + (N-3)(1-rho), which makes the prediction lean high). The division by
// RHO_DEN is rounded up. At the same time the block gives the prediction
// error of the slot just ended, err = lambda(n-1) - pred(n-1), the deviation
// that the rate control adds back in the next slot.
// All counts are per slot (rate times T). History and previous prediction
// start at zero after reset. Timing: pred, err and valid are registered,
// valid high one clk cycle after in_valid. pred saturates at its width.
module traffic_predict
  import add_pkg::*;
#(
  parameter int unsigned N       = 5,
  parameter int unsigned RHO_NUM = 9,
  parameter int unsigned RHO_DEN = 10
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  logic [COUNT_W-1:0]        in_count,
  output logic [COUNT_W-1:0]        pred,
  output logic signed [COUNT_W:0]   err,
  output logic                      valid
);
  localparam int unsigned HN  = (N > 2) ? N - 2 : 1;  // older slots kept
  localparam int unsigned ACC_W = COUNT_W + 12;

  logic [COUNT_W-1:0] hist [HN];   // hist[0] = lambda(n-2), ...
  logic [ACC_W-1:0]   older_sum, wsum, pred_full;
  logic [COUNT_W-1:0] pred_new;

  always_comb begin
    older_sum = '0;
    if (N > 2)
      for (int k = 0; k < int'(HN); k++) older_sum += ACC_W'(hist[k]);
    wsum      = ACC_W'(RHO_DEN - RHO_NUM) * older_sum
              + ACC_W'(RHO_NUM) * ACC_W'(in_count);
    pred_full = (wsum + ACC_W'(RHO_DEN - 1)) / ACC_W'(RHO_DEN);
    pred_new  = (pred_full > ACC_W'({COUNT_W{1'b1}})) ? '1
                                                       : pred_full[COUNT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(HN); k++) hist[k] <= '0;
      pred  <= '0;
      err   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= in_valid;
      if (in_valid) begin
        hist[0] <= in_count;
        for (int k = 1; k < int'(HN); k++) hist[k] <= hist[k-1];
        err  <= $signed({1'b0, in_count}) - $signed({1'b0, pred});
        pred <= pred_new;
      end
    end
  end

  initial assert (N >= 2 && RHO_NUM <= RHO_DEN && RHO_DEN > 0)
    else $error("traffic_predict: bad parameters");
endmodule
