// sova_acs: add-compare-select unit of the SOVA decoder (the "ACS-Unit").
//
// For every trellis step it weights the received parity symbol Y with the channel
// state estimate SNR, forms the branch metrics of the 32 trellis branches from the
// parity and from the systematic-plus-extrinsic value X+E, adds them to the 16 path
// metrics, and keeps for each state the larger of its two candidates. Alongside it
// delivers per state the hard value (information bit of the surviving branch) and
// the metric difference delta between survivor and competitor. To keep the 10-bit
// path metrics from overflowing, the maximum of the 16 new metrics is subtracted
// from all of them, so the best state always holds 0 and the others are negative;
// metrics that fall below the most negative 10-bit value are clipped. The unit also
// reports which state holds that maximum (lowest index on a tie).
//
// Branch metric (this design's choice, equivalent to the usual correlation metric
// 1/2*(u*(X+E) + p*Lc*Y) with u,p in {-1,+1} up to a per-step constant):
//     bm = (u ? X+E : 0) + (p ? (SNR*Y) >>> 2 : 0)
// so SNR is an unsigned weight with two fractional bits (4 = 1.0) and a metric
// difference is directly a log-likelihood ratio in the units of X+E.
//
// Interface: hard/delta/best_state are combinational functions of the inputs and
// the current path metrics; the path metrics update on a clock edge with in_valid
// high. start (synchronous) reloads the metrics for an encoder starting in state 0
// (state 0 = 0, others = most negative value) and takes priority over in_valid.
// Reset: active-low asynchronous rst_n, same initial metrics as start.
module sova_acs
  import sova_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     in_valid,
  input  logic        [W_SNR-1:0]  snr,
  input  logic signed [W_Y-1:0]    y,
  input  logic signed [W_XE-1:0]   xe,
  output logic        [N_STATES-1:0] hard,
  output soft_t                    delta [N_STATES],
  output state_t                   best_state
);

  localparam int unsigned W_CAND = W_INT + 2;
  typedef logic signed [W_CAND-1:0] cand_t;

  metric_t pm   [N_STATES];
  metric_t pm_n [N_STATES];

  // Parity symbol weighted with the channel state estimate.
  logic signed [W_SNR+W_Y:0] y_prod;
  bm_t                       y_w;
  assign y_prod = $signed({1'b0, snr}) * y;
  assign y_w    = bm_t'(y_prod >>> SNR_FRAC);

  function automatic bm_t branch_metric(input logic u, input logic p,
                                        input logic signed [W_XE-1:0] xe_v,
                                        input bm_t yw_v);
    bm_t m;
    m = '0;
    if (u) m = m + bm_t'(xe_v);
    if (p) m = m + yw_v;
    return m;
  endfunction

  cand_t sel [N_STATES];
  cand_t cmax;

  always_comb begin
    for (int s = 0; s < N_STATES; s++) begin
      cand_t c0, c1, d;
      state_t sn;
      sn = state_t'(s);
      c0 = cand_t'(pm[pred_state(sn, 1'b0)])
         + cand_t'(branch_metric(branch_info(sn, 1'b0), branch_parity(sn, 1'b0), xe, y_w));
      c1 = cand_t'(pm[pred_state(sn, 1'b1)])
         + cand_t'(branch_metric(branch_info(sn, 1'b1), branch_parity(sn, 1'b1), xe, y_w));
      if (c1 > c0) begin
        sel[s]  = c1;
        hard[s] = branch_info(sn, 1'b1);
        d       = c1 - c0;
      end else begin
        sel[s]  = c0;
        hard[s] = branch_info(sn, 1'b0);
        d       = c0 - c1;
      end
      delta[s] = (d > cand_t'(SOFT_MAX)) ? SOFT_MAX : soft_t'(d);
    end
  end

  // Maximum of the new metrics and the state that holds it.
  always_comb begin
    cmax       = sel[0];
    best_state = '0;
    for (int s = 1; s < N_STATES; s++) begin
      if (sel[s] > cmax) begin
        cmax       = sel[s];
        best_state = state_t'(s);
      end
    end
  end

  // Normalisation: subtract the maximum, clip at the most negative value.
  always_comb begin
    for (int s = 0; s < N_STATES; s++) begin
      cand_t n;
      n = sel[s] - cmax;
      pm_n[s] = (n < cand_t'(METRIC_MIN)) ? METRIC_MIN : metric_t'(n);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_STATES; s++) pm[s] <= (s == 0) ? metric_t'(0) : METRIC_MIN;
    end else if (start) begin
      for (int s = 0; s < N_STATES; s++) pm[s] <= (s == 0) ? metric_t'(0) : METRIC_MIN;
    end else if (in_valid) begin
      pm <= pm_n;
    end
  end

endmodule
