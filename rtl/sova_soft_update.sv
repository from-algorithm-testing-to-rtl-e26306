// sova_soft_update: register-exchange management of the soft values
// ("Soft Updates").
//
// Each of the 16 states owns DEPTH reliability values of W_INT bits, running in
// parallel with its hard-decision register (same index = same trellis step). On
// every trellis step state s takes over the values of its surviving predecessor,
// shifted by one, and its own metric difference delta enters at index 0. Every
// older value is then updated: where the hard decision of the survivor history and
// that of the competing history (the register of the other predecessor) differ,
// the value becomes the minimum of the old value and delta; otherwise it is kept.
// This is the soft output Viterbi update done for all states at once, in parallel
// with the hard value update, so it adds no latency beyond the truncation path.
// The reliability of the decoded bit is the oldest value of the row selected by
// the read state.
//
// Shortened soft management: once all survivor histories have merged, the soft
// values no longer change, so the soft registers may be shorter than the
// truncation path. With SOFT_DEPTH < DEPTH only SOFT_DEPTH values per state are
// kept; the oldest value of the best row is then passed through a plain delay of
// DEPTH-SOFT_DEPTH steps so that it still leaves together with its decoded bit.
// This saves 16*(DEPTH-SOFT_DEPTH) words for a delay of DEPTH-SOFT_DEPTH words.
// The default keeps the full length (SOFT_DEPTH = DEPTH), the worst case.
//
// Interface: hard, delta and the hard-register array (before the step) are
// inputs; soft_mag is a combinational read of the registers after the step
// (for SOFT_DEPTH < DEPTH, the output of the delay registers).
// clr loads every value with the largest value (no competitor seen yet).
module sova_soft_update
  import sova_pkg::*;
#(
  parameter int unsigned DEPTH      = TRUNC_LEN,
  parameter int unsigned SOFT_DEPTH = DEPTH
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic                  upd_en,
  input  logic [N_STATES-1:0]   hard,
  input  soft_t                 delta [N_STATES],
  input  logic [DEPTH-1:0]      hregs [N_STATES],
  input  state_t                rd_state,
  output soft_t                 soft_mag
);

  // Kept as packed vectors so that the array is plain flip-flops, not a memory.
  logic [N_STATES-1:0][SOFT_DEPTH-1:0][W_INT-1:0] sregs, sregs_n;

  // Both predecessors of a state are fixed by the trellis; only the choice
  // between them depends on the hard value, so each new entry is a 2:1 mux
  // followed by the conditional minimum.
  for (genvar s = 0; s < N_STATES; s++) begin : g_state
    localparam state_t P0 = pred_state(state_t'(s), 1'b0);
    localparam state_t P1 = pred_state(state_t'(s), 1'b1);
    logic b;
    assign b = surv_sel(state_t'(s), hard[s]);
    assign sregs_n[s][0] = delta[s];
    for (genvar j = 1; j < SOFT_DEPTH; j++) begin : g_col
      soft_t old_v;
      logic  differ;
      assign old_v  = b ? sregs[P1][j-1] : sregs[P0][j-1];
      assign differ = hregs[P0][j-1] ^ hregs[P1][j-1];
      assign sregs_n[s][j] = (differ && (delta[s] < old_v)) ? delta[s] : old_v;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sregs <= '1;
    end else if (clr) begin
      sregs <= '1;
    end else if (upd_en) begin
      sregs <= sregs_n;
    end
  end

  if (SOFT_DEPTH < DEPTH) begin : g_short
    // Oldest soft value of the best row, taken one step later than it was
    // written (when the next step arrives) and delayed DEPTH-SOFT_DEPTH-1 more
    // steps, so it lines up with dec_bit.
    soft_t tail [DEPTH-SOFT_DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH - SOFT_DEPTH; i++) tail[i] <= SOFT_MAX;
      end else if (clr) begin
        for (int i = 0; i < DEPTH - SOFT_DEPTH; i++) tail[i] <= SOFT_MAX;
      end else if (upd_en) begin
        tail[0] <= sregs[rd_state][SOFT_DEPTH-1];
        for (int i = 1; i < DEPTH - SOFT_DEPTH; i++) tail[i] <= tail[i-1];
      end
    end
    assign soft_mag = tail[DEPTH-SOFT_DEPTH-1];
  end else begin : g_full
    assign soft_mag = sregs[rd_state][DEPTH-1];
  end

  if (SOFT_DEPTH > DEPTH) begin : g_bad_depth
    $error("SOFT_DEPTH must not exceed DEPTH");
  end

endmodule
