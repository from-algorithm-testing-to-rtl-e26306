// sova_hard_update: register-exchange management of the hard decisions
// ("Hard Updates").
//
// Each of the 16 states owns a DEPTH-bit register holding the information bits of
// its survivor path, newest bit at index 0. On every trellis step the register of
// state s is replaced by the register of its surviving predecessor, shifted by one,
// with the new hard value of s shifted in. The surviving predecessor is recovered
// from the hard value itself (in this code the two branches into a state carry
// opposite information bits), so the ACS unit only has to deliver one bit per
// state. The decoded bit is the oldest bit of the row selected by the read state,
// i.e. the survivor of the best-metric state; it lags the ACS input by exactly
// DEPTH steps (the truncation path length).
//
// Register exchange as the survivor memory, and reading the output from the
// best state, follow the design; recovering the predecessor from the hard value
// and the clear at frame start are this implementation's choices.
//
// The complete register array is brought out because the soft value update
// compares the survivor and competitor histories bit by bit.
//
// Interface: hard/upd_en/clr come from the ACS unit and the RAM control; regs
// and dec_bit are valid after the clock edge of a step (dec_bit is a
// combinational read of the registers). clr zeroes the registers (synchronous).
module sova_hard_update
  import sova_pkg::*;
#(
  parameter int unsigned DEPTH = TRUNC_LEN
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic                  upd_en,
  input  logic [N_STATES-1:0]   hard,
  input  state_t                rd_state,
  output logic [DEPTH-1:0]      regs [N_STATES],
  output logic                  dec_bit
);

  logic [DEPTH-1:0] regs_n [N_STATES];

  always_comb begin
    for (int s = 0; s < N_STATES; s++) begin
      logic [DEPTH-1:0] r0, r1;
      r0 = regs[pred_state(state_t'(s), 1'b0)];
      r1 = regs[pred_state(state_t'(s), 1'b1)];
      regs_n[s] = {(surv_sel(state_t'(s), hard[s]) ? r1[DEPTH-2:0] : r0[DEPTH-2:0]), hard[s]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_STATES; s++) regs[s] <= '0;
    end else if (clr) begin
      for (int s = 0; s < N_STATES; s++) regs[s] <= '0;
    end else if (upd_en) begin
      regs <= regs_n;
    end
  end

  assign dec_bit = regs[rd_state][DEPTH-1];

endmodule
