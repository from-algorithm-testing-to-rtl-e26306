// sova_ram_control: supervision of the register-exchange memories ("RAM control").
//
// The hard and soft value registers of the decoder are written once per trellis
// step. This block turns the step and frame-start inputs into the controls those
// registers share: a clear at frame start, a write enable per step, the read
// address (the state that held the largest path metric after the last step, whose
// register row carries the decoder output) and an output-valid flag that rises once
// the registers have been filled over the whole truncation path length, i.e. once
// the oldest register column holds a decision of the current frame.
//
// Which signals the control unit produces is this design's choice; the design
// only states that the registers are supervised by this unit.
//
// Timing: clr and upd_en are combinational (start, and in_valid without start).
// rd_state and out_valid are registered and change on the same edge as the
// registers they supervise; out_valid is high after the TRUNC_LEN-th step of a
// frame and stays high until the next start. Reset: asynchronous, active low.
module sova_ram_control
  import sova_pkg::*;
#(
  parameter int unsigned DEPTH = TRUNC_LEN
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   in_valid,
  input  state_t best_state,
  output logic   clr,
  output logic   upd_en,
  output state_t rd_state,
  output logic   out_valid
);

  localparam int unsigned W_CNT = $clog2(DEPTH + 1);

  logic [W_CNT-1:0] fill;

  assign clr    = start;
  assign upd_en = in_valid && !start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill      <= '0;
      rd_state  <= '0;
      out_valid <= 1'b0;
    end else if (clr) begin
      fill      <= '0;
      rd_state  <= '0;
      out_valid <= 1'b0;
    end else if (upd_en) begin
      rd_state <= best_state;
      if (fill != W_CNT'(DEPTH)) fill <= fill + 1'b1;
      out_valid <= (fill >= W_CNT'(DEPTH - 1));
    end
  end

endmodule
