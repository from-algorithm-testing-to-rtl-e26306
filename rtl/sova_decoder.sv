// sova_decoder: soft-output Viterbi (SOVA) decoder for one component code of a
// turbo decoder (16-state RSC code g = (37, 21)).
//
// Per trellis step it takes the channel state estimate SNR (4 bits), the received
// parity symbol Y (4 bits) and the sum of received systematic symbol and a-priori
// extrinsic information X+E (5 bits), and after the truncation path length it
// delivers the decoded bit and 4 bits of new extrinsic information for the next
// decoder. The blocks are wired as in the decoder's process division:
//
//   ACS unit --hard values (16x1)--> hard update --+--> dec_bit
//            --delta (16x10)-------> soft update <-+ (survivor histories)
//   RAM control supervises both register exchanges (clear, write, read state)
//   X+E --> delay --> soft output <-- soft update       --> ext_info
//
// Path management is register exchange for the hard and the soft values, both
// updated in the same clock cycle, so one step is taken per clock cycle and the
// latency is exactly TRUNC_LEN steps: the outputs for the k-th step of a frame
// are valid (out_valid) after the clock edge of step k+TRUNC_LEN-1. The decoder
// streams: to obtain the last TRUNC_LEN-1 outputs of a frame, feed that many further
// steps (for example zero-valued symbols) before the next start.
//
// SOFT_DEPTH (default DEPTH) optionally shortens the soft value registers; the
// soft values then finish their journey in a single-row delay (see
// sova_soft_update). This trades a little accuracy at low SNR for area.
//
// Interface: start (one cycle, synchronous) begins a frame with the encoder in
// state 0; in_valid marks a step's inputs; a start cycle ignores in_valid.
// rst_n is asynchronous and active low. All inputs and ext_info are two's
// complement except SNR, an unsigned weight with two fractional bits.
module sova_decoder
  import sova_pkg::*;
#(
  parameter int unsigned DEPTH      = TRUNC_LEN,
  parameter int unsigned SOFT_DEPTH = DEPTH
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    in_valid,
  input  logic        [W_SNR-1:0] snr,
  input  logic signed [W_Y-1:0]   y,
  input  logic signed [W_XE-1:0]  xe,
  output logic                    out_valid,
  output logic                    dec_bit,
  output logic signed [W_OUT-1:0] ext_info
);

  logic [N_STATES-1:0] hard;
  soft_t               delta [N_STATES];
  state_t              best_state, rd_state;
  logic                clr, upd_en;
  logic [DEPTH-1:0]    hregs [N_STATES];
  soft_t               soft_mag;
  logic [W_XE-1:0]     xe_del;

  sova_acs u_acs (
    .clk, .rst_n, .start, .in_valid, .snr, .y, .xe,
    .hard, .delta, .best_state
  );

  sova_ram_control #(.DEPTH(DEPTH)) u_ram_ctrl (
    .clk, .rst_n, .start, .in_valid, .best_state,
    .clr, .upd_en, .rd_state, .out_valid
  );

  sova_hard_update #(.DEPTH(DEPTH)) u_hard (
    .clk, .rst_n, .clr, .upd_en, .hard, .rd_state,
    .regs(hregs), .dec_bit
  );

  sova_soft_update #(.DEPTH(DEPTH), .SOFT_DEPTH(SOFT_DEPTH)) u_soft (
    .clk, .rst_n, .clr, .upd_en, .hard, .delta, .hregs, .rd_state, .soft_mag
  );

  sova_delay #(.DEPTH(DEPTH), .WIDTH(W_XE)) u_delay (
    .clk, .rst_n, .clr, .en(upd_en), .din(xe), .dout(xe_del)
  );

  sova_soft_output u_soft_out (
    .dec_bit, .soft_mag, .xe_del(signed'(xe_del)), .ext(ext_info)
  );

endmodule
