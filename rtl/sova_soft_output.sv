// sova_soft_output: extrinsic information output ("Soft output").
//
// Turns the reliability of the decoded bit into a signed log-likelihood ratio
// (positive for a decoded 1), subtracts the delayed input X+E of the same trellis
// step, and saturates the result to the 4-bit two's complement output word, so the
// next decoder receives only the information this decoder added. The path metrics
// are built so that a metric difference is already in the units of X+E (see
// sova_acs), so no scaling is applied; the saturation at -8 / +7 is where the
// 4-bit output produces its many "sure" values. The subtraction and the 4-bit
// output follow the design; sign convention, no scaling and saturation are this
// implementation's choices. Purely combinational.
module sova_soft_output
  import sova_pkg::*;
(
  input  logic                    dec_bit,
  input  soft_t                   soft_mag,
  input  logic signed [W_XE-1:0]  xe_del,
  output logic signed [W_OUT-1:0] ext
);

  localparam int unsigned W_L = W_INT + 2;
  typedef logic signed [W_L-1:0] llr_t;

  localparam llr_t EXT_MAX = llr_t'(2 ** (W_OUT - 1) - 1);
  localparam llr_t EXT_MIN = llr_t'(-(2 ** (W_OUT - 1)));

  llr_t llr, e;

  always_comb begin
    llr = dec_bit ? llr_t'({1'b0, soft_mag}) : -llr_t'({1'b0, soft_mag});
    e   = llr - llr_t'(xe_del);
    if (e > EXT_MAX)      ext = EXT_MAX[W_OUT-1:0];
    else if (e < EXT_MIN) ext = EXT_MIN[W_OUT-1:0];
    else                  ext = e[W_OUT-1:0];
  end

endmodule
