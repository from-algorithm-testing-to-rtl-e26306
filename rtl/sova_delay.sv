// sova_delay: delay line for the systematic-plus-extrinsic input ("Delay").
//
// The soft output unit subtracts the decoder's own input X+E from the
// reliability of the decoded bit so that the extrinsic information it passes on
// stays uncorrelated with the received values. This block holds the X+E value of
// every trellis step until the decision for that step leaves the register
// exchange: a shift register of DEPTH words that advances once per step, so the
// value written at step k is at the output after step k+DEPTH-1, in step with the
// decoded bit. Delaying and subtracting the input follows the design; the plain
// shift register is this implementation's choice. Interface: din is sampled with en; dout is registered. clr zeroes it.
module sova_delay
  import sova_pkg::*;
#(
  parameter int unsigned DEPTH = TRUNC_LEN,
  parameter int unsigned WIDTH = W_XE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] line [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) line[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < DEPTH; i++) line[i] <= '0;
    end else if (en) begin
      line[0] <= din;
      for (int i = 1; i < DEPTH; i++) line[i] <= line[i-1];
    end
  end

  assign dout = line[DEPTH-1];

endmodule
