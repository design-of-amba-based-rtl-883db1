// sync2 -- double stage synchronizer.
//
// Brings a single-bit level signal that is launched from a flip-flop in
// another clock domain into the domain of `clk`: two flip-flops in series,
// both on `clk`, the first of which may go metastable and is given a full
// clock period to settle before the second samples it. The output follows the
// input two to three `clk` edges after the input changes.
//
// The bridge uses three of these, as its description lays out: one each for
// PENDWR and PENDRD into the PCLK domain and one for PDONE into the HCLK
// domain. The asynchronous active-low reset clearing both stages is this
// design's choice. The input must come straight from a flip-flop (no logic in
// front of it), and only level signals that stay put until acknowledged may
// pass through it.
module sync2 #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,      // asynchronous input, from a flip-flop in another domain
  output logic q       // synchronized copy
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
