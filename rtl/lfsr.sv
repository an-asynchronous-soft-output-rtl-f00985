// lfsr: pseudo-random bit source of the test chip.
//
// A W-bit Fibonacci linear feedback shift register; with the default W = 7
// it uses the maximal-length polynomial x^7 + x^6 + 1 (period 127). bit_o
// is the register's MSB and is the current bit; `step` shifts in the
// feedback. Reset loads all ones. The specification names the block only;
// width, polynomial and seed are this design's choice.
module lfsr #(
  parameter int W = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  output logic bit_o
);
  logic [W-1:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    r <= '1;
    else if (step) r <= {r[W-2:0], r[W-1] ^ r[W-2]};
  end

  assign bit_o = r[W-1];
endmodule
