// c_element: Muller C-element, the state-holding join of self-timed control.
//
// The output takes the value of the inputs when both agree and holds its
// value while they differ. Here it is a clocked register: q follows a
// one clock after a and b agree, and resets to 0. The behaviour is the
// C-element of the self-timed literature; the clocking is this design's
// choice, made so the whole decoder is ordinary synchronous logic.
module c_element (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= 1'b0;
    else if (a == b) q <= a;
  end
endmodule
