// ring_counter: one-hot ring counter used for the pHead and pSOVA pointers
// of the traceback ring.
//
// A single 1 circulates among N flip-flops. Each `step` moves it one place
// toward the lower index (position 0 wraps to N-1), i.e. against the
// direction in which the traceback walks the ring. A ring counter changes
// exactly two bits per step, so the pointer lines are free of decoding
// glitches. The one-hot pointer and the counting direction follow the
// specification; INIT_POS, the position after reset, is this design's choice.
module ring_counter #(
  parameter int N        = 22,
  parameter int INIT_POS = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  output logic [N-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= N'(1) << INIT_POS;
    else if (step) q <= {q[0], q[N-1:1]};
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(q));
endmodule
