// conv_encoder: the test chip's rate-1/3, constraint-length-4 convolutional
// encoder, G0 = 1+D^2+D^3, G1 = 1+D+D^3, G2 = 1+D+D^2+D^3.
//
// A 3-bit shift register holds the previous inputs {u[n-3], u[n-2], u[n-1]}.
// `code` = {g2, g1, g0} is the combinational output for the present input u;
// `step` shifts u into the register. Reset clears the register (state 000).
// Generators and the 000 start state follow the specification.
module conv_encoder
  import sova_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            step,
  input  logic            u,
  output logic [NSYM-1:0] code
);
  state_t st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    st <= '0;
    else if (step) st <= next_state(st, u);
  end

  assign code = enc_out(st, u);
endmodule
