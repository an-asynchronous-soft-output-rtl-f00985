// muller_stage: one stage of a Muller pipeline with a 4-phase bundled-data
// handshake on each side.
//
// req_out is a C-element of req_in and the inverted ack_in, and is also the
// acknowledge sent back upstream (ack_out). The stage owner latches its data
// register on `capture`, the cycle in which req_out is about to rise, so the
// data behind req_out is stable for as long as req_out is high. A new token
// is accepted only after both sides have returned to zero.
// Timing: req_out rises one clock after req_in rises with ack_in low, and
// falls one clock after req_in falls with ack_in high.
module muller_stage (
  input  logic clk,
  input  logic rst_n,
  input  logic req_in,
  output logic ack_out,
  output logic req_out,
  input  logic ack_in,
  output logic capture
);
  c_element u_c (.clk, .rst_n, .a(req_in), .b(~ack_in), .q(req_out));

  assign ack_out = req_out;
  assign capture = req_in & ~ack_in & ~req_out;

  // 4-phase rule: the downstream side acknowledges only a raised request,
  // and does not withdraw its acknowledge before the request falls.
  property p_ack_follows_req;
    @(posedge clk) disable iff (!rst_n) $rose(ack_in) |-> req_out;
  endproperty
  assert property (p_ack_follows_req);
endmodule
