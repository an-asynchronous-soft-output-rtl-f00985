// sova_chip: the SOVA decoder test chip.
//
// Around the decoder sit a pseudo-random source (LFSR) and the rate-1/3
// convolutional encoder, so the chip can decode either its own encoded
// stream or soft symbols applied from outside:
//   force_in = 0 / 1   the encoder takes the LFSR bit / the finput pin;
//   nforce[i] = 0 / 1  decoder symbol i comes from encoder output g_i
//                      (mapped to the soft value +3 for 1, -3 for 0) /
//                      from the external 3-bit pins n0, n1, n2.
// The source (LFSR and encoder) advances by one bit when the decoder
// acknowledges a symbol (rising ack), so the next symbol is ready for the
// next req. lfsr_out shows the current LFSR bit. Outputs: decoded bit and
// 6-bit reliability under a 4-phase ro/ao handshake; decoding latency is
// N_CELLS symbols (22 by default).
// The pins and their functions follow the chip's pin list (power pads
// omitted); the soft values of the internal symbols and the moment the
// source advances are this design's choices.
module sova_chip
  import sova_pkg::*;
#(
  parameter int LFSR_W = 7
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req,
  output logic            ack,
  input  sym_t            n0,
  input  sym_t            n1,
  input  sym_t            n2,
  input  logic [NSYM-1:0] nforce,
  input  logic            force_in,
  input  logic            finput,
  output logic            lfsr_out,
  output logic            ro,
  input  logic            ao,
  output logic            bit_out,
  output delta_t          dta_out
);
  localparam sym_t SOFT_ONE  = 3'sd3;
  localparam sym_t SOFT_ZERO = -3'sd3;

  logic            ack_d, src_step, src_bit;
  logic [NSYM-1:0] code;
  sym_t            y [NSYM];
  sym_t            ext [NSYM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_d <= 1'b0;
    else        ack_d <= ack;
  end
  assign src_step = ack & ~ack_d;

  lfsr #(.W(LFSR_W)) u_lfsr (.clk, .rst_n, .step(src_step), .bit_o(lfsr_out));

  assign src_bit = force_in ? finput : lfsr_out;

  conv_encoder u_enc (.clk, .rst_n, .step(src_step), .u(src_bit), .code);

  assign ext = '{n0, n1, n2};
  always_comb begin
    for (int i = 0; i < NSYM; i++)
      y[i] = nforce[i] ? ext[i] : (code[i] ? SOFT_ONE : SOFT_ZERO);
  end

  sova_decoder u_dec (.clk, .rst_n, .req, .ack, .y, .ro, .ao, .bit_out,
                      .soft_out(dta_out));
endmodule
