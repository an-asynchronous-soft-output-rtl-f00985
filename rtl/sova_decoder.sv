// sova_decoder: soft-output Viterbi decoder for the 8-state, rate-1/3 code.
//
// Three units in a handshake pipeline:
//   input stage   latches the three 3-bit soft symbols on req (4-phase,
//                 acknowledged on ack);
//   bmu           forms the eight branch metrics with self-timed adders,
//                 whose completion gates the request to the ACS unit;
//   acs_unit      updates the eight 8-bit modulo state metrics and hands
//                 survivor pointers and path metric differences on;
//   traceback_unit stores them in a ring of register cells and runs a
//                 Viterbi traceback followed by a SOVA soft update around
//                 the ring, giving a decoded bit and a 6-bit reliability
//                 on ro/ao (4-phase).
// Each link is a 4-phase bundled-data handshake; the units are connected
// as a Muller pipeline, so the ACS unit can take the next symbol while the
// traceback of the previous one is still running.
// Output k (counting from 0 after reset) is the decoded input bit k-N_CELLS.
// The architecture, word widths and handshake style follow the
// specification; the clocked rendering of the self-timed control is this
// design's choice.
module sova_decoder
  import sova_pkg::*;
#(
  parameter int N_CELLS  = 22,
  parameter int SOVA_OFS = 14
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req,
  output logic   ack,
  input  sym_t   y [NSYM],
  output logic   ro,
  input  logic   ao,
  output logic   bit_out,
  output delta_t soft_out
);
  sym_t   y_q [NSYM];
  logic   r_in, cap_in, bmu_done;
  logic   acs_ai, acs_ro, tb_ai;
  bm_t    bm [NSTATE];
  state_t ptr [NSTATE];
  delta_t delta [NSTATE];

  muller_stage u_in (.clk, .rst_n, .req_in(req), .ack_out(ack), .req_out(r_in),
                     .ack_in(acs_ai), .capture(cap_in));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      y_q <= '{default: '0};
    else if (cap_in) y_q <= y;
  end

  bmu u_bmu (.go(r_in), .y(y_q), .bm, .done(bmu_done));

  acs_unit u_acs (.clk, .rst_n, .ri(r_in & bmu_done), .ai(acs_ai), .bm,
                  .ro(acs_ro), .ao(tb_ai), .ptr, .delta);

  traceback_unit #(.N_CELLS(N_CELLS), .SOVA_OFS(SOVA_OFS)) u_tb (
    .clk, .rst_n, .ri(acs_ro), .ai(tb_ai), .ptr, .delta,
    .ro, .ao, .bit_out, .soft_out);
endmodule
