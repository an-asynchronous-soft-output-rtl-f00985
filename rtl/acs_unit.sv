// acs_unit: state-parallel add-compare-select unit.
//
// Eight acs_pe elements, one per trellis state, read the state metric
// registers through the shuffle-exchange wiring of the 8-state trellis:
// state s is entered from {0, s[2:1]} and {1, s[2:1]} with the branch
// metrics of the codes those transitions emit. A survivor pointer is the
// whole predecessor state, as the traceback memory stores it, so its two
// low bits are the constant s[2:1] and only the MSB carries the decision. When a new set of branch
// metrics is handed over, the survivors' metrics are written back, and the
// survivor pointer (predecessor state) and path metric difference of every
// state are latched as the output to the traceback unit.
// Handshake: 4-phase bundled data, ri/ai from the branch metric unit and
// ro/ao to the traceback unit, through one Muller stage. The element
// completions are ANDed into the request, and ro is not raised again until
// the previous output has been acknowledged. With ao low, ro (and ai)
// rise two clocks after ri: one for the elements' sum registers, one for
// the handshake stage, whose data registers load on that same edge.
// Reset gives state 0 metric 0 and every other state INIT_PM, since the
// encoder starts in state 0; those values are this design's choice.
module acs_unit
  import sova_pkg::*;
#(
  parameter int INIT_PM = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ri,
  output logic   ai,
  input  bm_t    bm    [NSTATE],
  output logic   ro,
  input  logic   ao,
  output state_t ptr   [NSTATE],
  output delta_t delta [NSTATE]
);
  pm_t    pm [NSTATE];
  pm_t    pm_new [NSTATE];
  logic   sel [NSTATE];
  delta_t dl [NSTATE];
  logic [NSTATE-1:0] pe_done;
  logic   capture;

  for (genvar s = 0; s < NSTATE; s++) begin : g_pe
    localparam state_t P0 = pred_state(state_t'(s), 1'b0);
    localparam state_t P1 = pred_state(state_t'(s), 1'b1);
    localparam int C0 = int'(enc_out(P0, 1'(s & 1)));
    localparam int C1 = int'(enc_out(P1, 1'(s & 1)));
    acs_pe u_pe (.clk, .rst_n, .go(ri), .pm0(pm[P0]), .pm1(pm[P1]), .bm0(bm[C0]), .bm1(bm[C1]),
                 .pm_new(pm_new[s]), .sel(sel[s]), .delta(dl[s]), .done(pe_done[s]));
  end

  muller_stage u_hs (.clk, .rst_n, .req_in(ri & (&pe_done)), .ack_out(ai),
                     .req_out(ro), .ack_in(ao), .capture);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTATE; s++) begin
        pm[s]    <= (s == 0) ? '0 : pm_t'(INIT_PM);
        ptr[s]   <= '0;
        delta[s] <= DELTA_INF;
      end
    end else if (capture) begin
      for (int s = 0; s < NSTATE; s++) begin
        pm[s]    <= pm_new[s];
        ptr[s]   <= pred_state(state_t'(s), sel[s]);
        delta[s] <= dl[s];
      end
    end
  end
endmodule
