// traceback_unit: asynchronous-style memory traceback for two-step SOVA.
//
// N_CELLS tb_cell slices form a ring; cell i hands its result to cell i+1.
// Two one-hot ring counters mark the head (pHead), where the newest trellis
// step is written, and the cell SOVA_OFS steps behind it (pSOVA), where the
// Viterbi traceback ends and the soft update begins. Per symbol:
//   1. ri rises while no cell is busy and ai is low: the request is
//      accepted and both pointers move one cell toward the lower index, so
//      the head lands on the oldest cell;
//   2. the new head cell stores the ACS pointers and deltas and raises ai
//      (it falls again after ri falls);
//   3. the head starts the traceback from state 000 and the eval token
//      walks the whole ring: SOVA_OFS Viterbi steps, then N_CELLS-SOVA_OFS
//      steps that also build the competing path and update the
//      reliability;
//   4. when the token comes back to the head, the multiplexer of the head
//      position picks the last cell's result; the decoded bit is the LSB
//      of the traced state and the soft output its reliability; ro rises
//      and stays until ao, 4-phase.
// The handshake sequencing lives in every cell and only the head's copy
// runs; ai and ro are the OR of the cells' signals. The next symbol is
// taken only once the ro/ao handshake has returned to zero. Decoding
// latency is N_CELLS symbols: output k carries input bit k - N_CELLS
// (bits before the first symbol read as the encoder's zero history).
// ro rises N_CELLS + 2 clocks after the edge that accepts a symbol; with
// an immediate environment a symbol takes N_CELLS + 5 clocks.
// The ring, pointers, head start values, per-cell control and handshakes
// follow the specification; the clocked sequencing and SOVA_OFS = 14
// (with 22 cells, an update window of 8 = twice the constraint length)
// are this design's choices.
module traceback_unit
  import sova_pkg::*;
#(
  parameter int N_CELLS  = 22,
  parameter int SOVA_OFS = 14
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ri,
  output logic   ai,
  input  state_t ptr   [NSTATE],
  input  delta_t delta [NSTATE],
  output logic   ro,
  input  logic   ao,
  output logic   bit_out,
  output delta_t soft_out
);
  logic [N_CELLS-1:0] p_head, p_sova, eval_o, ai_c, ro_c, busy_c, done_c;
  trace_t             t_o [N_CELLS];
  logic               accept, done;
  trace_t             result;

  assign accept = ri && !ai && !(|busy_c);
  assign ai     = |ai_c;
  assign ro     = |ro_c;
  assign done   = |done_c;

  ring_counter #(.N(N_CELLS), .INIT_POS(0)) u_head (
    .clk, .rst_n, .step(accept), .q(p_head));
  ring_counter #(.N(N_CELLS), .INIT_POS(SOVA_OFS % N_CELLS)) u_sova (
    .clk, .rst_n, .step(accept), .q(p_sova));

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    localparam int PREV = (i + N_CELLS - 1) % N_CELLS;
    localparam int NEXT = (i + 1) % N_CELLS;
    tb_cell u_cell (
      .clk, .rst_n, .head(p_head[i]), .head_next(p_head[NEXT]), .sova(p_sova[i]),
      .accept, .ri, .ai_o(ai_c[i]), .ro_o(ro_c[i]), .ao, .busy_o(busy_c[i]),
      .done_o(done_c[i]), .wr_ptr(ptr), .wr_delta(delta),
      .eval_in(eval_o[PREV]), .tin(t_o[PREV]),
      .eval_out(eval_o[i]), .tout(t_o[i]));
  end

  // Result multiplexer: the token returning into the head cell.
  always_comb begin
    result = '0;
    for (int i = 0; i < N_CELLS; i++)
      if (p_head[i]) result = t_o[(i + N_CELLS - 1) % N_CELLS];
  end

  // Output data register, loaded as the head cell raises ro.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_out  <= 1'b0;
      soft_out <= '0;
    end else if (done) begin
      bit_out  <= result.s[0];
      soft_out <= result.rel;
    end
  end

  // Handshake rules on the output side: data is held while ro is high,
  // and ro does not fall before ao has risen.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ro && !$past(ro) |=> $stable(bit_out) && $stable(soft_out));
  assert property (@(posedge clk) disable iff (!rst_n) $fell(ro) |-> $past(ao));
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(busy_c));
endmodule
