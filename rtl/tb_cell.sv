// tb_cell: one cell of the traceback ring, with its own copy of the
// traceback unit's handshake control.
//
// Memory: the cell is a slice of traceback memory for one trellis step, a
// state memory of eight 3-bit pointers (for each state, the predecessor
// state on its survivor path) and a delta memory of eight 6-bit path
// metric differences. Data never moves between cells.
//
// Traceback step: when the eval token reaches a cell that is not the
// head, the cell takes one step on the data it receives (tin) and passes
// the result (tout) to the next cell with eval_out one clock later:
//   - ordinary cell: the survivor state S and competitor state S' each
//     look up their predecessor; if the two paths' decisions (state LSBs)
//     differ, the reliability becomes min(reliability, delta[S]),
//     otherwise it is copied unchanged;
//   - pSOVA cell (sova = 1): the survivor continues as before, the
//     competitor is started as the other predecessor of S (MSB inverted),
//     and the reliability is set to 111111 ("infinity").
//
// Handshake control: every cell carries the sequencer for the unit's
// ri/ai and ro/ao handshakes, but only the head cell runs it. On `accept`
// (the traceback unit has taken a request and is moving the pointers) the
// cell that is about to become head (head_next) goes through:
//   WRITE   store ptr/delta from the ACS unit, raise ai (held until ri falls)
//   START   take the first step from state 000, reliability 111111
//   RUN     wait for the token to come back around the ring (done_o)
//   OUT     raise ro until ao
//   RELEASE wait for ao to fall
// The unit ORs ai_o, ro_o and busy_o of all cells.
// The memories, pointer lookup, soft update, start values and the
// pHead-enabled per-cell control follow the specification. The eval/token
// handshake between cells is reduced to a one-clock eval pulse, which the
// next cell always accepts.
module tb_cell
  import sova_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   head,        // pHead bit of this cell
  input  logic   head_next,   // pHead bit of the next cell: head after `accept`
  input  logic   sova,        // pSOVA bit of this cell
  input  logic   accept,      // request taken, pointers moving
  input  logic   ri,
  output logic   ai_o,
  output logic   ro_o,
  input  logic   ao,
  output logic   busy_o,
  output logic   done_o,      // token has come back to this head cell
  input  state_t wr_ptr   [NSTATE],
  input  delta_t wr_delta [NSTATE],
  input  logic   eval_in,
  input  trace_t tin,
  output logic   eval_out,
  output trace_t tout
);
  typedef enum logic [2:0] {IDLE, WRITE, START, RUN, OUT, RELEASE} cell_state_e;
  cell_state_e st;

  state_t smem [NSTATE];
  delta_t dmem [NSTATE];
  trace_t t, nxt;
  state_t sp;
  logic   start, fire;

  // ---- handshake sequencer (runs only in the head cell) ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= IDLE;
      ai_o <= 1'b0;
    end else begin
      if (ai_o && !ri) ai_o <= 1'b0;
      unique case (st)
        IDLE:    if (accept && head_next) st <= WRITE;
        WRITE:   begin ai_o <= 1'b1; st <= START; end
        START:   st <= RUN;
        RUN:     if (done_o) st <= OUT;
        OUT:     if (ao) st <= RELEASE;
        RELEASE: if (!ao) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  assign start  = (st == START);
  assign done_o = (st == RUN) && head && eval_in;
  assign ro_o   = (st == OUT);
  assign busy_o = (st != IDLE);

  // ---- memory ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTATE; s++) begin
        smem[s] <= '0;
        dmem[s] <= DELTA_INF;
      end
    end else if (st == WRITE) begin
      smem <= wr_ptr;
      dmem <= wr_delta;
    end
  end

  // ---- traceback step ----
  always_comb begin
    fire = head ? start : eval_in;
    t    = start ? '{s: '0, sc: '0, rel: DELTA_INF} : tin;
    sp   = smem[t.s];
    if (sova) begin
      nxt = '{s: sp, sc: sp ^ state_t'(1 << (SW-1)), rel: DELTA_INF};
    end else begin
      nxt.s  = sp;
      nxt.sc = smem[t.sc];
      if (t.s[0] != t.sc[0] && dmem[t.s] < t.rel) nxt.rel = dmem[t.s];
      else                                        nxt.rel = t.rel;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eval_out <= 1'b0;
      tout     <= '{s: '0, sc: '0, rel: DELTA_INF};
    end else begin
      eval_out <= fire;
      if (fire) tout <= nxt;
    end
  end

  // Only the head cell runs its sequencer.
  assert property (@(posedge clk) disable iff (!rst_n) busy_o |-> head);
endmodule
