// acs_pe: add-compare-select processing element for one trellis state.
//
// Two self-timed adders form the candidate metrics m0 = pm0 + bm0 and
// m1 = pm1 + bm1 (branch metrics sign-extended to 8 bits). A C-element
// waits for both adders to complete; as its output rises, the two sums
// are latched in a register, which keeps adder glitches away from the
// subtract-compare stage. A third self-timed adder then subtracts the
// latched sums, d = m0 - m1, in 8-bit modulo arithmetic: as long as all
// state metrics lie within 128 of each other, m0 < m1 exactly when d is
// negative, so no metric ever needs normalising. The smaller candidate
// survives (sel = 1 when the path from pm1 wins); ties keep the path from
// pm0. `delta` is |d|, the path metric difference the traceback needs for
// the soft output, clipped to 6 bits (63 = "infinity").
// Timing: with `go` high and the adders complete, the sums are latched on
// the next clock and `done` rises then; the outputs hold, whatever the
// inputs do, until `go` falls, after which `done` falls one clock later.
// The adders, C-element join, glitch register, modulo compare and 6-bit
// delta follow the specification; the tie rule and the clipping are this
// design's choices.
module acs_pe
  import sova_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   go,
  input  pm_t    pm0,
  input  pm_t    pm1,
  input  bm_t    bm0,
  input  bm_t    bm1,
  output pm_t    pm_new,
  output logic   sel,
  output delta_t delta,
  output logic   done
);
  pm_t  m0, m1, m0_q, m1_q, d, mag;
  logic dn0, dn1, dnd, sums_ok;
  logic [2:0] carries;   // carry outs: unused, all arithmetic is modulo 2^8

  st_adder #(.W(PMW)) u_add0 (.go, .a(pm0), .b(pm_t'(bm0)), .cin(1'b0),
                             .sum(m0), .cout(carries[0]), .done(dn0));
  st_adder #(.W(PMW)) u_add1 (.go, .a(pm1), .b(pm_t'(bm1)), .cin(1'b0),
                             .sum(m1), .cout(carries[1]), .done(dn1));

  // Join of the two adder completions; the register takes the sums as it rises.
  c_element u_join (.clk, .rst_n, .a(dn0), .b(dn1), .q(sums_ok));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m0_q <= '0;
      m1_q <= '0;
    end else if (dn0 && dn1 && !sums_ok) begin
      m0_q <= m0;
      m1_q <= m1;
    end
  end

  // m0 - m1 = m0 + ~m1 + 1
  st_adder #(.W(PMW)) u_sub (.go(sums_ok), .a(m0_q), .b(~m1_q), .cin(1'b1),
                            .sum(d), .cout(carries[2]), .done(dnd));

  always_comb begin
    sel    = ~d[PMW-1] & (d != '0);      // m1 strictly smaller
    pm_new = sel ? m1_q : m0_q;
    mag    = d[PMW-1] ? -d : d;
    delta  = (mag > pm_t'(DELTA_INF)) ? DELTA_INF : mag[DW-1:0];
  end

  assign done = sums_ok & dnd;

  // 4-phase rule: a new request only after the previous one has returned
  // to zero, so the sum register is always loaded afresh.
  assert property (@(posedge clk) disable iff (!rst_n) $rose(go) |-> !sums_ok);
endmodule
