// bmu: branch metric unit.
//
// With antipodal symbols the squared-distance branch metric reduces to a
// signed sum: the metric of a transition whose encoder output bit i is 1
// takes -y[i], and one whose bit is 0 takes +y[i]. Smaller is more likely.
// The unit computes the metric of all eight output codes {g2,g1,g0}: each
// code negates the selected inputs (two's complement) and sums the three
// terms with two 5-bit self-timed adders. `done` is the AND of the sixteen
// adder completions and serves as the unit's request to the ACS unit.
// 3-bit symbols give 5-bit metrics (range -9..12). Combinational; the
// metrics are valid while `go` is high. The metric formula, widths and
// self-timed adders follow the specification.
module bmu
  import sova_pkg::*;
(
  input  logic go,
  input  sym_t y  [NSYM],
  output bm_t  bm [NSTATE],
  output logic done
);
  logic [NSTATE-1:0] done1, done2;

  for (genvar c = 0; c < NSTATE; c++) begin : g_code
    bm_t t [NSYM];
    bm_t s01;
    logic co1, co2;

    // Negation before addition for code bits that are 1.
    for (genvar i = 0; i < NSYM; i++) begin : g_term
      bm_t ext;
      assign ext = bm_t'(y[i]);
      assign t[i] = ((c >> i) & 1) != 0 ? -ext : ext;
    end

    st_adder #(.W(BMW)) u_add1 (.go, .a(t[0]), .b(t[1]), .cin(1'b0),
                               .sum(s01), .cout(co1), .done(done1[c]));
    st_adder #(.W(BMW)) u_add2 (.go, .a(s01), .b(t[2]), .cin(1'b0),
                               .sum(bm[c]), .cout(co2), .done(done2[c]));
  end

  assign done = (&done1) & (&done2);
endmodule
