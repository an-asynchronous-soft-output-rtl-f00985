// tb_acs_unit: feeds branch metrics of random soft symbols through the
// 4-phase ri/ai handshake for 2000 steps (long enough for the 8-bit state
// metrics to wrap many times), acknowledges outputs after random delays,
// and compares every survivor pointer, delta and state metric (mod 256)
// with the integer reference ACS. Checks that ro (= ai) rises LAT = 2
// clocks after ri (sum register, then handshake stage), that ro does not rise again
// before the previous output is acknowledged, and counts those stalls.
module tb_acs_unit;
  import sova_pkg::*;
  import sova_ref::*;
  localparam int NSTEP = 2000, LAT = 2;
  logic clk = 0, rst_n = 0, ri = 0, ao = 0, ai, ro;
  bm_t bm [NSTATE];
  state_t ptr [NSTATE];
  delta_t delta [NSTATE];
  int checks = 0, failures = 0, stalls = 0, wraps = 0;
  model m;

  acs_unit dut (.clk, .rst_n, .ri, .ai, .bm, .ro, .ao, .ptr, .delta);
  always #5 clk = ~clk;

  initial begin
    repeat (NSTEP * 30 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int y [3], lat;
    m = new(22, 14, 32);
    for (int c = 0; c < NSTATE; c++) bm[c] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NSTEP; n++) begin
      @(negedge clk);
      for (int i = 0; i < 3; i++) y[i] = int'($urandom % 8) - 4;
      for (int c = 0; c < NSTATE; c++) bm[c] = bm_t'(model::bm(c, y[0], y[1], y[2]));
      m.acs_step(y[0], y[1], y[2]);
      ri = 1;
      lat = 0;
      while (!ai) begin @(negedge clk); lat++; end
      ri = 0;
      checks++;
      if (lat != LAT) begin failures++; $display("FAIL ro after %0d clocks, expected %0d", lat, LAT); end
      // output side: ro must now be high with the new data
      while (!ro) @(negedge clk);
      for (int s = 0; s < NSTATE; s++) begin
        checks++;
        if (int'(ptr[s]) != m.ptrh[m.t-1][s] || int'(delta[s]) != m.delh[m.t-1][s] ||
            dut.pm[s] != pm_t'(m.pm[s])) begin
          failures++;
          $display("FAIL step %0d state %0d: ptr=%0d delta=%0d pm=%0d expected %0d %0d %0d",
                   n, s, ptr[s], delta[s], dut.pm[s], m.ptrh[m.t-1][s], m.delh[m.t-1][s], pm_t'(m.pm[s]));
        end
      end
      if ((m.pm[0] < 0 ? -m.pm[0] : m.pm[0]) > 256 * (wraps + 1)) wraps++;
      // hold ao low a while: ro must stay high, the unit must not take more
      if ($urandom % 2) begin
        stalls++;
        repeat (3) begin
          @(negedge clk);
          checks++;
          if (!ro) begin failures++; $display("FAIL ro dropped before ao"); end
        end
      end
      ao = 1;
      while (ro) @(negedge clk);
      ao = 0;
      while (ai) @(negedge clk);
    end
    checks++;
    if (stalls == 0 || wraps < 2) begin
      failures++;
      $display("FAIL mechanism not seen: stalls=%0d metric wraps=%0d", stalls, wraps);
    end
    $display("stalls=%0d metric_wraps=%0d", stalls, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
