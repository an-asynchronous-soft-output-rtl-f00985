// tb_acs_pe: random metrics spread up to +-50 around a random base, so the
// modulo compare is exercised across the 8-bit wrap. For each request it
// checks survivor choice, new metric, clipped |difference| against integer
// arithmetic done without wrap-around; that done rises exactly one clock
// after go; that the outputs hold when the inputs change while go stays
// high (the sum register); and that done falls one clock after go.
module tb_acs_pe;
  import sova_pkg::*;
  logic clk = 0, rst_n = 0, go = 0;
  pm_t pm0, pm1, pm_new;
  bm_t bm0, bm1;
  logic sel, done;
  delta_t delta;
  int checks = 0, failures = 0, clipped = 0;

  acs_pe dut (.clk, .rst_n, .go, .pm0, .pm1, .bm0, .bm1, .pm_new, .sel, .delta, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pm0 = '0; pm1 = '0; bm0 = '0; bm1 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int base, v0, v1, b0, b1, m0, m1, e_sel, e_pm, e_d;
      @(negedge clk);
      base = $urandom % 256;
      v0 = base + int'($urandom % 101) - 50;
      v1 = base + int'($urandom % 101) - 50;
      b0 = int'($urandom % 22) - 9;
      b1 = int'($urandom % 22) - 9;
      pm0 = pm_t'(v0); pm1 = pm_t'(v1); bm0 = bm_t'(b0); bm1 = bm_t'(b1);
      go = 1;
      #1;
      checks++;
      if (done !== 0) begin failures++; $display("FAIL done before the register was loaded"); end
      @(negedge clk);
      m0 = v0 + b0; m1 = v1 + b1;
      e_sel = (m1 < m0);
      e_pm  = e_sel ? m1 : m0;
      e_d   = (m0 > m1) ? m0 - m1 : m1 - m0;
      if (e_d > 63) begin e_d = 63; clipped++; end
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (sel !== 1'(e_sel) || pm_new !== pm_t'(e_pm) || delta !== delta_t'(e_d) || done !== 1) begin
          failures++;
          $display("FAIL n=%0d k=%0d pm0=%0d pm1=%0d bm0=%0d bm1=%0d: sel=%b pm=%0d d=%0d done=%b, expected %0d %0d %0d",
                   n, k, v0, v1, b0, b1, sel, pm_new, delta, done, e_sel, pm_t'(e_pm), e_d);
        end
        // disturb the inputs: the registered result must not move
        pm0 = pm_t'($urandom); pm1 = pm_t'($urandom);
        @(negedge clk);
      end
      go = 0;
      @(negedge clk);
      checks++;
      if (done !== 0) begin failures++; $display("FAIL done held after go fell"); end
    end
    checks++;
    if (clipped == 0) begin failures++; $display("FAIL clipping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
