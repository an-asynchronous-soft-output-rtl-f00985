// tb_traceback_unit: feeds random survivor pointers (valid predecessors)
// and deltas through the 4-phase ri/ai handshake, acknowledges results
// after random delays, and compares every decoded bit and soft output with
// the reference traceback. Also checks the traceback time: ro rises
// N_CELLS + 2 clocks after the edge that accepts a symbol (N_CELLS + 3
// counted from the cycle in which the request is first seen waiting). Counts how often the
// soft update lowered a reliability and how often ro waited for ao.
module tb_traceback_unit;
  import sova_pkg::*;
  import sova_ref::*;
  localparam int N = 22, OFS = 14, NSYMB = 300;
  logic clk = 0, rst_n = 0, ri = 0, ao = 0;
  logic ai, ro, bit_out;
  state_t ptr [NSTATE];
  delta_t delta [NSTATE];
  delta_t soft_out;
  int checks = 0, failures = 0, outs = 0, soft_updates = 0, ao_waits = 0;
  int cyc = 0, t_acc [$];
  model m;

  traceback_unit #(.N_CELLS(N), .SOVA_OFS(OFS)) dut (
    .clk, .rst_n, .ri, .ai, .ptr, .delta, .ro, .ao, .bit_out, .soft_out);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (NSYMB * 60 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q [$];

  // producer
  initial begin
    int p [8], d [8];
    m = new(N, OFS, 32);
    for (int s = 0; s < NSTATE; s++) begin ptr[s] = '0; delta[s] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NSYMB; n++) begin
      @(negedge clk);
      for (int s = 0; s < NSTATE; s++) begin
        p[s] = (s >> 1) | (($urandom & 1) << 2);
        // mostly small deltas so the minimum moves
        d[s] = ($urandom % 4 == 0) ? 63 : $urandom % 40;
        ptr[s] = state_t'(p[s]); delta[s] = delta_t'(d[s]);
      end
      m.put_step(p, d);
      exp_q.push_back(m.trace());
      ri = 1;
      @(posedge clk);
      while (!dut.accept) @(posedge clk);
      t_acc.push_back(cyc);
      while (!ai) @(posedge clk);
      @(negedge clk);
      ri = 0;
      while (ai) @(posedge clk);
    end
  end

  // consumer
  initial begin
    @(posedge rst_n);
    while (outs < NSYMB) begin
      int e, ta;
      @(posedge clk);
      if (ro) begin
        ta = t_acc.pop_front();
        checks++;
        if (cyc - ta != N + 3) begin
          failures++;
          $display("FAIL traceback took %0d clocks, expected %0d", cyc - ta, N + 3);
        end
        e = exp_q.pop_front();
        checks++;
        if (bit_out !== 1'(e & 1) || soft_out !== delta_t'(e >> 1)) begin
          failures++;
          $display("FAIL out %0d: bit=%b soft=%0d expected %0d %0d", outs, bit_out, soft_out, e & 1, e >> 1);
        end
        if ((e >> 1) != 63) soft_updates++;
        @(negedge clk);
        if ($urandom % 2) begin repeat ($urandom % 5 + 1) @(negedge clk); ao_waits++; end
        ao = 1;
        while (ro) @(posedge clk);
        @(negedge clk);
        ao = 0;
        outs++;
      end
    end
    checks++;
    if (soft_updates == 0 || ao_waits == 0) begin
      failures++;
      $display("FAIL mechanism not seen: soft_updates=%0d ao_waits=%0d", soft_updates, ao_waits);
    end
    $display("soft_updates=%0d ao_waits=%0d", soft_updates, ao_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
