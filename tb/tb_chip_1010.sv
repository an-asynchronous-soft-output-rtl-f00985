// tb_chip_1010: the chip decoding the alternating stream 1010... fed on
// the finput pin (force_in = 1), with the environment answering at once on
// both handshakes (req raised as soon as ack falls, ao = ro). Checks every
// decoded bit against the stream 22 symbols earlier, every soft output
// against the reference model, and the steady-state symbol period in
// clocks, which is fixed by the traceback ring: N_CELLS + 5 clocks per
// symbol with an immediate environment.
module tb_chip_1010;
  import sova_pkg::*;
  import sova_ref::*;
  localparam int N = 22, NSYMB = 300, PERIOD = N + 5;
  logic clk = 0, rst_n = 0, req = 0, finput = 0, ack, ro, bit_out, lfsr_out;
  delta_t dta_out;
  int checks = 0, failures = 0, outs = 0, cyc = 0, last_ro = 0;
  int exp_q [$];
  model m;

  sova_chip dut (.clk, .rst_n, .req, .ack, .n0('0), .n1('0), .n2('0), .nforce(3'b000),
                 .force_in(1'b1), .finput, .lfsr_out,
                 .ro, .ao(ro), .bit_out, .dta_out);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (NSYMB * 60 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source: bit n of the stream is 1 for even n (1010...)
  initial begin
    int st, c, ub, v [3];
    m = new(N, 14, 32);
    st = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NSYMB; n++) begin
      ub = (n % 2 == 0);
      c = model::code(st, ub);
      st = ((st << 1) | ub) & 7;
      for (int i = 0; i < 3; i++) v[i] = ((c >> i) & 1) ? 3 : -3;
      m.acs_step(v[0], v[1], v[2]);
      exp_q.push_back(m.trace());
      @(negedge clk);
      finput = 1'(ub);
      req = 1;
      while (!ack) @(negedge clk);
      req = 0;
      while (ack) @(negedge clk);
    end
  end

  initial begin
    @(posedge rst_n);
    while (outs < NSYMB) begin
      int e;
      @(posedge clk);
      #1;
      if (ro) begin
        e = exp_q.pop_front();
        checks++;
        if (bit_out !== 1'(e & 1) || dta_out !== delta_t'(e >> 1)) begin
          failures++;
          $display("FAIL out %0d: bit=%b soft=%0d expected %0d %0d", outs, bit_out, dta_out, e & 1, e >> 1);
        end
        if (outs >= N) begin
          checks++;
          if (bit_out !== 1'((outs - N) % 2 == 0)) begin
            failures++;
            $display("FAIL out %0d: stream bit wrong", outs);
          end
        end
        if (outs >= 10) begin
          checks++;
          if (cyc - last_ro != PERIOD) begin
            failures++;
            $display("FAIL symbol period %0d clocks, expected %0d", cyc - last_ro, PERIOD);
          end
        end
        last_ro = cyc;
        outs++;
        while (ro) @(posedge clk);
      end
    end
    $display("symbol period %0d clocks", PERIOD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
