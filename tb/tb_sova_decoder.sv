// tb_sova_decoder: end-to-end test of the decoder on its own.
// Random information bits are encoded with the rate-1/3 code and mapped
// to soft symbols +-3. The first 300 symbols are noiseless and the decoded
// bits must equal the information bits delayed by N_CELLS symbols; the
// next 900 carry random noise (clipped to the 3-bit range) and every bit
// and soft output is compared with the reference model. Inputs are
// offered and outputs acknowledged after random delays. Counted and
// required: soft updates below "infinity", channel bit errors the decoder
// corrected, input requests that had to wait for the pipeline, and
// results that waited for ao.
module tb_sova_decoder;
  import sova_pkg::*;
  import sova_ref::*;
  localparam int N = 22, OFS = 14, NCLEAN = 300, NSYMB = 1200;
  logic clk = 0, rst_n = 0, req = 0, ao = 0, ack, ro, bit_out;
  sym_t y [NSYM];
  delta_t soft_out;
  int checks = 0, failures = 0, outs = 0;
  int soft_updates = 0, corrected = 0, in_waits = 0, ao_waits = 0;
  int ubits [NSYMB];
  int exp_q [$];
  model m;

  sova_decoder dut (.clk, .rst_n, .req, .ack, .y, .ro, .ao, .bit_out, .soft_out);
  always #5 clk = ~clk;

  initial begin
    repeat (NSYMB * 80 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  initial begin
    int st, c, v [3], chan_err;
    m = new(N, OFS, 32);
    st = 0;
    y = '{default: '0};
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NSYMB; n++) begin
      ubits[n] = $urandom & 1;
      c = model::code(st, ubits[n]);
      st = ((st << 1) | ubits[n]) & 7;
      chan_err = 0;
      for (int i = 0; i < 3; i++) begin
        v[i] = ((c >> i) & 1) ? 3 : -3;
        if (n >= NCLEAN) v[i] += int'($urandom % 7) - 3;
        if (v[i] > 3) v[i] = 3;
        if (v[i] < -4) v[i] = -4;
        if ((v[i] > 0) != (((c >> i) & 1) == 1)) chan_err = 1;
        y[i] = sym_t'(v[i]);
      end
      if (chan_err) corrected++;   // reduced below if the bit decodes wrong
      m.acs_step(v[0], v[1], v[2]);
      exp_q.push_back(m.trace());
      @(negedge clk);
      req = 1;
      repeat (2) @(negedge clk);
      if (!ack) in_waits++;
      while (!ack) @(negedge clk);
      req = 0;
      while (ack) @(negedge clk);
      repeat ($urandom % 3) @(negedge clk);
    end
  end

  // sink
  initial begin
    int wrong;
    wrong = 0;
    @(posedge rst_n);
    while (outs < NSYMB) begin
      int e;
      @(negedge clk);
      if (ro) begin
        e = exp_q.pop_front();
        checks++;
        if (bit_out !== 1'(e & 1) || soft_out !== delta_t'(e >> 1)) begin
          failures++;
          $display("FAIL out %0d: bit=%b soft=%0d expected %0d %0d", outs, bit_out, soft_out, e & 1, e >> 1);
        end
        if (outs >= N) begin
          if (outs - N < NCLEAN) begin
            checks++;
            if (bit_out !== 1'(ubits[outs - N])) begin
              failures++;
              $display("FAIL noiseless bit %0d decoded %b", outs - N, bit_out);
            end
          end else if (bit_out !== 1'(ubits[outs - N])) wrong++;
          if (soft_out != DELTA_INF) soft_updates++;
        end
        if ($urandom % 3 == 0) begin repeat ($urandom % 6 + 1) @(negedge clk); ao_waits++; end
        ao = 1;
        while (ro) @(negedge clk);
        ao = 0;
        outs++;
      end
    end
    corrected -= wrong;
    checks++;
    if (soft_updates == 0 || corrected <= 0 || in_waits == 0 || ao_waits == 0) begin
      failures++;
      $display("FAIL mechanism not seen");
    end
    $display("soft_updates=%0d corrected_symbol_errors=%0d residual_bit_errors=%0d in_waits=%0d ao_waits=%0d",
             soft_updates, corrected, wrong, in_waits, ao_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
