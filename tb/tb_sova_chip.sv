// tb_sova_chip: end-to-end test of the test chip at its default size.
// Runs 1500 symbols through four source modes, switching between them:
//   A  LFSR -> encoder -> decoder             (force_in = 0, nforce = 000)
//   B  finput pin -> encoder -> decoder        (force_in = 1, nforce = 000)
//   C  all three symbols from the n pins, noisy encoded data (nforce = 111)
//   D  symbol 1 from the n pin, noisy; symbols 0 and 2 internal (nforce = 010)
// The testbench models the LFSR, encoder and symbol muxing itself, checks
// lfsr_out, and compares every decoded bit and soft output with the
// reference decoder model; where all symbols were noiseless the decoded
// bit must also equal the encoded bit 22 symbols earlier. Each mode, each
// mode switch, soft updates, corrected channel errors, input waits and ao
// waits must all occur.
module tb_sova_chip;
  import sova_pkg::*;
  import sova_ref::*;
  localparam int N = 22, NSYMB = 1500;
  logic clk = 0, rst_n = 0, req = 0, ao = 0, ack, ro, bit_out, lfsr_out;
  logic force_in = 0, finput = 0;
  logic [2:0] nforce = '0;
  sym_t n0 = '0, n1 = '0, n2 = '0;
  delta_t dta_out;
  int checks = 0, failures = 0, outs = 0;
  int mode_cnt [4], switches = 0, soft_updates = 0, corrected = 0, in_waits = 0, ao_waits = 0;
  int ubits [NSYMB];
  bit clean [NSYMB];
  int exp_q [$];
  model m;

  sova_chip dut (.clk, .rst_n, .req, .ack, .n0, .n1, .n2, .nforce, .force_in, .finput,
                 .lfsr_out, .ro, .ao, .bit_out, .dta_out);
  always #5 clk = ~clk;

  initial begin
    repeat (NSYMB * 80 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st, c, v [3], mode, prev_mode, ub, chan_err;
    logic [6:0] lf;
    m = new(N, 14, 32);
    st = 0; lf = 7'h7f; prev_mode = 0;
    mode_cnt = '{default: 0};
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NSYMB; n++) begin
      mode = (n / 150) % 4;
      if (mode != prev_mode) switches++;
      prev_mode = mode;
      mode_cnt[mode]++;
      @(negedge clk);
      force_in = (mode == 1);
      finput = 1'($urandom);
      nforce = (mode == 2) ? 3'b111 : (mode == 3) ? 3'b010 : 3'b000;
      ub = force_in ? int'(finput) : int'(lf[6]);
      ubits[n] = ub;
      c = model::code(st, ub);
      st = ((st << 1) | ub) & 7;
      chan_err = 0;
      for (int i = 0; i < 3; i++) begin
        v[i] = ((c >> i) & 1) ? 3 : -3;
        if (nforce[i]) begin
          v[i] += int'($urandom % 7) - 3;
          if (v[i] > 3) v[i] = 3;
          if (v[i] < -4) v[i] = -4;
          if ((v[i] > 0) != (((c >> i) & 1) == 1)) chan_err = 1;
        end
      end
      clean[n] = (nforce == 0);
      corrected += chan_err;
      n0 = sym_t'(v[0]); n1 = sym_t'(v[1]); n2 = sym_t'(v[2]);
      m.acs_step(v[0], v[1], v[2]);
      exp_q.push_back(m.trace());
      #1;
      checks++;
      if (lfsr_out !== lf[6]) begin failures++; $display("FAIL lfsr_out at %0d", n); end
      req = 1;
      repeat (2) @(negedge clk);
      if (!ack) in_waits++;
      while (!ack) @(negedge clk);
      req = 0;
      lf = {lf[5:0], lf[6] ^ lf[5]};
      while (ack) @(negedge clk);
    end
  end

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
        if (bit_out !== 1'(e & 1) || dta_out !== delta_t'(e >> 1)) begin
          failures++;
          $display("FAIL out %0d: bit=%b soft=%0d expected %0d %0d", outs, bit_out, dta_out, e & 1, e >> 1);
        end
        if (outs >= N) begin
          if (bit_out !== 1'(ubits[outs - N])) wrong++;
          if (clean[outs - N]) begin
            checks++;
            if (bit_out !== 1'(ubits[outs - N])) begin
              failures++;
              $display("FAIL noiseless bit %0d decoded %b", outs - N, bit_out);
            end
          end
          if (dta_out != DELTA_INF) soft_updates++;
        end
        if ($urandom % 4 == 0) begin repeat ($urandom % 4 + 1) @(negedge clk); ao_waits++; end
        ao = 1;
        while (ro) @(negedge clk);
        ao = 0;
        outs++;
      end
    end
    corrected -= wrong;
    $display("modes A=%0d B=%0d C=%0d D=%0d switches=%0d soft_updates=%0d corrected=%0d residual=%0d in_waits=%0d ao_waits=%0d",
             mode_cnt[0], mode_cnt[1], mode_cnt[2], mode_cnt[3], switches, soft_updates, corrected, wrong, in_waits, ao_waits);
    checks++;
    if (mode_cnt[0] == 0 || mode_cnt[1] == 0 || mode_cnt[2] == 0 || mode_cnt[3] == 0 ||
        switches < 4 || soft_updates == 0 || corrected <= 0 || in_waits == 0 || ao_waits == 0) begin
      failures++;
      $display("FAIL mechanism not seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
