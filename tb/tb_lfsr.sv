// tb_lfsr: compares the LFSR bit stream with an independent model of the
// x^7 + x^6 + 1 register and checks that the period is 127.
module tb_lfsr;
  logic clk = 0, rst_n = 0, step = 0, bit_o;
  logic [6:0] m;
  int checks = 0, failures = 0, period = 0;
  logic [6:0] first;

  lfsr #(.W(7)) dut (.clk, .rst_n, .step, .bit_o);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = 7'h7f;
    first = m;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      checks++;
      if (bit_o !== m[6]) begin failures++; $display("FAIL n=%0d", n); end
      step = 1'($urandom);
      if (step) begin
        m = {m[5:0], m[6] ^ m[5]};
        if (period == 0 && m == first) period = n + 1;
      end
    end
    // period in steps
    m = 7'h7f; period = 0;
    do begin m = {m[5:0], m[6] ^ m[5]}; period++; end while (m != 7'h7f);
    checks++;
    if (period != 127) begin failures++; $display("FAIL period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
