// tb_conv_encoder: encodes random bits and compares every output triple
// with the generator polynomials applied to an independent bit history.
module tb_conv_encoder;
  import sova_pkg::*;
  logic clk = 0, rst_n = 0, step = 0, u = 0;
  logic [NSYM-1:0] code;
  logic [3:0] h;   // h[0] = u[n], h[k] = u[n-k]
  int checks = 0, failures = 0;

  conv_encoder dut (.clk, .rst_n, .step, .u, .code);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      u = 1'($urandom);
      step = 1'($urandom);
      h[0] = u;
      #1;
      checks++;
      if (code !== {h[0] ^ h[1] ^ h[2] ^ h[3], h[0] ^ h[1] ^ h[3], h[0] ^ h[2] ^ h[3]}) begin
        failures++;
        $display("FAIL n=%0d code=%b hist=%b", n, code, h);
      end
      if (step) h = {h[2:0], 1'b0};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
