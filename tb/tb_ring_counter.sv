// tb_ring_counter: checks reset position, one-hot rotation toward the lower
// index on step, hold without step, and the wrap from 0 to N-1.
module tb_ring_counter;
  localparam int N = 22;
  logic clk = 0, rst_n = 0, step = 0;
  logic [N-1:0] q;
  int checks = 0, failures = 0, pos, wraps = 0;

  ring_counter #(.N(N), .INIT_POS(5)) dut (.clk, .rst_n, .step, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pos = 5;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      checks++;
      if (q !== (N'(1) << pos)) begin
        failures++;
        $display("FAIL n=%0d q=%b expected position %0d", n, q, pos);
      end
      step = 1'($urandom);
      if (step) begin
        if (pos == 0) wraps++;
        pos = (pos == 0) ? N - 1 : pos - 1;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
