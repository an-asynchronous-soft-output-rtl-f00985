// tb_muller_stage: drives a Muller stage with random 4-phase traffic on
// both sides and checks, cycle by cycle, req_out against an independent
// model, that ack_out equals req_out, and that capture fires exactly once
// per token, on the cycle before req_out rises.
module tb_muller_stage;
  logic clk = 0, rst_n = 0, req_in = 0, ack_in = 0;
  logic ack_out, req_out, capture;
  int checks = 0, failures = 0, tokens = 0;
  logic m;

  muller_stage dut (.clk, .rst_n, .req_in, .ack_out, .req_out, .ack_in, .capture);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Upstream: raise req, wait for ack, drop req, wait for ack low.
  // Downstream: acknowledge req_out after a random delay, 4-phase.
  initial begin
    m = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      // req_out after the last edge against the model
      checks++;
      if (req_out !== m || ack_out !== req_out) begin
        failures++;
        $display("FAIL n=%0d req_out=%b model=%b", n, req_out, m);
      end
      // upstream
      if (!req_in && !ack_out && ($urandom % 2)) req_in = 1;
      else if (req_in && ack_out) req_in = 0;
      // downstream
      if (req_out && !ack_in && ($urandom % 3 == 0)) ack_in = 1;
      else if (!req_out && ack_in && ($urandom % 2)) ack_in = 0;
      #1;
      checks++;
      if (capture !== (req_in & ~ack_in & ~m)) begin
        failures++;
        $display("FAIL n=%0d capture=%b", n, capture);
      end
      if (capture) tokens++;
      // value the next edge gives
      if (req_in == ~ack_in) m = req_in;
    end
    checks++;
    if (tokens < 50) begin
      failures++;
      $display("FAIL only %0d tokens passed", tokens);
    end
    $display("tokens=%0d", tokens);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
