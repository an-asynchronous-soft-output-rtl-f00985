// tb_st_adder: random and corner operands for the self-timed adder; checks
// sum, carry out and completion against integer arithmetic, and that the
// rails report "not ready" (done = 0) while go is low.
module tb_st_adder;
  localparam int W = 8;
  logic go;
  logic [W-1:0] a, b, sum;
  logic cin, cout, done;
  int checks = 0, failures = 0;
  logic clk = 0;

  st_adder #(.W(W)) dut (.go, .a, .b, .cin, .sum, .cout, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] ref_sum;
    a = ta; b = tb_; cin = tc; go = 1; #1;
    ref_sum = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    checks++;
    if ({cout, sum} !== ref_sum || done !== 1'b1) begin
      failures++;
      $display("FAIL %0d+%0d+%0d: got %0d done=%b", ta, tb_, tc, {cout, sum}, done);
    end
    go = 0; #1;
    checks++;
    if (done !== 1'b0 || cout !== 1'b0) begin
      failures++;
      $display("FAIL go=0 still done=%b cout=%b", done, cout);
    end
  endtask

  initial begin
    check('0, '0, 0);
    check('1, '0, 1);
    check('1, '1, 1);
    check(8'h80, 8'h80, 0);
    for (int n = 0; n < 3000; n++) check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
