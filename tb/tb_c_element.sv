// tb_c_element: checks the clocked C-element against its truth table:
// the output copies the inputs when they agree and holds when they differ.
module tb_c_element;
  logic clk = 0, rst_n = 0, a = 0, b = 0, q;
  int checks = 0, failures = 0;
  logic model;

  c_element dut (.clk, .rst_n, .a, .b, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      a = 1'($urandom); b = 1'($urandom);
      @(posedge clk); #1;
      if (a == b) model = a;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL n=%0d a=%b b=%b q=%b expected %b", n, a, b, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
