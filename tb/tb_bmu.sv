// tb_bmu: all 512 combinations of the three 3-bit soft symbols; each of
// the eight branch metrics is compared with sum_i (code bit i ? -y_i : y_i)
// computed with integers, and completion is checked.
module tb_bmu;
  import sova_pkg::*;
  logic go;
  sym_t y [NSYM];
  bm_t  bm [NSTATE];
  logic done;
  int checks = 0, failures = 0;
  logic clk = 0;

  bmu dut (.go, .y, .bm, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    go = 0;
    y = '{default: '0};
    #1;
    checks++;
    if (done !== 0) begin failures++; $display("FAIL done with go=0"); end
    for (int v = 0; v < 512; v++) begin
      for (int i = 0; i < NSYM; i++) y[i] = sym_t'(v >> (3 * i));
      go = 1; #1;
      checks++;
      if (done !== 1) begin failures++; $display("FAIL no completion v=%0d", v); end
      for (int c = 0; c < NSTATE; c++) begin
        int e;
        e = 0;
        for (int i = 0; i < NSYM; i++) e += ((c >> i) & 1) ? -int'(y[i]) : int'(y[i]);
        checks++;
        if (int'(bm[c]) != e) begin
          failures++;
          $display("FAIL v=%0d code=%0d bm=%0d expected %0d", v, c, bm[c], e);
        end
      end
      go = 0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
