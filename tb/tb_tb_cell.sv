// tb_tb_cell: one traceback cell, driven as the ring would drive it.
// Each round: the cell is made head by `accept` with head_next set, and
// its sequencer must write the memories, raise ai (and drop it after ri
// falls), start the traceback from state 000 one clock later, take the
// returning token without passing it on, raise ro until ao, and go idle
// after ao falls. Then, as a non-head cell, it must take an ordinary or
// pSOVA step on random input with the soft update, ignore an `accept`
// meant for another cell, and delay eval by one clock. All expected
// values come from the memory contents the testbench wrote.
module tb_tb_cell;
  import sova_pkg::*;
  logic clk = 0, rst_n = 0, head = 0, head_next = 0, sova = 0, accept = 0;
  logic ri = 0, ao = 0, eval_in = 0;
  logic ai_o, ro_o, busy_o, done_o, eval_out;
  state_t wr_ptr [NSTATE];
  delta_t wr_delta [NSTATE];
  trace_t tin, tout;
  state_t mp [NSTATE];
  delta_t md [NSTATE];
  int checks = 0, failures = 0, updates = 0;

  tb_cell dut (.clk, .rst_n, .head, .head_next, .sova, .accept, .ri, .ai_o, .ro_o, .ao,
               .busy_o, .done_o, .wr_ptr, .wr_delta, .eval_in, .tin, .eval_out, .tout);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input trace_t e, input string what);
    checks++;
    if (eval_out !== 1'b1 || tout !== e) begin
      failures++;
      $display("FAIL %s: eval_out=%b tout=%p expected %p", what, eval_out, tout, e);
    end
  endtask

  task automatic expect_hs(input logic e_ai, input logic e_ro, input logic e_busy, input string what);
    checks++;
    if (ai_o !== e_ai || ro_o !== e_ro || busy_o !== e_busy) begin
      failures++;
      $display("FAIL %s: ai=%b ro=%b busy=%b expected %b %b %b", what, ai_o, ro_o, busy_o, e_ai, e_ro, e_busy);
    end
  endtask

  initial begin
    tin = '0;
    for (int s = 0; s < NSTATE; s++) begin wr_ptr[s] = '0; wr_delta[s] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      trace_t e;
      // ---- become head and run one handshake round ----
      @(negedge clk);
      for (int s = 0; s < NSTATE; s++) begin
        mp[s] = state_t'($urandom); md[s] = delta_t'($urandom);
        wr_ptr[s] = mp[s]; wr_delta[s] = md[s];
      end
      ri = 1; accept = 1; head_next = 1; sova = 1'($urandom);
      @(negedge clk);                       // WRITE
      accept = 0; head_next = 0; head = 1;
      expect_hs(0, 0, 1, "write");
      @(negedge clk);                       // START
      expect_hs(1, 0, 1, "start");
      // change the bus: the memory must already hold the written data
      for (int s = 0; s < NSTATE; s++) begin wr_ptr[s] = ~mp[s]; wr_delta[s] = ~md[s]; end
      ri = 0;
      e = sova ? '{s: mp[0], sc: mp[0] ^ 3'b100, rel: DELTA_INF}
               : '{s: mp[0], sc: mp[0], rel: DELTA_INF};
      @(negedge clk);                       // RUN
      expect_out(e, "head start");
      expect_hs(0, 0, 1, "run, ai dropped after ri");
      repeat ($urandom % 3) @(negedge clk);
      eval_in = 1;                          // token returns
      #1;
      checks++;
      if (done_o !== 1) begin failures++; $display("FAIL done_o not raised"); end
      @(negedge clk);
      eval_in = 0;
      checks++;
      if (eval_out !== 0) begin failures++; $display("FAIL head passed token on"); end
      expect_hs(0, 1, 1, "out");
      repeat ($urandom % 3) @(negedge clk);
      expect_hs(0, 1, 1, "out held");
      ao = 1;
      @(negedge clk);
      expect_hs(0, 0, 1, "release");
      ao = 0;
      @(negedge clk);
      expect_hs(0, 0, 0, "idle");
      head = 0;
      // ---- an accept for another cell must not write here ----
      accept = 1; ri = 1;
      @(negedge clk);
      accept = 0; ri = 0;
      expect_hs(0, 0, 0, "accept for another cell");
      // ---- ordinary or pSOVA step as a non-head cell ----
      tin = '{s: state_t'($urandom), sc: state_t'($urandom), rel: delta_t'($urandom)};
      sova = 1'($urandom);
      eval_in = 1;
      if (sova) e = '{s: mp[tin.s], sc: mp[tin.s] ^ 3'b100, rel: DELTA_INF};
      else begin
        e.s = mp[tin.s]; e.sc = mp[tin.sc]; e.rel = tin.rel;
        if (tin.s[0] != tin.sc[0] && md[tin.s] < tin.rel) begin e.rel = md[tin.s]; updates++; end
      end
      @(negedge clk);
      eval_in = 0;
      expect_out(e, sova ? "pSOVA step" : "ordinary step");
      @(negedge clk);
      checks++;
      if (eval_out !== 0) begin failures++; $display("FAIL eval held"); end
    end
    checks++;
    if (updates == 0) begin failures++; $display("FAIL soft update never taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
