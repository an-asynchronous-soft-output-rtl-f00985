// st_adder: self-timed adder with a dual-rail carry chain and completion
// detection.
//
// Each stage computes the carry and its complement on separate rails:
//   C[i]  = A&B   | C[i-1]  & (A^B)
//   CN[i] = ~A&~B | CN[i-1] & (A^B)
// A stage whose operand bits are equal knows its carry at once; the others
// wait for the previous stage, so the carry only travels as far as it has
// to. Rails 00 mean "not ready"; a stage is complete when one rail is high,
// and `done` is the AND of all stages. The sum bit is the 3-input XOR of
// the operands and incoming carry. While `go` is low every rail is held at
// 00 (the return-to-zero phase) and done is low. The structure follows the
// carry-propagation block of the self-timed adder; the `go` gating of the
// rails is this design's choice. Purely combinational.
module st_adder #(
  parameter int W = 8
) (
  input  logic         go,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         done
);
  logic [W:0] c, cn;   // index 0 is the carry into bit 0

  assign c[0]  = go & cin;
  assign cn[0] = go & ~cin;
  for (genvar i = 0; i < W; i++) begin : g_cp
    assign c[i+1]  = go & ((a[i] & b[i])   | (c[i]  & (a[i] ^ b[i])));
    assign cn[i+1] = go & ((~a[i] & ~b[i]) | (cn[i] & (a[i] ^ b[i])));
  end

  assign sum  = a ^ b ^ c[W-1:0];
  assign cout = c[W];
  assign done = &(c | cn);
endmodule
