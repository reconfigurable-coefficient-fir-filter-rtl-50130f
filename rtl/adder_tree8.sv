// adder_tree8: eight-input adder array.
//
// Adds eight unsigned IN_W-bit operands in a balanced tree of three levels
// (4 + 2 + 1 two-input adders), each level one bit wider, so the IN_W+3-bit sum
// never overflows. The dynamic-threshold unit uses it twice, as the original
// design does: once to add a group of eight line samples (adder array 1) and
// once to add the eight group sums (adder array 2). Purely combinational; the
// caller registers the result.
module adder_tree8 #(
  parameter int unsigned IN_W = 10
) (
  input  logic [IN_W-1:0]   a [8],
  output logic [IN_W+2:0]   sum
);

  logic [IN_W:0]   l1 [4];
  logic [IN_W+1:0] l2 [2];

  always_comb begin
    for (int i = 0; i < 4; i++) l1[i] = (IN_W+1)'(a[2*i]) + (IN_W+1)'(a[2*i+1]);
    for (int i = 0; i < 2; i++) l2[i] = (IN_W+2)'(l1[2*i]) + (IN_W+2)'(l1[2*i+1]);
    sum = (IN_W+3)'(l2[0]) + (IN_W+3)'(l2[1]);
  end

endmodule
