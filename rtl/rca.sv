// rca: WIDTH-bit ripple-carry adder, a chain of full adders in which each
// cell waits for the carry of the cell below it.
//
// It is the building block of every carry-skip stage (the 4-bit RCA blocks of
// the conventional carry-skip adder, the RCA of each stage of the hybrid
// adder). Interface: {cout, sum} = a + b + cin, combinational, delay grows
// linearly with WIDTH. The default of 4 bits is the block size of the
// conventional 16-bit carry-skip adder.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
