// half_adder: one-bit half adder, used at the least significant cell of each
// partial-product row of the array multiplier.
// sum = a ^ b, cout = a & b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b;
  assign cout = a & b;
endmodule
