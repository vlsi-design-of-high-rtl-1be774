// accumulator: the register that holds the running sum of the MAC unit.
//
// A bank of flip-flops, each with a multiplexer in front of it that chooses
// between zero (reset), the new sum from the adder (load) and the present
// content (hold). The present content is fed back to the adder, which adds the
// next product to it.
//
// Interface and timing: rst is synchronous and active high and clears the
// running sum and the carry flag at the next rising clock edge, as the design
// asks ("reset high, content zero"). With rst low and load high, acc and
// carry take d and d_carry at the rising edge. The synchronous style of the
// reset is this implementation's choice.
module accumulator #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  input  logic             d_carry,
  output logic [WIDTH-1:0] acc,
  output logic             carry
);
  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= '0;
      carry <= 1'b0;
    end else if (load) begin
      acc   <= d;
      carry <= d_carry;
    end
  end
endmodule
