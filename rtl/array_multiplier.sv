// array_multiplier: unsigned N x N array multiplier.
//
// The N*N partial-product bits a[j] & b[i] come from a plane of two-input AND
// gates. Row 0 is the partial product a & b[0]. Each following row i adds
// partial product i to the running partial sum, shifted right by one place,
// with an N-bit ripple-carry row: a half adder in the least significant cell
// (it has no carry in) and full adders above it. The bit that falls off the
// bottom of each row is product bit i; the last row gives the upper N bits.
// The shifts are pure wiring. There are N-1 rows of N-bit adders, so the
// worst-case delay is about (N-1)+(N-2) carry delays plus N-1 sum delays plus
// one AND gate.
//
// Interface: p = a * b, 2N bits, combinational. The structure (AND plane,
// ripple rows of full and half adders) is the one the design describes; the
// exact placement of the half adders is this implementation's choice.
module array_multiplier #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  // pp[i][j] = a[j] & b[i]
  logic [N-1:0] pp [N];
  // Partial sum and carry out of each row.
  logic [N-1:0] row_sum [N];
  logic         row_co  [N];

  for (genvar i = 0; i < N; i++) begin : g_pp
    assign pp[i] = a & {N{b[i]}};
  end

  assign row_sum[0] = pp[0];
  assign row_co[0]  = 1'b0;
  assign p[0]       = row_sum[0][0];

  for (genvar i = 1; i < N; i++) begin : g_row
    // Running sum of the row above, shifted right by one bit.
    logic [N-1:0] x;
    logic [N:0]   c;
    assign x = {row_co[i-1], row_sum[i-1][N-1:1]};

    half_adder u_ha (
      .a   (x[0]),
      .b   (pp[i][0]),
      .sum (row_sum[i][0]),
      .cout(c[1])
    );
    assign c[0] = 1'b0;

    for (genvar j = 1; j < N; j++) begin : g_cell
      full_adder u_fa (
        .a   (x[j]),
        .b   (pp[i][j]),
        .cin (c[j]),
        .sum (row_sum[i][j]),
        .cout(c[j+1])
      );
    end

    assign row_co[i] = c[N];
    assign p[i]      = row_sum[i][0];
  end

  assign p[2*N-1:N] = {row_co[N-1], row_sum[N-1][N-1:1]};
endmodule
