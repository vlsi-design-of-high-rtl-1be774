// tb_mac_full: one complete multiply-accumulate operation on the MAC unit at
// its default configuration (16x16-bit operands, 32-bit accumulator, hybrid
// variable-latency carry-skip adder).
//
// The operation is one output sample of a 64-tap FIR filter: the dot product
// of 64 coefficient / sample pairs, streamed back to back with in_valid held
// high. Coefficients and samples are random 12-bit values, so the sum fits in
// 32 bits. The final accumulator content is compared with the dot product
// computed in the testbench, and the number of cycles the stream takes is
// checked: 64 accepting cycles, plus one cycle for every two-cycle addition,
// plus the two pipeline edges after the last operand.
module tb_mac_full;
  localparam int TAPS = 64;

  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst, in_valid, in_ready, out_valid, carryout, two_cycle_add;
  logic [15:0] dataa, datab;
  logic [31:0] dataout;

  logic [15:0] coef   [TAPS];
  logic [15:0] sample [TAPS];
  logic [31:0] expected;
  int          n_out, n_stall, cycles;

  mac_unit dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
    .dataa(dataa), .datab(datab), .dataout(dataout), .carryout(carryout),
    .out_valid(out_valid), .two_cycle_add(two_cycle_add)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Edge numbers: the first pair is accepted at edge first_edge, the last
  // result appears after edge last_edge.
  int edge_no = 0, first_edge = -1, last_edge = -1;
  always @(posedge clk) edge_no <= edge_no + 1;

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      n_out++;
      last_edge = edge_no;
    end
    if (!rst && two_cycle_add) n_stall++;
    if (!rst && in_valid && in_ready && first_edge < 0) first_edge = edge_no + 1;
  end

  initial begin
    expected = '0;
    for (int i = 0; i < TAPS; i++) begin
      coef[i]   = 16'($urandom % 4096);
      sample[i] = 16'($urandom % 4096);
      expected += 32'(coef[i]) * 32'(sample[i]);
    end
    n_out = 0; n_stall = 0; cycles = 0;
    rst = 1'b1; in_valid = 1'b0; dataa = '0; datab = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    for (int i = 0; i < TAPS; i++) begin
      in_valid = 1'b1;
      dataa = coef[i];
      datab = sample[i];
      @(posedge clk);
      cycles++;
      while (!in_ready) begin   // the pair was not taken at this edge
        @(posedge clk);
        cycles++;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (n_out < TAPS && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end

    checks++;
    if (dataout !== expected || carryout !== 1'b0) begin
      failures++;
      $display("FAIL dot product %h, expected %h", dataout, expected);
    end
    checks++;
    if (n_out != TAPS) begin
      failures++;
      $display("FAIL %0d results, expected %0d", n_out, TAPS);
    end
    // TAPS-1 edges between the first and the last accepted pair, one more
    // per two-cycle addition, and two pipeline edges to the accumulator.
    checks++;
    if (last_edge - first_edge != TAPS - 1 + n_stall + 2) begin
      failures++;
      $display("FAIL stream took %0d edges, expected %0d", last_edge - first_edge,
               TAPS - 1 + n_stall + 2);
    end
    $display("dot product %0d in %0d cycles, %0d two-cycle additions", dataout, cycles, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
