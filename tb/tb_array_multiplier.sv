// tb_array_multiplier: self-checking testbench of the unsigned array
// multiplier. A 4x4 instance is checked exhaustively; the 16x16 default with
// corner operands (0, 1, all ones, single bits) and random operands. The
// reference is the integer product.
module tb_array_multiplier;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [15:0] a, b;
  logic [31:0] p;

  array_multiplier #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));
  array_multiplier          dut  (.a(a),  .b(b),  .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (p !== 32'(x) * 32'(y)) begin
      failures++;
      $display("FAIL %h*%h = %h", x, y, p);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      checks++;
      if (p4 !== 8'(a4) * 8'(b4)) begin
        failures++;
        $display("FAIL 4x4 %h*%h = %h", a4, b4, p4);
      end
    end
    check16(16'h0000, 16'hFFFF);
    check16(16'h0001, 16'hFFFF);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h8000, 16'h8000);
    for (int i = 0; i < 16; i++) check16(16'(1) << i, 16'hFFFF);
    for (int i = 0; i < 3000; i++) check16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
