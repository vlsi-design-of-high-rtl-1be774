// tb_cska_conv: self-checking testbench of the conventional carry-skip adder.
// Checks the 16-bit default (four 4-bit blocks) and a 32-bit instance against
// the integer sum, with random operands and with operands built so that whole
// blocks propagate (the skip multiplexers then pass the carry around the
// ripple chain). Counts how often a block skip was exercised with a carry.
module tb_cska_conv;
  int checks = 0, failures = 0, skips = 0;

  logic [15:0] a, b, s;
  logic        ci, co;
  logic [31:0] a32, b32, s32;
  logic        ci32, co32;

  cska_conv                           dut   (.a(a),   .b(b),   .cin(ci),   .sum(s),   .cout(co));
  cska_conv #(.WIDTH(32), .BLOCK(4))  dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    a = x; b = y; ci = c;
    #1;
    checks++;
    if ({co, s} !== 17'(x) + 17'(y) + 17'(c)) begin
      failures++;
      $display("FAIL cska16 %h+%h+%b = %b%h", x, y, c, co, s);
    end
    // A skip with a carry: a block that propagates while a carry enters it.
    for (int k = 0; k < 4; k++) begin
      logic [16:0] low;
      low = 17'(x & ((16'h1 << (4*k)) - 16'h1)) + 17'(y & ((16'h1 << (4*k)) - 16'h1)) + 17'(c);
      if (&(x[4*k +: 4] ^ y[4*k +: 4]) && low[4*k]) skips++;
    end
  endtask

  initial begin
    logic [15:0] x;
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'h0001, 1'b0);
    check16(16'h0F0F, 16'h00F1, 1'b0);
    for (int i = 0; i < 2000; i++) check16(16'($urandom), 16'($urandom), 1'($urandom));
    // Operands with propagating blocks: b = ~a in randomly chosen blocks.
    for (int i = 0; i < 2000; i++) begin
      x = 16'($urandom);
      check16(x, (~x & 16'($urandom | 32'hFF0F)) | (16'($urandom) & 16'h00F0), 1'($urandom));
      check16(x, ~x ^ (16'h1 << ($urandom % 16)), 1'($urandom));
    end
    for (int i = 0; i < 2000; i++) begin
      a32 = $urandom; b32 = (i % 2 == 0) ? ~a32 ^ (32'h1 << ($urandom % 32)) : $urandom;
      ci32 = 1'($urandom);
      #1;
      checks++;
      if ({co32, s32} !== 33'(a32) + 33'(b32) + 33'(ci32)) begin
        failures++;
        $display("FAIL cska32 %h+%h+%b = %b%h", a32, b32, ci32, co32, s32);
      end
    end
    checks++;
    if (skips == 0) begin
      failures++;
      $display("FAIL no block skip with a carry was exercised");
    end
    $display("block skips exercised: %0d", skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
