// tb_cska_hybrid: self-checking testbench of the hybrid variable-latency
// CI-CSKA. The 16-bit default (stages 3,4,4,3,2, nucleus bits [10:7]) and the
// 32-bit configuration used in the MAC unit (stages 4,5,6,8,5,4, nucleus bits
// [22:15]) are checked against the integer sum, and two_cycle against an
// all-propagate test of the nucleus bits. Operands are random, and also built
// to make the nucleus and the CI stages propagate so that carries travel the
// long path and the incrementation blocks overflow into the skip logic.
// A third instance, the 16-bit plan with no nucleus (plain CI-CSKA), is
// checked on the same operands; its prediction must stay low.
module tb_cska_hybrid;
  import mac_pkg::*;

  int checks = 0, failures = 0, long_path = 0;

  logic [15:0] a, b, s;
  logic        ci, co, tc;
  logic [31:0] a32, b32, s32;
  logic        ci32, co32, tc32;
  logic [15:0] sci;
  logic        coci, tcci;

  cska_hybrid dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co), .two_cycle(tc));
  cska_hybrid #(
    .WIDTH(32), .NSTAGE(HYB32_NSTAGE), .STAGE_W(HYB32_STAGE_W), .NUCLEUS(HYB32_NUCLEUS)
  ) dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32), .two_cycle(tc32));
  // Plain CI-CSKA: the same 16-bit stage plan without a nucleus stage.
  cska_hybrid #(.NUCLEUS(0)) dut_ci (.a(a), .b(b), .cin(ci), .sum(sci), .cout(coci), .two_cycle(tcci));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [15:0] pr;
    a = x; b = y; ci = c;
    #1;
    pr = x ^ y;
    checks++;
    if ({co, s} !== 17'(x) + 17'(y) + 17'(c) || tc !== &pr[10:7]) begin
      failures++;
      $display("FAIL hyb16 %h+%h+%b = %b%h tc=%b", x, y, c, co, s, tc);
    end
    checks++;
    if ({coci, sci} !== 17'(x) + 17'(y) + 17'(c) || tcci !== 1'b0) begin
      failures++;
      $display("FAIL ci16 %h+%h+%b = %b%h tc=%b", x, y, c, coci, sci, tcci);
    end
    if (tc) long_path++;
  endtask

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [31:0] pr;
    a32 = x; b32 = y; ci32 = c;
    #1;
    pr = x ^ y;
    checks++;
    if ({co32, s32} !== 33'(x) + 33'(y) + 33'(c) || tc32 !== &pr[22:15]) begin
      failures++;
      $display("FAIL hyb32 %h+%h+%b = %b%h tc=%b", x, y, c, co32, s32, tc32);
    end
    if (tc32) long_path++;
  endtask

  initial begin
    logic [15:0] x;
    logic [31:0] y;
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'h0001, 1'b0);
    check16(16'h7FFF, 16'h0001, 1'b0);
    check32(32'hFFFF_FFFF, 32'h0, 1'b1);
    check32(32'h007F_8000, 32'h0000_8000, 1'b0);
    for (int i = 0; i < 3000; i++) begin
      check16(16'($urandom), 16'($urandom), 1'($urandom));
      x = 16'($urandom);
      check16(x, ~x ^ (16'h1 << ($urandom % 16)), 1'($urandom));
      check16(x, ~x, 1'($urandom));
      check32($urandom, $urandom, 1'($urandom));
      y = $urandom;
      check32(y, ~y ^ (32'h1 << ($urandom % 32)), 1'($urandom));
      check32(y, (~y & 32'h007F_8000) | (32'($urandom) & 32'hFF80_7FFF), 1'($urandom));
    end
    checks++;
    if (long_path == 0) begin
      failures++;
      $display("FAIL two-cycle prediction never raised");
    end
    $display("two-cycle predictions: %0d", long_path);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
