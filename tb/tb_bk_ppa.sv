// tb_bk_ppa: self-checking testbench of the modified Brent-Kung prefix adder.
// The 8-bit default and a 6-bit instance (not a power of two) are checked
// exhaustively: sum against (a + b + cin) mod 2^W, the group generate against
// the carry out of a + b, and the group propagate against the AND of a ^ b.
module tb_bk_ppa;
  int checks = 0, failures = 0;

  logic [7:0] a8, b8, s8;
  logic       c8, g8, p8;
  logic [5:0] a6, b6, s6;
  logic       c6, g6, p6;

  bk_ppa                dut8 (.a(a8), .b(b8), .cin(c8), .sum(s8), .g_grp(g8), .p_grp(p8));
  bk_ppa #(.WIDTH(6))   dut6 (.a(a6), .b(b6), .cin(c6), .sum(s6), .g_grp(g6), .p_grp(p6));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] full8;
    logic [6:0] full6;
    for (int i = 0; i < 131072; i++) begin
      {c8, a8, b8} = 17'(i);
      #1;
      full8 = 9'(a8) + 9'(b8);
      checks++;
      if (s8 !== 8'(full8 + 9'(c8)) || g8 !== full8[8] || p8 !== &(a8 ^ b8)) begin
        failures++;
        if (failures < 10) $display("FAIL ppa8 %h+%h+%b: s=%h g=%b p=%b", a8, b8, c8, s8, g8, p8);
      end
    end
    for (int i = 0; i < 8192; i++) begin
      {c6, a6, b6} = 13'(i);
      #1;
      full6 = 7'(a6) + 7'(b6);
      checks++;
      if (s6 !== 6'(full6 + 7'(c6)) || g6 !== full6[6] || p6 !== &(a6 ^ b6)) begin
        failures++;
        if (failures < 10) $display("FAIL ppa6 %h+%h+%b: s=%h g=%b p=%b", a6, b6, c6, s6, g6, p6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
