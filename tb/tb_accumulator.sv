// tb_accumulator: self-checking testbench of the accumulator register.
// Drives random load / hold / reset sequences and compares the register
// against a model kept in the testbench: reset clears, load takes the input,
// otherwise the content holds.
module tb_accumulator;
  int checks = 0, failures = 0, resets = 0, loads = 0, holds = 0;

  logic        clk = 1'b0;
  logic        rst, load, d_carry, carry;
  logic [31:0] d, acc;
  logic [31:0] m_acc;
  logic        m_carry;

  accumulator dut (.clk(clk), .rst(rst), .load(load), .d(d), .d_carry(d_carry),
                   .acc(acc), .carry(carry));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b0; d = '0; d_carry = 1'b0;
    m_acc = '0; m_carry = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      rst     = ($urandom % 16) == 0;
      load    = 1'($urandom);
      d       = $urandom;
      d_carry = 1'($urandom);
      @(posedge clk);
      if (rst)       begin m_acc = '0; m_carry = 1'b0; resets++; end
      else if (load) begin m_acc = d;  m_carry = d_carry; loads++; end
      else holds++;
      @(negedge clk);
      checks++;
      if (acc !== m_acc || carry !== m_carry) begin
        failures++;
        $display("FAIL cycle %0d: acc=%h carry=%b expected %h %b", i, acc, carry, m_acc, m_carry);
      end
    end
    $display("resets=%0d loads=%0d holds=%0d", resets, loads, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
