// tb_mac_unit: end-to-end testbench of the MAC unit.
//
// Three MAC units run side by side at their default sizes (16x16-bit
// operands, 32-bit accumulator): one with the default hybrid variable-latency
// CI-CSKA in the accumulation loop, one with the conventional carry-skip adder
// and one with the plain CI-CSKA. All get the same operand stream, with random gaps in in_valid, runs of operands
// chosen to make the nucleus stage of the hybrid adder propagate (two-cycle
// additions), large operands that overflow the 32-bit accumulator, and resets
// in the middle of an accumulation. A model in the testbench computes the
// running sum and carry independently; every out_valid is checked against it,
// as is the latency: the sum of a pair accepted at rising edge k is visible
// after edge k+2, plus, in the hybrid unit, one edge for each stall cycle in
// between. The two other units never stall; they take a pair only when the
// hybrid unit does, so that all three accumulate the same stream.
// Counted mechanisms, each of which must occur: two-cycle additions (stalls),
// accumulator overflows (carryout), resets during accumulation, idle input
// cycles and back-pressure seen by a waiting operand.
module tb_mac_unit;
  import mac_pkg::*;

  localparam int N = 16;
  localparam int W = 2 * N;
  localparam int LAT = 2;   // edges after the accepting edge

  int checks = 0, failures = 0;
  int n_stall = 0, n_ovf = 0, n_reset = 0, n_idle = 0, n_backpressure = 0, n_out = 0;

  logic clk = 1'b0;
  logic rst;
  logic in_valid;
  logic [N-1:0] dataa, datab;

  logic          h_ready, h_ovalid, h_carry, h_tc;
  logic [W-1:0]  h_out;
  logic          c_ready, c_ovalid, c_carry, c_tc;
  logic [W-1:0]  c_out;
  logic          i_ready, i_ovalid, i_carry, i_tc;
  logic [W-1:0]  i_out;

  mac_unit dut_h (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(h_ready),
    .dataa(dataa), .datab(datab), .dataout(h_out), .carryout(h_carry),
    .out_valid(h_ovalid), .two_cycle_add(h_tc)
  );

  mac_unit #(.ARCH(ARCH_CONV_CSKA)) dut_c (
    .clk(clk), .rst(rst), .in_valid(in_valid && h_ready), .in_ready(c_ready),
    .dataa(dataa), .datab(datab), .dataout(c_out), .carryout(c_carry),
    .out_valid(c_ovalid), .two_cycle_add(c_tc)
  );

  mac_unit #(.ARCH(ARCH_CI_CSKA)) dut_i (
    .clk(clk), .rst(rst), .in_valid(in_valid && h_ready), .in_ready(i_ready),
    .dataa(dataa), .datab(datab), .dataout(i_out), .carryout(i_carry),
    .out_valid(i_ovalid), .two_cycle_add(i_tc)
  );

  always #5 clk = ~clk;

  // Edge counter.
  int edge_no = 0;
  always @(posedge clk) edge_no <= edge_no + 1;

  // Expected results per accepted pair, in order.
  typedef struct {
    logic [W-1:0] sum;
    logic         carry;
    int           edge_acc;
    int           stalls_acc;
  } exp_t;
  exp_t q_h[$];
  exp_t q_c[$];
  exp_t q_i[$];

  logic [W-1:0] m_acc;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model and output checks, sampled between edges.
  int stall_total = 0;
  always @(negedge clk) begin
    if (!rst) begin
      // Outputs that became visible at the last edge.
      if (h_ovalid) begin
        exp_t e;
        checks++;
        n_out++;
        if (q_h.size() == 0) begin
          failures++;
          $display("FAIL hybrid: unexpected out_valid");
        end else begin
          e = q_h.pop_front();
          if (h_out !== e.sum || h_carry !== e.carry) begin
            failures++;
            $display("FAIL hybrid: dataout=%h carry=%b expected %h %b", h_out, h_carry, e.sum, e.carry);
          end
          if (edge_no - e.edge_acc != LAT + (stall_total - e.stalls_acc)) begin
            failures++;
            $display("FAIL hybrid latency: %0d edges, %0d stalls", edge_no - e.edge_acc,
                     stall_total - e.stalls_acc);
          end
        end
      end
      if (c_ovalid) begin
        exp_t e;
        checks++;
        if (q_c.size() == 0) begin
          failures++;
          $display("FAIL conv: unexpected out_valid");
        end else begin
          e = q_c.pop_front();
          if (c_out !== e.sum || c_carry !== e.carry) begin
            failures++;
            $display("FAIL conv: dataout=%h carry=%b expected %h %b", c_out, c_carry, e.sum, e.carry);
          end
          if (edge_no - e.edge_acc != LAT) begin
            failures++;
            $display("FAIL conv latency: %0d edges", edge_no - e.edge_acc);
          end
        end
      end
      if (i_ovalid) begin
        exp_t e;
        checks++;
        if (q_i.size() == 0) begin
          failures++;
          $display("FAIL ci: unexpected out_valid");
        end else begin
          e = q_i.pop_front();
          if (i_out !== e.sum || i_carry !== e.carry) begin
            failures++;
            $display("FAIL ci: dataout=%h carry=%b expected %h %b", i_out, i_carry, e.sum, e.carry);
          end
          if (edge_no - e.edge_acc != LAT) begin
            failures++;
            $display("FAIL ci latency: %0d edges", edge_no - e.edge_acc);
          end
        end
      end
      // The conventional and the plain CI adder never take two cycles.
      checks++;
      if (c_tc || !c_ready || i_tc || !i_ready) begin
        failures++;
        $display("FAIL conv/ci: stalled");
      end
      if (h_tc) begin
        n_stall++;
        stall_total++;
      end
    end
  end

  // Offer an operand pair until it is accepted; the model is updated at the
  // accepting edge.
  task automatic offer(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [W:0] full;
    exp_t e;
    in_valid = 1'b1;
    dataa = x;
    datab = y;
    while (!h_ready) begin
      n_backpressure++;
      @(negedge clk);
    end
    @(posedge clk);
    full  = (W+1)'(m_acc) + (W+1)'(x) * (W+1)'(y);
    m_acc = full[W-1:0];
    if (full[W]) n_ovf++;
    e.sum = m_acc;
    e.carry = full[W];
    e.edge_acc = edge_no + 1;   // edge_no increments at this edge
    e.stalls_acc = stall_total;
    q_h.push_back(e);
    q_c.push_back(e);
    q_i.push_back(e);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic do_reset();
    in_valid = 1'b0;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    m_acc = '0;
    q_h.delete();
    q_c.delete();
    q_i.delete();
    n_reset++;
  endtask

  task automatic drain();
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    logic [N-1:0] x, y;
    rst = 1'b1; in_valid = 1'b0; dataa = '0; datab = '0; m_acc = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // A short dot product, checked against hand-computed values:
    // 3*4 + 5*6 + 100*200 = 20042.
    offer(16'd3, 16'd4);
    offer(16'd5, 16'd6);
    offer(16'd100, 16'd200);
    drain();
    checks++;
    if (h_out !== 32'd20042 || c_out !== 32'd20042 || i_out !== 32'd20042) begin
      failures++;
      $display("FAIL dot product: %0d / %0d / %0d, expected 20042", h_out, c_out, i_out);
    end

    // A two-cycle addition from a clean accumulator: 0xFF * 0x8000 = 0x007F8000,
    // whose bits [22:15] all propagate against an accumulator of zero.
    do_reset();
    offer(16'h00FF, 16'h8000);
    offer(16'h00FF, 16'h8000);
    drain();

    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < 1500; i++) begin
        case ($urandom % 8)
          0: begin x = 16'hFFFF; y = 16'($urandom | 32'hF000); end   // large: overflow
          1: begin                                                   // aim at the nucleus
               logic [W-1:0] want;
               want = ~m_acc & 32'h007F_8000;
               x = want[30:15] | 16'h1;
               y = 16'h8000;
             end
          default: begin x = 16'($urandom); y = 16'($urandom); end
        endcase
        offer(x, y);
        // Random idle cycles.
        if ($urandom % 4 == 0) begin
          n_idle++;
          repeat ($urandom % 3 + 1) @(negedge clk);
        end
      end
      drain();
      checks++;
      if (h_out !== m_acc || c_out !== m_acc || i_out !== m_acc) begin
        failures++;
        $display("FAIL end of round %0d: %h / %h expected %h", round, h_out, c_out, m_acc);
      end
      // Reset in the middle of an accumulation (operands in flight).
      offer(16'($urandom), 16'($urandom));
      do_reset();
      checks++;
      if (h_out !== '0 || c_out !== '0 || i_out !== '0 || h_carry || c_carry || i_carry) begin
        failures++;
        $display("FAIL reset did not clear the accumulator");
      end
    end

    // Every mechanism must have happened.
    checks++; if (n_stall == 0)        begin failures++; $display("FAIL no two-cycle addition"); end
    checks++; if (n_ovf == 0)          begin failures++; $display("FAIL no overflow"); end
    checks++; if (n_reset == 0)        begin failures++; $display("FAIL no reset"); end
    checks++; if (n_idle == 0)         begin failures++; $display("FAIL no idle cycle"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    checks++; if (q_h.size() != 0 || q_c.size() != 0 || q_i.size() != 0) begin failures++; $display("FAIL results missing"); end

    $display("outputs=%0d two-cycle additions=%0d overflows=%0d resets=%0d idle gaps=%0d back-pressure cycles=%0d",
             n_out, n_stall, n_ovf, n_reset, n_idle, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
