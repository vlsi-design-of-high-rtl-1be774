// mac_unit: pipelined 16x16-bit multiplier-accumulator.
//
// Datapath, in the order of the design's block diagram: an unsigned array
// multiplier forms the 2N-bit product of the two operands; a carry-skip adder
// adds the product to the content of the accumulator; the accumulator
// register stores the sum, and its output is fed back to the adder for the
// next operation. acc <- acc + dataa * datab for every accepted operand pair.
//
// Pipeline (this implementation's choice; the design asks for a pipelined MAC
// without fixing the stages):
//   stage 1  operand registers dataa_q / datab_q
//   stage 2  array multiplier, product register mult_q
//   stage 3  carry-skip adder closing the loop through the accumulator
// The running sum including an operand pair accepted at rising edge k is in
// dataout after edge k+2 (k+3 for a two-cycle addition), and one pair can be
// accepted per cycle.
//
// Adder: ARCH selects the adder of the accumulation loop. The default is the
// proposed hybrid variable-latency CI-CSKA. Its predictor marks additions
// whose carry may have to pass the nucleus stage's skip logic; such an
// addition is given two cycles: the pipeline stalls for one cycle
// (in_ready low, the operands of the adder held) and the accumulator loads on
// the second. ARCH_CI_CSKA uses the same stage plan with a CI stage in place
// of the nucleus, and ARCH_CONV_CSKA the conventional carry-skip adder; the
// latency of both is always one cycle.
//
// Interface: rst is synchronous, active high, and clears the pipeline and the
// accumulator. in_valid/in_ready is a valid-ready handshake: a pair is taken
// at a rising edge where both are high. out_valid pulses for one cycle each
// time the accumulator has been updated. dataout is the ACC_W-bit running sum
// (wrapping modulo 2^ACC_W) and carryout the carry out of the latest
// accumulation, i.e. bit ACC_W of acc + product. two_cycle_add is high during
// the extra cycle of a two-cycle addition.
module mac_unit
  import mac_pkg::*;
#(
  parameter int unsigned N       = MAC_N,
  parameter int unsigned ACC_W   = 2 * N,
  parameter adder_arch_e ARCH    = ARCH_HYBRID_CSKA,
  // Conventional adder: block size.
  parameter int unsigned CONV_BLOCK = 4,
  // CI-CSKA / hybrid adder: stage sizes (least significant first) and the
  // index of the nucleus stage (hybrid only).
  parameter int unsigned HYB_NSTAGE = HYB32_NSTAGE,
  parameter int unsigned HYB_STAGE_W [HYB_NSTAGE] = HYB32_STAGE_W,
  parameter int unsigned HYB_NUCLEUS = HYB32_NUCLEUS
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [N-1:0]     dataa,
  input  logic [N-1:0]     datab,
  output logic [ACC_W-1:0] dataout,
  output logic             carryout,
  output logic             out_valid,
  output logic             two_cycle_add
);
  // ---------------------------------------------------------------- control
  logic stall;        // extra cycle of a two-cycle addition
  logic waited;       // the extra cycle has been spent
  logic v1_q, v2_q;   // stage valid flags
  logic add_two_cycle;

  assign stall         = v2_q && add_two_cycle && !waited;
  assign in_ready      = !stall;
  assign two_cycle_add = stall;

  // ---------------------------------------------------- stage 1: operands
  logic [N-1:0] dataa_q, datab_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1_q    <= 1'b0;
      dataa_q <= '0;
      datab_q <= '0;
    end else if (!stall) begin
      v1_q <= in_valid;
      if (in_valid) begin
        dataa_q <= dataa;
        datab_q <= datab;
      end
    end
  end

  // ---------------------------------------------------- stage 2: multiply
  logic [2*N-1:0] mult, mult_q;

  array_multiplier #(.N(N)) u_mult (
    .a(dataa_q),
    .b(datab_q),
    .p(mult)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      v2_q   <= 1'b0;
      mult_q <= '0;
    end else if (!stall) begin
      v2_q <= v1_q;
      if (v1_q) mult_q <= mult;
    end
  end

  // ------------------------------------------- stage 3: add and accumulate
  logic [ACC_W-1:0] acc, add_b, add_sum;
  logic             acc_carry, add_cout, acc_load;

  assign add_b = ACC_W'(mult_q);

  if (ARCH == ARCH_HYBRID_CSKA || ARCH == ARCH_CI_CSKA) begin : g_ci
    // The plain CI-CSKA is the hybrid stage plan without a nucleus stage.
    cska_hybrid #(
      .WIDTH  (ACC_W),
      .NSTAGE (HYB_NSTAGE),
      .STAGE_W(HYB_STAGE_W),
      .NUCLEUS((ARCH == ARCH_HYBRID_CSKA) ? HYB_NUCLEUS : 0)
    ) u_add (
      .a        (acc),
      .b        (add_b),
      .cin      (1'b0),
      .sum      (add_sum),
      .cout     (add_cout),
      .two_cycle(add_two_cycle)
    );
  end else begin : g_conv
    cska_conv #(
      .WIDTH(ACC_W),
      .BLOCK(CONV_BLOCK)
    ) u_add (
      .a   (acc),
      .b   (add_b),
      .cin (1'b0),
      .sum (add_sum),
      .cout(add_cout)
    );
    assign add_two_cycle = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) waited <= 1'b0;
    else     waited <= stall;
  end

  assign acc_load = v2_q && !stall;

  accumulator #(.WIDTH(ACC_W)) u_acc (
    .clk    (clk),
    .rst    (rst),
    .load   (acc_load),
    .d      (add_sum),
    .d_carry(add_cout),
    .acc    (acc),
    .carry  (acc_carry)
  );

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= acc_load;
  end

  assign dataout  = acc;
  assign carryout = acc_carry;

  // A two-cycle addition never stalls for more than one cycle.
  assert property (@(posedge clk) disable iff (rst) stall |=> !stall);

  initial begin
    assert (ACC_W >= 2 * N)
      else $error("mac_unit: ACC_W (%0d) must hold the %0d-bit product", ACC_W, 2 * N);
  end
endmodule
