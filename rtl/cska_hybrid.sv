// cska_hybrid: hybrid variable-latency concatenation-incrementation carry-skip
// adder (CI-CSKA) with a Brent-Kung nucleus stage.
//
// The operands are cut into NSTAGE stages of variable size STAGE_W (least
// significant stage first). Three kinds of stage:
//  * Stage 1 (index 0) is a plain ripple-carry adder fed by the adder's
//    carry in.
//  * Every other stage except the nucleus is a concatenation-incrementation
//    stage. Its RCA adds the stage's operand bits with a carry in of zero, so
//    it starts at once instead of waiting for the carry from below. Skip
//    logic (an AND-OR) forms the carry into the next stage as
//    C_out = C_rca | (P_stage & C_in), where P_stage is the AND of the bit
//    propagates; since the RCA starts from zero, C_rca is exactly the group
//    generate. An incrementation block then adds the incoming carry C_in to
//    the RCA's partial sum to give the stage's sum bits.
//  * The nucleus stage (index NUCLEUS) is a modified Brent-Kung parallel
//    prefix adder (bk_ppa). It exports its group generate and propagate to the
//    same kind of skip logic and uses the incoming carry only in its
//    postprocessing.
//
// Variable latency: a carry that enters the nucleus and must travel on through
// its skip logic to the upper stages is the long path. The predictor raises
// two_cycle when every bit of the nucleus propagates, i.e. when that long path
// can be active; the surrounding sequential logic then allows the addition
// two clock cycles instead of one. All other additions finish on the short
// paths, which end in the nucleus postprocessing or in the incrementation
// block of the top stage, within one cycle.
//
// With NUCLEUS = 0 there is no nucleus stage: every stage after the first is
// a CI stage, which is the plain CI-CSKA, and two_cycle stays low because its
// carry chain is a single-cycle path.
//
// Interface: {cout, sum} = a + b + cin and two_cycle, all combinational.
// The stage structure follows the design; the stage sizes, the nucleus
// position and the exact prediction rule are this implementation's choices.
module cska_hybrid #(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned NSTAGE  = 5,
  parameter int unsigned STAGE_W [NSTAGE] = '{3, 4, 4, 3, 2},
  parameter int unsigned NUCLEUS = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             two_cycle
);
  // Bit offset of stage j.
  function automatic int unsigned stage_off(int unsigned j);
    int unsigned s = 0;
    for (int unsigned k = 0; k < j; k++) s += STAGE_W[k];
    return s;
  endfunction

  // c[j] is the carry into stage j; c[NSTAGE] is the carry out.
  logic [NSTAGE:0] c;
  logic            nucleus_p;

  assign c[0] = cin;

  for (genvar j = 0; j < NSTAGE; j++) begin : g_stage
    localparam int unsigned OFF = stage_off(j);
    localparam int unsigned W   = STAGE_W[j];

    logic [W-1:0] sa, sb;
    assign sa = a[OFF +: W];
    assign sb = b[OFF +: W];

    if (j == 0) begin : g_first
      // Stage 1: plain RCA.
      rca #(.WIDTH(W)) u_rca (
        .a   (sa),
        .b   (sb),
        .cin (c[0]),
        .sum (sum[OFF +: W]),
        .cout(c[1])
      );
    end else if (j == int'(NUCLEUS)) begin : g_nucleus
      logic g_grp, p_grp;
      bk_ppa #(.WIDTH(W)) u_ppa (
        .a    (sa),
        .b    (sb),
        .cin  (c[j]),
        .sum  (sum[OFF +: W]),
        .g_grp(g_grp),
        .p_grp(p_grp)
      );
      // Skip logic.
      assign c[j+1]    = g_grp | (p_grp & c[j]);
      assign nucleus_p = p_grp;
    end else begin : g_ci
      logic [W-1:0] psum;
      logic         rca_co;
      logic         stage_p;
      // Concatenation: RCA with a carry in of zero.
      rca #(.WIDTH(W)) u_rca (
        .a   (sa),
        .b   (sb),
        .cin (1'b0),
        .sum (psum),
        .cout(rca_co)
      );
      // Skip logic.
      assign stage_p = &(sa ^ sb);
      assign c[j+1]  = rca_co | (stage_p & c[j]);
      // Incrementation block.
      assign sum[OFF +: W] = psum + W'(c[j]);
    end
  end

  assign cout      = c[NSTAGE];
  // One-cycle / two-cycle prediction.
  if (NUCLEUS == 0) begin : g_no_nucleus
    assign nucleus_p = 1'b0;
  end
  assign two_cycle = nucleus_p;

  initial begin
    assert (stage_off(NSTAGE) == WIDTH)
      else $error("cska_hybrid: stage widths add up to %0d, not WIDTH=%0d", stage_off(NSTAGE), WIDTH);
    assert (NUCLEUS < NSTAGE)
      else $error("cska_hybrid: NUCLEUS must be 0 (none) or a stage index above the first");
  end
endmodule
