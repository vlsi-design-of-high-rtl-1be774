// mac_pkg: types and constants shared by the MAC unit and its testbenches.
//
// adder_arch_e selects which carry-skip adder closes the accumulation loop:
// the conventional carry-skip adder (equal 4-bit blocks with a 2:1 skip
// multiplexer each), the concatenation-incrementation carry-skip adder
// (CI-CSKA) with variable stage sizes, or the hybrid variable-latency CI-CSKA
// whose middle stage is a Brent-Kung prefix adder. The hybrid adder is the
// proposed one and therefore the default of the MAC unit.
package mac_pkg;

  typedef enum logic [1:0] {
    ARCH_CONV_CSKA   = 2'd0,
    ARCH_CI_CSKA     = 2'd1,
    ARCH_HYBRID_CSKA = 2'd2
  } adder_arch_e;

  // Operand width of the MAC unit (16x16-bit multiplier).
  localparam int unsigned MAC_N = 16;

  // Stage widths (least significant stage first) of the 32-bit hybrid adder
  // used inside the MAC unit, and the index of its parallel-prefix nucleus.
  // Stages grow towards the nucleus and shrink after it.
  localparam int unsigned HYB32_NSTAGE = 6;
  localparam int unsigned HYB32_STAGE_W [HYB32_NSTAGE] = '{4, 5, 6, 8, 5, 4};
  localparam int unsigned HYB32_NUCLEUS = 3;

endpackage
