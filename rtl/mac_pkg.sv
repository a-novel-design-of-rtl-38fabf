// Shared types and constants of the 16-bit multiply-accumulate unit.
//
// adder_kind_e selects which of the three 32-bit carry skip adders the MAC uses:
// the conventional multiplexer-skip CSKA, the concatenation-incrementation CSKA
// (CI-CSKA) with AOI/OAI skip gates, or the hybrid CI-CSKA whose middle stage is an
// 8-bit Brent-Kung parallel prefix adder. The hybrid one is the default. The stage
// sizes of the 32-bit adders are this design's choice; only the 8-bit nucleus width
// is given by the architecture.
package mac_pkg;

  typedef enum logic [1:0] {
    ADD_CONV   = 2'd0,  // mux skip logic, plain RCA blocks
    ADD_CI     = 2'd1,  // fixed stage size CI-CSKA
    ADD_HYBRID = 2'd2   // variable stage size CI-CSKA with prefix nucleus
  } adder_kind_e;

  localparam int unsigned OP_W  = 16;            // operand width of the MAC
  localparam int unsigned SUM_W = 2 * OP_W;      // product and adder width
  localparam int unsigned ACC_W = SUM_W + 1;     // accumulator: carry + sum

  // Stage sizes of the hybrid 32-bit adder, stage 1 first. Stage HYB_NUC is the
  // 8-bit prefix nucleus.
  localparam int unsigned HYB_Q   = 7;
  localparam int unsigned HYB_NUC = 4;
  localparam int unsigned HYB_SIZES [HYB_Q] = '{3, 4, 5, 8, 5, 4, 3};

endpackage
