// dds_pkg: types and default sizes shared by the amplitude-sequencing DDS.
//
// The amplitude core moves its point one unit along one axis per step; the
// step direction is carried between the core and the phase compensation
// counters as step_dir_e. The default sizes are this design's own choice:
// 12-bit signed amplitude words (a common DAC width), a 16-bit frequency
// tuning word and no truncation of the sample delays.
package dds_pkg;

  // Axis along which the generator moves on its next step.
  typedef enum logic {
    STEP_X = 1'b0,   // x changes by +-1 (cosine word moves)
    STEP_Y = 1'b1    // y changes by +-1 (sine word moves)
  } step_dir_e;

  localparam int unsigned DEF_WIDTH  = 12;  // amplitude word, two's complement
  localparam int unsigned DEF_FTW_W  = 16;  // frequency tuning word
  localparam int unsigned DEF_TRUNC  = 0;   // delay LSBs dropped (0 = full accuracy)

endpackage
