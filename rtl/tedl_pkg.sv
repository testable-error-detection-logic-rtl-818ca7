// tedl_pkg: types and constants shared by the testable error detection logic (TEDL).
//
// The TEDL has four operating modes selected by two global test inputs, tm and tv.
// Each pipeline stage of the error detection logic exposes six observation outputs
// (named after the nets they are taken from: w20, w11, w12, w21, w22, w23). For every
// mode there is one fault-free ("gold") value of those six bits, which test software
// compares against the bits shifted out of the scan chain. Any difference marks a
// stuck-at fault inside the stage's detection logic.
//
// The mode set and the gold patterns are those of the design description; the bit
// order inside tedl_obs_t (w20 first) follows the order in which the outputs are listed.
package tedl_pkg;

  // Operating mode: {tm, tv}
  typedef enum logic [1:0] {
    MODE_NM   = 2'b00,  // normal mode
    MODE_NMTV = 2'b01,  // normal mode, timing violation forced on every detector
    MODE_TM   = 2'b10,  // test mode: C-element bypassed by the AND checker G5
    MODE_TMTV = 2'b11   // test mode with forced timing violation
  } tedl_mode_e;

  // Six observation outputs of one stage
  typedef struct packed {
    logic w20;  // AND of all Err1 (G7): every Q-Flop flagged an error
    logic w11;  // OR  of all Err1 (G3): some Q-Flop flagged an error (to controller)
    logic w12;  // AND of all Err0 (G4): no Q-Flop flagged an error (to controller)
    logic w21;  // OR  of all Err0 (G8): some Q-Flop saw no error
    logic w22;  // AND of all G6 outputs (G9): every detector output is high
    logic w23;  // OR  of all G6 outputs (G10): some detector group is all high
  } tedl_obs_t;

  localparam int unsigned OBS_BITS = $bits(tedl_obs_t);

  // Fault-free observation pattern of a stage for a mode, valid while the stage's
  // Q-Flops hold a sample and the data inputs are stable.
  function automatic tedl_obs_t gold_pattern(tedl_mode_e mode);
    tedl_obs_t g;
    if (mode == MODE_NMTV || mode == MODE_TMTV)
      g = '{w20: 1'b1, w11: 1'b1, w12: 1'b0, w21: 1'b0, w22: 1'b1, w23: 1'b1};
    else
      g = '{w20: 1'b0, w11: 1'b0, w12: 1'b1, w21: 1'b1, w22: 1'b0, w23: 1'b0};
    return g;
  endfunction

endpackage
