// Shared types for the two regulator controllers.
//
// ed_state_t is the state of the event-driven two-step search sequencer
// (linear search with the circular shifting register, then the subrange
// SAR). sdc_state_t is the state of the coarse controller of the
// slope-detector regulator (slope compensation, fine loop, false-lock
// coarse stepping). The encodings are this design's own choice.
package dldo_pkg;

  // Event-driven DLDO: idle (output inside the window), linear search,
  // one-cycle SAR_DUMP, subrange binary search.
  typedef enum logic [1:0] {
    ED_IDLE   = 2'd0,
    ED_LINEAR = 2'd1,
    ED_DUMP   = 2'd2,
    ED_SAR    = 2'd3
  } ed_state_t;

  // Slope-detector DLDO coarse controller.
  typedef enum logic [1:0] {
    SDC_FINE  = 2'd0,   // fine loop regulating
    SDC_SLOPE = 2'd1,   // slope-dependent compensation in progress
    SDC_FLOCK = 2'd2    // false lock: replica on pass gates, coarse stepping
  } sdc_state_t;

endpackage
