// islip_pkg: constants and types shared by the modified i-SLIP scheduler.
//
// N_PORTS is the number of devices; every device is both an input (it has
// a virtual output queue per output) and an output. N_ITER is the number of
// request/grant/accept iterations the scheduler runs per scheduling cycle.
// Both defaults (8 and 8) are the 8 x 8, i = 8 configuration the design is
// built for. The FSM state type is this design's own encoding.
package islip_pkg;

  parameter int unsigned N_PORTS = 8;
  parameter int unsigned N_ITER  = 8;

  // Scheduler controller states: waiting for START, running iterations,
  // presenting the finished match (DONE).
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_ITER = 2'd1,
    ST_DONE = 2'd2
  } sched_state_e;

endpackage
