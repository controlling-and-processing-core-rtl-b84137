// telem_pkg: types and constants shared by the controller, the memory bank and the top of the
// telemetry controlling and processing core.
//
// ctrl_state_t encodes the five states of the function state machine. The values of Data
// Acquisition (0), Receive (1), Sleep (2) and Main (4) are the levels the controller state takes
// on the state axis of the reference simulation waveforms; Initialization has no printed value
// and is given 3 here. op_mode_t encodes the three operation modes selected from outside
// (two mode-select lines); that encoding is this design's own choice.
package telem_pkg;

  // Function state machine (Initialization, Data Acquisition, Receiving, Main, Sleep).
  typedef enum logic [2:0] {
    ST_DAQ   = 3'd0,
    ST_RX    = 3'd1,
    ST_SLEEP = 3'd2,
    ST_INIT  = 3'd3,
    ST_MAIN  = 3'd4
  } ctrl_state_t;

  // Operation modes of the power-control state machine.
  typedef enum logic [1:0] {
    MODE_CONT  = 2'd0,   // continuous acquisition
    MODE_DUTY  = 2'd1,   // duty-cycled acquisition
    MODE_SLEEP = 2'd2    // no acquisition, receive phases only
  } op_mode_t;

  // Number of analog channels (blood pressure, blood volume, base-station command) and the
  // width of one stored sample (12 most significant bits of the ADC status register).
  localparam int unsigned NUM_CH       = 3;
  localparam int unsigned SAMPLE_W     = 12;
  localparam int unsigned ADC_WORD_W   = 16;
  localparam int unsigned ADC_CHAN_W   = 4;

endpackage
