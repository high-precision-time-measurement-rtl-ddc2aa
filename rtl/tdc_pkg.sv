// tdc_pkg: constants and types shared by the two-channel tapped-delay-line TDC.
//
// The delay line has 58 carry blocks of 8 taps each (464 taps) and is sampled
// by a 400 MHz clock (2500 ps period); those numbers follow the design
// description. Widths of counts, fine times and results are this design's own
// choice: fine times and results are in picoseconds, results are signed so
// that S2 arriving slightly before S1 within one clock period gives a
// negative interval instead of wrapping.
`timescale 1ps/1ps
package tdc_pkg;
  localparam int unsigned TAPS_PER_CARRY8 = 8;
  localparam int unsigned N_CARRY8        = 58;
  localparam int unsigned N_TAPS          = N_CARRY8 * TAPS_PER_CARRY8;  // 464
  localparam int unsigned CLK_PS          = 2500;   // 400 MHz
  localparam int unsigned DL_RANGE_PS     = 2800;   // line saturates at about 2.8 ns
  localparam int unsigned MAP_W           = 16;     // fine time in ps
  localparam int unsigned CNT_W           = 16;     // coarse cycle count
  localparam int unsigned TIME_W          = 32;     // result in ps, signed

  // Propagation delay, in ps, of tap i of the behavioural delay-line model.
  // Between 2 and 10 ps with a mean of 6 ps, so that 464 taps span about
  // 2.8 ns like the measured line; the uneven pattern stands in for the
  // uneven bin widths of a real carry chain. Testbenches use it to build
  // the calibration Map that a real line would get from its characterisation.
  function automatic int unsigned model_tap_delay_ps(int unsigned i);
    return 2 + ((i * 37) % 9);
  endfunction

  // State of the pair-measurement controller in the processing unit.
  typedef enum logic [2:0] {
    PU_ARMED,    // waiting for S1
    PU_RUN,      // counter running, waiting for S2
    PU_WAIT,     // waiting for the encoders' fine times
    PU_CALC,     // Eq. 1 in progress
    PU_CLEAR     // capture stages held clear while the lines drain
  } pu_state_e;
endpackage
