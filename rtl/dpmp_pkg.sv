// dpmp_pkg: types and constants shared by the digital power-management
// platform. It holds the two-bit working-mode code of the ADC test chip and
// the default sizes of the converters.
//
// The mode encoding (00 shut down, 01 Window ADC, 10 Ring ADC, 11 full adder)
// follows the chip's mode table. The cell delays are the average delays the
// design was characterised with (300 ps for the delay-line and Ring ADCs,
// 500 ps for the Window ADC); the DPWM cell delay of 538 ps is derived from
// the 100 kHz calibration point (10 us / 18600 cells).
`timescale 1ps/1ps
package dpmp_pkg;

  // Working mode of the ADC test chip, MSB -> LSB.
  typedef enum logic [1:0] {
    MODE_SHUTDOWN   = 2'b00,
    MODE_WINDOW_ADC = 2'b01,
    MODE_RING_ADC   = 2'b10,
    MODE_FULL_ADDER = 2'b11
  } chip_mode_e;

  // Ring ADC: n = 10 result bits, m = 3 edge-counter bits, K = 2^(n-m) stages.
  localparam int unsigned RING_N_BITS    = 10;
  localparam int unsigned RING_CNT_BITS  = 3;

  // Window ADC: 32-cell delay line, 5 result bits.
  localparam int unsigned WIN_CELLS      = 32;
  localparam int unsigned WIN_BITS       = 5;

  // Basic delay-line ADC: 1023 cells for 10 bits.
  localparam int unsigned DL_CELLS       = 1023;

  // Cell delays in ps used by the behavioural delay models.
  localparam int unsigned ADC_CELL_PS    = 300;
  localparam int unsigned WIN_CELL_PS    = 500;
  localparam int unsigned DPWM_CELL_PS   = 538;

  // Ring DPWM: 18-bit value, 32-stage ring (5 fine bits).
  localparam int unsigned DPWM_BITS      = 18;
  localparam int unsigned DPWM_FINE_BITS = 5;

endpackage
