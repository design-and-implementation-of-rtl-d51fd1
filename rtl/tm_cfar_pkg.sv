// Shared constants and types of the TM-CFAR (trimmed-mean constant false
// alarm rate) processor.
//
// The processor looks at a sliding window of N_REF reference cells around one
// cell under test (CUT), sorts the reference cells, drops the T1 smallest and
// the T2 largest, averages the rest and scales that average by a factor T to
// get the detection threshold. The sizes below are those of the published
// design: 32-bit samples, 8 reference cells (4 leading, 4 lagging) and one
// cell trimmed at each end, which leaves 6 cells to average. Everything else
// (fixed-point format of T, reset) is this implementation's choice and is
// described in the modules that use it.
package tm_cfar_pkg;

  // Width of one detected sample and of the scale factor T.
  localparam int unsigned DATA_W = 32;

  // Reference cells in the window (leading half + lagging half).
  localparam int unsigned N_REF = 8;

  // Taps of the delay line: reference cells plus the cell under test.
  localparam int unsigned N_TAPS = N_REF + 1;

  // Index of the cell under test among the delay-line taps.
  localparam int unsigned CUT_TAP = N_REF / 2;

  // Cells trimmed from the low (T1) and high (T2) end of the ordered window.
  localparam int unsigned T1 = 1;
  localparam int unsigned T2 = 1;

  // Cells that survive trimming and enter the average.
  localparam int unsigned N_KEEP = N_REF - T1 - T2;

  typedef logic [DATA_W-1:0] sample_t;

endpackage
