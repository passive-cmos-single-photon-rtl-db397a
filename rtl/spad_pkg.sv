// spad_pkg: sizes and timing constants shared by the 64x64 photon-counting SPAD imager
// and by the FPGA logic that drives and records it.
//
// The array geometry (64x64 pixels), the 8-bit per-pixel counter and latch,
// and the 64-bit output bus that carries 8 pixels at a time come from the
// imager description. The FPGA clock (100 MHz) and the cycle counts derived
// from it are choices of this design; the times they encode (67 us frame at
// 15 kHz, 20 ns between LATCH and RESET, 50 ns per 8-pixel bundle) are the
// imager's.
package spad_pkg;

  localparam int unsigned ROWS        = 64;  // pixels per column
  localparam int unsigned COLS        = 64;  // pixels per row
  localparam int unsigned CNT_W       = 8;   // counter and latch width
  localparam int unsigned PIX_PER_BUS = 8;   // pixels per output-bus word

  // FPGA timing, in cycles of a 100 MHz clock.
  localparam int unsigned FRAME_CYCLES  = 6667; // 15 kHz frame rate
  localparam int unsigned LATCH_CYCLES  = 2;    // LATCH pulse width
  localparam int unsigned GAP_CYCLES    = 2;    // 20 ns LATCH-to-RESET gap
  localparam int unsigned RESET_CYCLES  = 2;    // RESET pulse width
  localparam int unsigned BUNDLE_CYCLES = 5;    // 50 ns per 8-pixel bundle

endpackage
