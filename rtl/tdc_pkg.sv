// tdc_pkg: constants shared by the dual-sampling TDL time-to-digital converter.
//
// The tapped delay line has TAPS carry taps. Each tap is sampled twice (its sum
// output O and its carry output CO), so the sampled code has NBITS = 2*TAPS bits.
// The binary fine code counts how many of those bits the hit edge has passed,
// 0..NBITS, and needs CODE_W bits. The 430-tap chain and the 500 MHz clock
// (2000 ps period, set by the testbenches) follow the published design; the timestamp widths are this design's
// own choice.
package tdc_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned TAPS_DEFAULT = 430;   // carry chain length
  localparam int unsigned FINE_W_DEFAULT = 16;  // fine time LSB = Tclk / 2**16
  localparam int unsigned COARSE_W_DEFAULT = 32;// coarse counter width
  localparam int unsigned NLOG_DEFAULT = 16;    // 2**16 hits per calibration round

  // Width of a binary code that can hold 0..n.
  function automatic int unsigned code_width(int unsigned n);
    return $clog2(n + 1);
  endfunction
endpackage
