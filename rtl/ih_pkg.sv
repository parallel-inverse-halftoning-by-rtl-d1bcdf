// ih_pkg: constants shared by the parallel LUT inverse-halftoning datapath.
//
// The defaults are the configuration the design was built for: K = 4 templates
// fetched per clock, N = 8 smaller look-up tables (s-LUTs), P = 20 pixels per
// template (the "19pels" template, a centre pixel plus 19 neighbours) and 8-bit
// gray levels. D (CAM/ROM address width) and BANKS (CAM-ROM pairs per s-LUT)
// are this implementation's choice: 2 banks of 2^13-1 entries hold the roughly
// 9,000 templates of the fullest s-LUT of an 8-way partition of a typical
// training set.
package ih_pkg;
  localparam int unsigned K_DEF     = 4;   // templates per clock
  localparam int unsigned N_DEF     = 8;   // number of s-LUTs (power of two)
  localparam int unsigned P_DEF     = 20;  // bits (pixels) per template
  localparam int unsigned GRAY_W    = 8;   // gray level width, 256 levels
  localparam int unsigned D_DEF     = 13;  // CAM/ROM address width
  localparam int unsigned BANKS_DEF = 2;   // CAM-ROM pairs per s-LUT

  // Width of the sequence number appended to each template: numbers run from
  // 1 to K, and 0 marks "no template".
  function automatic int unsigned seq_width(int unsigned k);
    return $clog2(k + 1);
  endfunction
endpackage
