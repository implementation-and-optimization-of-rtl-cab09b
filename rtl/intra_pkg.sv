// intra_pkg: types and helpers shared by the 16x16 luma / 8x8 chroma intra
// prediction units.
//
// Mode numbering follows the chroma list of the design (0 vertical,
// 1 horizontal, 2 DC, 3 plane) and is used for the luma unit as well.
// sad_width() sizes a SAD accumulator for an NxN block of 8-bit pixels
// (N*N*255 must fit), the component codes tag the output header words of the
// top-level unit.
package intra_pkg;

  typedef enum logic [1:0] {
    MODE_VERTICAL   = 2'd0,
    MODE_HORIZONTAL = 2'd1,
    MODE_DC         = 2'd2,
    MODE_PLANE      = 2'd3
  } intra_mode_e;

  typedef enum logic [1:0] {
    COMP_Y  = 2'd0,
    COMP_CB = 2'd1,
    COMP_CR = 2'd2
  } comp_e;

  localparam int NUM_MODES = 4;

  // Width of a SAD accumulator for an n x n block: n*n*255 < 2^(2*log2(n)+8).
  function automatic int sad_width(input int n);
    return 2 * $clog2(n) + 8;
  endfunction

  // Saturate a signed value to the 0..255 pixel range.
  function automatic logic [7:0] sat_u8(input logic signed [19:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

endpackage
