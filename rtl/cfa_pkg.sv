// cfa_pkg: shared types and arithmetic for the Bayer colour interpolation processor.
//
// The processor works on a 3-row by 5-column window of CFA (colour filter array)
// samples centred on the pixel being reconstructed. Window rows are indexed 0..2
// (row above, centre row, row below) and columns 0..4 (two left, centre, two right).
//
// All interpolation weights are 1/2, 1/4, 1/8 or 3/8, so every filter is evaluated as
// an integer sum in units of 1/8 ("total8") built from shifts and adds, then divided
// by eight with rounding and clamped to the pixel range. The rounding (add 4, then an
// arithmetic shift by 3) and the clamp are this design's own choices.
package cfa_pkg;

  // Colour of the CFA sample at the window centre.
  //   PT_R  : red sample        PT_B  : blue sample
  //   PT_GR : green on a row that also holds red samples
  //   PT_GB : green on a row that also holds blue samples
  typedef enum logic [1:0] {PT_R = 2'd0, PT_GR = 2'd1, PT_GB = 2'd2, PT_B = 2'd3} ptype_e;

  // Green interpolation model chosen by the edge detector.
  typedef enum logic [1:0] {
    GM_NONE = 2'd0,   // no edge enhancement: all four green neighbours
    GM_HORZ = 2'd1,   // edge enhancement in the horizontal direction
    GM_VERT = 2'd2    // edge enhancement in the vertical direction
  } gmode_e;

  // Source of a red or blue output sample (output multiplexer select).
  typedef enum logic [1:0] {
    RS_CENTER = 2'd0, // the CFA sample itself
    RS_M1     = 2'd1, // model 1: horizontal pair of neighbours
    RS_M2     = 2'd2, // model 2: vertical pair of neighbours
    RS_M3     = 2'd3  // model 3: four diagonal neighbours
  } rbsel_e;

  // Border flags of the window centre, used to mirror samples that fall outside
  // the image back inside it (mirroring about the centre keeps the Bayer phase).
  typedef struct packed {
    logic top;     // centre is on the first row
    logic bottom;  // centre is on the last row
    logic left1;   // centre column is 0
    logic left2;   // centre column is 0 or 1
    logic right1;  // centre column is the last one
    logic right2;  // centre column is one of the last two
  } border_t;

  // Divide a sum in units of 1/8 by eight with rounding and clamp it to 0..maxv.
  function automatic int unsigned div8_clamp(input int total8, input int unsigned maxv);
    int q;
    q = (total8 + 4) >>> 3;
    if (q < 0) return 0;
    if (q > int'(maxv)) return maxv;
    return unsigned'(q);
  endfunction

endpackage
