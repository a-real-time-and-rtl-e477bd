// sqa_pkg: types shared by the sheet-inspection image path.
//
// Pixels are 8-bit grey values (one byte per pixel of a grey line-scan
// camera). The datapath moves TAPS pixels per clock; a "word" is TAPS pixels,
// tap 0 being the leftmost. The feature record, the threshold settings and the
// descriptor of a defective block are packed structs so that they can cross
// module boundaries and the top-level ports as single signals.
// The feature set and the threshold rules are this design's own choice; the
// 8-bit pixel and the 32x32 block follow the document.
package sqa_pkg;

  typedef logic [7:0] pix_t;

  // Position of a word inside the block stream. Every block is sent as
  // BLK rows of BLK/TAPS words, row by row, with no gaps inside a block.
  typedef struct packed {
    logic        first;    // first word of the block
    logic        last;     // last word of the block
    logic        sol;      // first word of a block row
    logic        eol;      // last word of a block row
    logic [15:0] col;      // block column within the band (0 = left edge)
    logic [15:0] band;     // band (group of BLK lines) counted from reset
  } btag_t;

  // Features of one block, computed on the denoised pixels.
  typedef struct packed {
    logic [7:0]  mean;     // average grey level (sum / BLK^2)
    logic [7:0]  range;    // max - min
    logic [15:0] grad;     // sum of |dx| + |dy| over the block, /16, saturated
  } features_t;

  // Multi-threshold settings: a block is defective when any rule fires.
  typedef struct packed {
    logic [7:0]  mean_lo;  // mean below this: dark defect
    logic [7:0]  mean_hi;  // mean above this: bright defect
    logic [7:0]  range_hi; // range above this: local contrast
    logic [15:0] grad_hi;  // gradient energy above this: texture/edges
  } thresholds_t;

  // Bit positions of the rules in a verdict's rule mask.
  localparam int unsigned R_DARK   = 0;
  localparam int unsigned R_BRIGHT = 1;
  localparam int unsigned R_RANGE  = 2;
  localparam int unsigned R_GRAD   = 3;

  // Header carried with every beat of a defective-block packet.
  typedef struct packed {
    logic [15:0] band;     // band of BLK lines, counted from reset
    logic [15:0] col;      // block column within the band
    logic [3:0]  rules;    // rules that fired
    features_t   feat;
  } desc_t;

endpackage
