// l0_pkg: types and constants shared by the Level0 trigger.
//
// The link carries 32-bit words. The three top bits of every word give its
// type; the field layout below each type is this design's own choice, built
// on the fields the data format names (slice number and slice time, image
// time, source / view / front-end ids, channel id and hit time, group CRC).
// Field widths follow the decoder's signal widths (29-bit slice and image
// times, 5-bit view id, 8-bit front-end id, 7-bit channel id, 14-bit hit time);
// the 20-bit slice number covers the up to 2**20 slices of a spill.
//
// A hit on its way to the sorter is one 40-bit word: {image, time, channel}.
// Image number and time within the image form the sort key, so that the
// natural order of the word is the order in global time; one image spans
// 2**HT_W TDC units in this key.
package l0_pkg;

  localparam int unsigned WORD_W  = 32;
  localparam int unsigned SLICE_W = 20;   // slice number (up to 2**20 slices per spill)
  localparam int unsigned STIME_W = 29;   // start time of slice / of image
  localparam int unsigned SRC_W   = 10;   // source id
  localparam int unsigned VIEW_W  = 5;    // view id
  localparam int unsigned FE_W    = 8;    // front-end id
  localparam int unsigned CH_W    = 7;    // channel id within a front-end
  localparam int unsigned HT_W    = 14;   // hit time within an image, TDC units
  localparam int unsigned IMG_W   = 10;   // image number within a slice
  localparam int unsigned DET_W   = 16;   // detector channel after mapping
  localparam int unsigned CRC_W   = 16;   // group trailer check word
  localparam int unsigned KEY_W   = IMG_W + HT_W;      // sort key: global time
  localparam int unsigned HIT_W   = KEY_W + DET_W;     // 40-bit sorter word

  // Word type, bits [31:29] of every link word.
  typedef enum logic [2:0] {
    W_FILL  = 3'b000,  // idle / raw bit stream between slices
    W_SLICE = 3'b001,  // slice header, two words: number, then start time
    W_IMAGE = 3'b010,  // image header: image time
    W_GROUP = 3'b011,  // group header: source, view and front-end ids
    W_GTRL  = 3'b100,  // group trailer: check word
    W_ADATA = 3'b101,  // additional data belonging to the last hit
    W_DATA  = 3'b110,  // hit: channel id and hit time
    W_EOS   = 3'b111   // end of slice
  } word_type_e;

  // A hit as the decoder delivers it.
  typedef struct packed {
    logic [IMG_W-1:0] image;   // image number (low bits of the image time)
    logic [HT_W-1:0]  time_;   // hit time within the image
    logic [FE_W-1:0]  fe;      // front-end id
    logic [CH_W-1:0]  ch;      // channel id
  } raw_hit_t;

  // A hit in detector coordinates after mapping.
  typedef struct packed {
    logic [IMG_W-1:0] image;
    logic [HT_W-1:0]  time_;
    logic [FE_W-1:0]  fe;
    logic [DET_W-1:0] det;
  } mapped_hit_t;

  // A calibrated hit, the word that is sorted: key in the upper bits.
  typedef struct packed {
    logic [KEY_W-1:0] key;     // {image, time} after timing corrections
    logic [DET_W-1:0] det;
  } hit_t;

endpackage
