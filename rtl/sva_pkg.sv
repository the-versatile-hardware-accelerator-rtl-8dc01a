// Shared types and constants of the sparse vector accelerator.
//
// Every stream in the design (database, reference, and the links between
// splitters and channels) carries words of type word_t. A sparse vector is
// sent as a fixed number of header words followed by its nonzero elements as
// (feature ID, value) pairs in ascending ID order; the `last` flag marks the
// final pair of a vector. Header words carry arbitrary software data in the
// id and val fields. The (ID, value) coding of the nonzero elements follows
// the document; the field widths, the `last` flag and the ordering rule are
// this design's own choices.
//
// The processed streams carry res_t words: the header words selected for a
// result, zero-extended, followed by the accumulated similarity measure.
package sva_pkg;

  // Width of a feature ID (index of a nonzero element).
  localparam int unsigned ID_W   = 24;
  // Width of an unsigned fixed-point coefficient (TF-IDF weight).
  localparam int unsigned VAL_W  = 16;
  // Width of one processed-stream word and of the dot product accumulator.
  localparam int unsigned RES_W  = 48;
  // Largest header length, in words, of a reference or database vector.
  localparam int unsigned MAX_HDR = 4;
  localparam int unsigned HDR_W   = $clog2(MAX_HDR + 1);

  typedef struct packed {
    logic             last;  // final pair of the vector
    logic [ID_W-1:0]  id;    // feature ID
    logic [VAL_W-1:0] val;   // coefficient
  } word_t;

  localparam int unsigned WORD_W = $bits(word_t);

  typedef logic [RES_W-1:0] res_t;

  // Default sizes of the design (top level parameters).
  localparam int unsigned DEF_N_CHANNELS   = 8;    // channels in the evaluated design
  localparam int unsigned DEF_SPLIT_WIDTH  = 8;    // outputs of one splitter
  localparam int unsigned DEF_MASTER_DEPTH = 512;  // database/reference master FIFOs
  localparam int unsigned DEF_DB_DEPTH     = 512;  // database slave FIFO per channel
  localparam int unsigned DEF_REF_DEPTH    = 32;   // reference slave FIFO per channel
  localparam int unsigned DEF_MEM_DEPTH    = 2048; // reference vector memory per channel
  localparam int unsigned DEF_OUT_DEPTH    = 64;   // processed FIFO per channel
  localparam int unsigned DEF_LINK_DEPTH   = 16;   // FIFOs between cascaded splitter levels
  // Storage style of each buffer: 1 block RAM, 0 distributed RAM.
  localparam bit          DEF_MASTER_BRAM  = 1'b1;
  localparam bit          DEF_DB_BRAM      = 1'b1;
  localparam bit          DEF_REF_BRAM     = 1'b0;
  localparam bit          DEF_MEM_BRAM     = 1'b1;
  localparam bit          DEF_OUT_BRAM     = 1'b0;

  // Splitter modes.
  typedef enum logic {
    SPLIT_VEC  = 1'b0,  // whole vectors to one channel after another
    CLONE_DATA = 1'b1   // every word to every enabled channel
  } split_mode_e;

endpackage
