// ismatch_pkg: types and constants shared by the inexact string matching
// accelerator. Characters are 8 bits wide (a 5-character window is a
// 40-bit register), the text sits in DRAM one character per 32-bit word,
// and an occurrence is reported as a 16-bit distance, a 16-bit length and a
// 32-bit text index. A result occupies two 32-bit DRAM words: first
// {length, distance}, then the index.
package ismatch_pkg;

  localparam int unsigned CHAR_W = 8;   // bits per character
  localparam int unsigned WORD_W = 32;  // DRAM word width
  localparam int unsigned DIST_W = 16;  // reported edit distance
  localparam int unsigned LEN_W  = 16;  // reported occurrence length
  localparam int unsigned IDX_W  = 32;  // text index of the occurrence

  typedef logic [CHAR_W-1:0] char_t;
  typedef logic [WORD_W-1:0] word_t;

  // One occurrence, as produced by the edit distance array and validated.
  typedef struct packed {
    logic [LEN_W-1:0]  len;
    logic [DIST_W-1:0] distance;
    logic [IDX_W-1:0]  index;
  } occ_t;

endpackage
