// mpeg4_pkg: types and constants shared by the MPEG-4 encoder blocks.
// Pixels are 8-bit unsigned. SADs are 16 bits, enough for a 16x16 block
// (256 * 255 = 65280). Motion vectors are signed 7-bit per component, enough
// for the +-22 pixel reach of the three-level hierarchical search
// (4*4 + 2*2 + 2). Quantized coefficients are 12-bit two's complement, the
// width of the level field of the escape-type-3 code word.
//
// Own choices: all the widths (the published design gives none, except 12 bits for
// the escape level field).
package mpeg4_pkg;
  typedef logic [7:0]  pixel_t;
  typedef logic [15:0] sad_t;
  typedef logic signed [6:0] mvc_t;
  typedef struct packed {
    mvc_t x;
    mvc_t y;
  } mv_t;
  typedef logic signed [11:0] coef_t;
  // Hierarchical search level
  typedef enum logic [1:0] {LVL2 = 2'd0, LVL1 = 2'd1, LVL0 = 2'd2} me_level_e;
  typedef enum logic {FRAME_I = 1'b0, FRAME_P = 1'b1} frame_type_e;
  // Coefficient read-out order of the VLC buffer
  typedef enum logic [1:0] {SCAN_ZIGZAG = 2'd0, SCAN_ALT_H = 2'd1, SCAN_ALT_V = 2'd2} scan_e;
  // 3-D run length symbol
  typedef struct packed {
    logic       last;
    logic [5:0] run;
    coef_t      level;
  } rlc_sym_t;
  // Variable length code word, right aligned, with its length in bits
  typedef struct packed {
    logic [31:0] code;
    logic [5:0]  len;
  } vlc_word_t;
  // Per-macroblock side information kept with the coefficients of the VLC
  // buffer (the "cbp, pmv register")
  typedef struct packed {
    logic        intra;
    logic [5:0]  cbp;        // bit b: block b has coded AC coefficients
    scan_e [5:0] scan;       // read-out order of each block
    mv_t         mvd;        // motion vector difference
  } mb_info_t;
endpackage
