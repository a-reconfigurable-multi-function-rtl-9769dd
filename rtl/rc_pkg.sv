// rc_pkg: shared sizes, types and helper functions of the reconfigurable
// cache module (RC).
//
// The RC is an 8 KB direct-mapped cache whose data array is built from
// 4-input, 16-bit-wide look-up tables (4-LUTs): 32 LUT rows of 8 LUTs, each
// LUT 16 lines deep. One LUT row holds 16 cache blocks of 128 bits
// (8 words of 16 bits). These sizes follow the 8 KB / 128-bit block /
// 16-bit word / 4-LUT-with-16-bit-output configuration of the design.
//
// Storage convention: words of a block are bit-interleaved, as the design
// stores them; the exact column order is this implementation's choice. Words are
// placed so that bit b of word w sits in bit column b*8+w. LUT k of a
// row therefore owns bits 2k and 2k+1 of every word. Seen as a LUT, entry bit
// e (0..15) of LUT k is word e/2, bit 2k + e%2. A configuration word written
// through the cache port thus sets two bits in each of the 8 LUTs of a row.
package rc_pkg;

  localparam int unsigned LUT_ROWS      = 32;  // LUT rows in the module
  localparam int unsigned LUTS_PER_ROW  = 8;   // LUTs side by side in a row
  localparam int unsigned LUT_LINES     = 16;  // lines per LUT (4-LUT)
  localparam int unsigned LUT_W         = 16;  // output bits of one LUT
  localparam int unsigned WORD_W        = 16;  // cache word
  localparam int unsigned WORDS_PER_BLK = 8;   // words per 128-bit block

  // Word address inside the data array: {lut_row, lut_line, word}.
  localparam int unsigned ROW_AW  = $clog2(LUT_ROWS);      // 5
  localparam int unsigned LINE_AW = $clog2(LUT_LINES);     // 4
  localparam int unsigned WSEL_AW = $clog2(WORDS_PER_BLK); // 3
  localparam int unsigned ARR_AW  = ROW_AW + LINE_AW + WSEL_AW; // 12 (4096 words = 8 KB)

  // FIR (convolution) mapping: 4 LUT rows per tap stage, 8 stages.
  localparam int unsigned FIR_STAGES      = 8;
  localparam int unsigned FIR_ROWS_PER_ST = 4;
  localparam int unsigned FIR_X_W         = 8;   // input sample width
  localparam int unsigned FIR_P_W         = 16;  // 8x8 product width
  localparam int unsigned FIR_Y_W         = 24;  // accumulator width

  // DCT/IDCT mapping: 8 PEs of 2 rows each, then 4 pre/post rows.
  localparam int unsigned DCT_N       = 8;   // points of the 1-D transform
  localparam int unsigned DCT_WD      = 8;   // input element width (Wd)
  localparam int unsigned DCT_ACC_W   = 16;  // coefficient / accumulator width
  localparam int unsigned DCT_PP_ROW0 = 16;  // pre/post rows 16..19
  localparam int unsigned DCT_ROM_LUT = 3;   // ROM sits at LUT 3 of the PE's first row

  // Operating modes of the module.
  typedef enum logic [1:0] {
    MODE_CACHE = 2'd0,
    MODE_FIR   = 2'd1,
    MODE_DCT   = 2'd2,
    MODE_IDCT  = 2'd3
  } rc_mode_e;

  typedef logic [LUT_W-1:0]   lut_word_t;
  typedef logic [LINE_AW-1:0] lut_addr_t;

  // 2-bit adder LUT entry layout (one 6-bit context):
  //   [2:0] = {carry, sum[1:0]} for carry-in 0, [5:3] = same for carry-in 1.
  // A 12-bit multi-context entry holds the add context in [5:0] and the
  // subtract context in [11:6]. LUT address = {b[1:0], a[1:0]}.
  function automatic logic [2:0] cs_pick(input lut_word_t e, input logic ctx_sub,
                                         input logic cin);
    logic [5:0] ctx;
    ctx = ctx_sub ? e[11:6] : e[5:0];
    return cin ? ctx[5:3] : ctx[2:0];
  endfunction

endpackage
