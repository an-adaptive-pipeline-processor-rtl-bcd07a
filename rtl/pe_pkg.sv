// pe_pkg: types and constants shared by the processor element (PE) and the
// pipeline built from it.
//
// Pixels are 8-bit unsigned, as the PE's 8-bit video ports require.  The
// nine mask coefficients of each multiplier array are 8-bit two's
// complement (enough for Sobel and Gaussian masks; the coefficient width is
// this design's choice).  Widths of the internal paths follow from those two:
// a product needs 17 bits and a 3x3 sum 21 bits.
//
// Synchronisation travels beside the pixels as a sync_t: `line` marks the
// first pixel of a line and `frame` the first pixel of a frame.  This two-bit
// encoding is this design's choice.
//
// Configuration is written over the serial control link as 8-bit registers
// (register map below) and held as a pe_cfg_t.
//
// Hexagonal sampling: with `hex` set, the picture is taken to have every odd
// line (counting from 0 at the frame start) offset half a pixel to the right.
// The programmed masks then describe the neighbourhood of a pixel on an even
// line, whose upper and lower neighbours are columns 0 and 1 of rows 0 and 2;
// on odd lines the PE moves rows 0 and 2 of both masks one column to the
// right.  The supported operation follows the architecture; this mask rule is
// this design's choice.
package pe_pkg;

  localparam int unsigned PIX_W   = 8;   // video port width
  localparam int unsigned COEF_W  = 8;   // signed mask coefficient
  localparam int unsigned PROD_W  = PIX_W + 1 + COEF_W;  // 17: signed product
  localparam int unsigned SUM_W   = PROD_W + 4;          // 21: sum of nine products
  localparam int unsigned NTAPS   = 9;
  localparam int unsigned PIX_MAX = (1 << PIX_W) - 1;

  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [SUM_W-1:0]  sum_t;

  // 3x3 window, index k = 3*row + col.  Row 0 is the oldest line (top of the
  // picture), column 0 the oldest pixel (left); k = 4 is the centre pixel.
  typedef pix_t  win_t  [NTAPS];
  typedef coef_t mask_t [NTAPS];
  typedef prod_t prods_t[NTAPS];

  typedef struct packed {
    logic frame;  // first pixel of a frame
    logic line;   // first pixel of a line
  } sync_t;

  // Programmable operator functions.
  typedef enum logic [2:0] {
    OP_PASS_A = 3'd0,  // sum A only (filtering, null operation)
    OP_PASS_B = 3'd1,  // sum B only
    OP_ADD    = 3'd2,  // A + B
    OP_SUB    = 3'd3,  // A - B
    OP_MAG    = 3'd4,  // floor(sqrt(A*A + B*B)): edge magnitude
    OP_MIN    = 3'd5,  // min(A, B): line thinning by ridge test
    OP_MAX    = 3'd6,  // max(A, B)
    OP_ABS    = 3'd7   // |A|
  } op_mode_e;

  typedef struct packed {
    coef_t [NTAPS-1:0] mask_a;     // multiplier array A coefficients
    coef_t [NTAPS-1:0] mask_b;     // multiplier array B coefficients
    op_mode_e          op;         // programmable operator function
    logic [7:0]        divisor;    // programmable scaler divisor, 0 acts as 1
    pix_t              threshold;  // programmable thresholder level
    logic              thr_en;     // thresholder on
    logic              inv_en;     // invertor on
    logic              hex;        // hexagonal sampling: odd lines offset
  } pe_cfg_t;

  // Register map of the serial control link (8-bit register address).
  localparam logic [7:0] REG_MASK_A = 8'h00;  // 0x00..0x08, k = addr - 0x00
  localparam logic [7:0] REG_MASK_B = 8'h10;  // 0x10..0x18, k = addr - 0x10
  localparam logic [7:0] REG_OP     = 8'h20;  // [2:0] op_mode_e
  localparam logic [7:0] REG_DIV    = 8'h21;  // scaler divisor
  localparam logic [7:0] REG_THR    = 8'h22;  // threshold level
  localparam logic [7:0] REG_FLAGS  = 8'h23;  // [0] thr_en, [1] inv_en, [2] hex

  // Serial frame: PE address, register address, data, sent MSB first.
  localparam int unsigned PE_ADDR_W  = 8;
  localparam int unsigned FRAME_BITS = PE_ADDR_W + 16;
  localparam logic [PE_ADDR_W-1:0] PE_BROADCAST = '1;

  // Null operation: centre pixel through array A, divisor 1, no threshold,
  // no inversion.  The PE then only delays the video.
  function automatic pe_cfg_t null_cfg();
    pe_cfg_t c;
    c = '0;
    c.mask_a[4] = 8'sd1;
    c.op        = OP_PASS_A;
    c.divisor   = 8'd1;
    return c;
  endfunction

  // Pipeline stages of the PE after the window centre: multiply, sum,
  // operator, scaler, thresholder, invertor.
  localparam int unsigned PE_STAGES = 6;

endpackage
