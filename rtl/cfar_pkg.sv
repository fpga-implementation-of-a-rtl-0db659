// cfar_pkg: types and constants shared by the CA-CFAR kernel.
//
// The kernel reads 16-bit SAR pixel intensities from HBM through 256-bit AXI
// beats (16 pixels per beat) and writes back one detection bit per pixel.
// This package holds those fixed widths, the run-time configuration record
// written by the host, and the small enumerations that travel with each cache
// read through the threshold pipeline.  Pixel width, beat width and the
// one-bit result follow the document; field widths of the configuration are
// this design's choice.
package cfar_pkg;

  localparam int unsigned PIX_W        = 16;   // pixel intensity width
  localparam int unsigned BEAT_W       = 256;  // HBM AXI data width
  localparam int unsigned PIX_PER_BEAT = BEAT_W / PIX_W;  // 16
  localparam int unsigned PPB_LOG2     = $clog2(PIX_PER_BEAT);
  localparam int unsigned AXI_AW       = 64;   // AXI address width
  localparam int unsigned DIM_W        = 16;   // image width / height fields
  localparam int unsigned HALF_W       = 9;    // half window / guard sizes
  localparam int unsigned NBG_W        = 20;   // background pixel count
  localparam int unsigned SUM_W        = PIX_W + NBG_W;        // sum of pixels
  localparam int unsigned SQS_W        = 2 * PIX_W + NBG_W;    // sum of squares
  localparam int unsigned K_W          = 16;   // CFAR constant, unsigned Q8.8

  // Run-time configuration (metadata registers written by the host).
  typedef struct packed {
    logic [DIM_W-1:0]  width;      // pixels per image row
    logic [DIM_W-1:0]  height;     // image rows
    logic [HALF_W-1:0] win_hw;     // background window half width
    logic [HALF_W-1:0] win_hh;     // background window half height
    logic [HALF_W-1:0] grd_hw;     // guard area half width
    logic [HALF_W-1:0] grd_hh;     // guard area half height
    logic [K_W-1:0]    k_q88;      // CFAR constant k, 8.8 fixed point
    logic [AXI_AW-1:0] img_base;   // image offset inside every read channel
    logic [AXI_AW-1:0] mask_base;  // result mask address on the write channel
  } cfar_cfg_t;

  // Which rows of the window a cache read lets through (the output
  // multiplexers of the pixel cache set every other queue to zero).
  typedef enum logic [1:0] {
    MASK_FULL   = 2'd0,  // all rows of the background window
    MASK_FRAME  = 2'd1,  // window rows outside the guard rows
    MASK_BAND   = 2'd2,  // only the guard rows
    MASK_TARGET = 2'd3   // only the centre row (pixel under test)
  } mask_mode_e;

  // What the threshold pipeline does with one column read.
  typedef enum logic [1:0] {
    OP_ADD    = 2'd0,  // add column sums to the running window sums
    OP_SUB    = 2'd1,  // subtract column sums
    OP_TARGET = 2'd2,  // column holds the pixel under test: decide it
    OP_ZERO   = 2'd3   // border pixel: emit "not detected"
  } pipe_op_e;

  typedef struct packed {
    logic     valid;
    pipe_op_e op;
    logic     clear;   // clear the running sums before this column
    logic     eol;     // last pixel of an image row
    logic     eof;     // last pixel of the image
  } pipe_meta_t;

  // States of the window sequencer in cfar_kernel.
  typedef enum logic [3:0] {
    S_IDLE,   // waiting for START
    S_ROW,    // decide whether the row has a full window
    S_WAIT,   // wait until every read channel is idle
    S_GO,     // move the window down one row, restart the queues
    S_LEFT,   // left border pixels (no full window)
    S_INIT,   // full accumulation of the row's first window
    S_TGT,    // read the pixel under test
    S_UPD,    // four column updates for the next pixel
    S_RIGHT,  // right border pixels
    S_ZROW,   // whole row without a full window
    S_FLUSH   // wait until the result mask is written
  } seq_state_e;

endpackage
