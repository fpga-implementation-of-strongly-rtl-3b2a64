// hist_equ_pkg: constants and types shared by the histogram-equalisation blocks.
//
// The defaults follow the implemented configuration: 8-bit greyscale pixels
// (K = 256 grey levels) and a 20x20 pixel frame (W = 20), so a histogram bin
// never holds more than W*W = 400 and fits a 9-bit counter (256 x 9 block RAM).
// LANES is the number of banks the histogram and LUT memories are split into
// (bin k in bank k mod LANES): reading and programming move 2*LANES entries
// per clock. The implemented configuration has one bank (two entries per
// clock, one through each RAM port). CONV_LANES is the number of pixels the
// LUT converts per clock, one per RAM port: one in the implemented block,
// two at most.
// pix_op_e is the operation field of the bus interface's CTRL register: it
// selects what the pixels written to DATA do: count up, count down
// (differential calculation, the pixel leaves the frame) or pass through the
// look-up table. The encoding is this design's own choice.
package hist_equ_pkg;

  localparam int unsigned PIX_W   = 8;          // bits per pixel
  localparam int unsigned FRAME_W = 20;         // frame is FRAME_W x FRAME_W
  localparam int unsigned CNT_W   = $clog2(FRAME_W * FRAME_W + 1); // 9 bits
  localparam int unsigned LANES   = 1;          // RAM banks: bins per port per clock
  localparam int unsigned CONV_LANES = 1;       // pixels converted per clock (1 or 2)

  typedef enum logic [1:0] {
    OP_HIST_INC = 2'd0,  // add the pixel to the histogram
    OP_HIST_DEC = 2'd1,  // remove the pixel from the histogram
    OP_LUT_CONV = 2'd2   // replace the pixel by its LUT value
  } pix_op_e;

endpackage
