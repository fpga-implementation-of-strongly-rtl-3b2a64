// hist_equ_array: multi-module parallel histogram equalisation, an
// N_H x N_V grid of hist_equ_blocks that equalise neighbouring frames at once.
//
// Block (i,j) owns the W x W frame whose top-left corner is column i, row j of
// a shared "union" rectangle of (W+N_H-1) x (W+N_V-1) pixels. Every pixel is
// broadcast to all blocks together with its coordinates and each block takes
// it only if it lies in its own frame, so one pixel stream, read once from
// external memory, serves all blocks; a block idles for the pixels of the
// union outside its frame, which gives the utilisation
// W^2 / ((W+N_H-1)(W+N_V-1)).
//
// Histogram input (one pixel per clock: hist_valid, hist_dec, hist_pix at
// hist_x, hist_y). With hist_diff low the coordinates are union coordinates.
// With hist_diff high it is a differential update, all frames moving down one
// row: block row j must remove its old top row (union row j) and add the row
// below its old frame (union row j+W). These pixels are sent as two strips of
// N_V rows of W+N_H-1 pixels, the strip of union rows 0..N_V-1 with hist_dec
// high and the strip of rows W..W+N_V-1 with hist_dec low; hist_y then counts
// rows within the strip (0..N_V-1) and block row j takes strip row j. That is
// 2*N_V*(W+N_H-1) pixels per step; with N_V = 1 both strips are single rows.
//
// Conversion input (up to CONV_LANES pixels per clock, each with its union
// coordinates). out_valid[k][c]/out_pix[k][c] carry block k = j*N_H + i's
// equalised pixel of lane c one clock later, for the blocks whose frame holds
// the pixel. Both inputs may be used in the same clock.
//
// All blocks step in lock-step: both inputs are taken only when ready (all
// blocks ready); prog_start programs all tables at once.
// The 1-D/2-D grid, the shared pixel stream, the row-wise differential update
// and the default N_H = N_V = 1 (the single block the document implements)
// follow the document; the coordinate inputs and strip addressing are this
// design's own.
module hist_equ_array #(
  parameter int unsigned N_H        = 1,
  parameter int unsigned N_V        = 1,
  parameter int unsigned PIX_W      = hist_equ_pkg::PIX_W,
  parameter int unsigned CNT_W      = hist_equ_pkg::CNT_W,
  parameter int unsigned FRAME_W    = hist_equ_pkg::FRAME_W,
  parameter int unsigned LANES      = hist_equ_pkg::LANES,
  parameter int unsigned CONV_LANES = hist_equ_pkg::CONV_LANES,
  parameter int unsigned COORD_W    = 8
) (
  input  logic                                           clk,
  input  logic                                           rst_n,
  output logic                                           ready,
  // histogram input
  input  logic                                           hist_valid,
  input  logic                                           hist_dec,
  input  logic                                           hist_diff,
  input  logic [PIX_W-1:0]                               hist_pix,
  input  logic [COORD_W-1:0]                             hist_x,
  input  logic [COORD_W-1:0]                             hist_y,
  // conversion input
  input  logic [CONV_LANES-1:0]                          conv_valid,
  input  logic [CONV_LANES-1:0][PIX_W-1:0]               conv_pix,
  input  logic [CONV_LANES-1:0][COORD_W-1:0]             conv_x,
  input  logic [CONV_LANES-1:0][COORD_W-1:0]             conv_y,
  output logic [N_H*N_V-1:0][CONV_LANES-1:0]             out_valid,
  output logic [N_H*N_V-1:0][CONV_LANES-1:0][PIX_W-1:0]  out_pix,
  // programming
  input  logic                                           prog_start,
  input  logic                                           prog_clear,
  output logic                                           prog_busy,
  output logic                                           prog_done
);

  localparam int unsigned NB = N_H * N_V;

  logic [NB-1:0] blk_ready, blk_busy, blk_done;

  assign ready     = &blk_ready;
  assign prog_busy = |blk_busy;
  assign prog_done = blk_done[0];

  // is i <= c < i + FRAME_W? (c - i wraps to a large number when c < i)
  function automatic logic in_span(input logic [COORD_W-1:0] c, input int unsigned i);
    return (32'(c) - i) < FRAME_W;
  endfunction

  // is (x, y) inside the frame whose corner is (i, j)?
  function automatic logic in_frame(input logic [COORD_W-1:0] x, input logic [COORD_W-1:0] y,
                                    input int unsigned i, input int unsigned j);
    return in_span(x, i) && in_span(y, j);
  endfunction

  for (genvar j = 0; j < N_V; j++) begin : g_row
    for (genvar i = 0; i < N_H; i++) begin : g_col
      localparam int unsigned K = j * N_H + i;
      logic                  take_hist;
      logic [CONV_LANES-1:0] take_conv;

      always_comb begin
        if (hist_diff)
          take_hist = hist_valid && in_span(hist_x, i) && (32'(hist_y) == j);
        else
          take_hist = hist_valid && in_frame(hist_x, hist_y, i, j);
        for (int c = 0; c < CONV_LANES; c++)
          take_conv[c] = conv_valid[c] && in_frame(conv_x[c], conv_y[c], i, j);
      end

      hist_equ_block #(
        .PIX_W(PIX_W), .CNT_W(CNT_W), .FRAME_W(FRAME_W), .LANES(LANES), .CONV_LANES(CONV_LANES)
      ) u_blk (
        .clk        (clk),
        .rst_n      (rst_n),
        .ready      (blk_ready[K]),
        .hist_valid (take_hist && ready),
        .hist_dec   (hist_dec),
        .hist_pix   (hist_pix),
        .conv_valid (ready ? take_conv : '0),
        .conv_pix   (conv_pix),
        .out_valid  (out_valid[K]),
        .out_pix    (out_pix[K]),
        .prog_start (prog_start),
        .prog_clear (prog_clear),
        .prog_busy  (blk_busy[K]),
        .prog_done  (blk_done[K])
      );
    end
  end

  // the blocks run in lock-step, so they must agree at all times
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      (&blk_ready || ~|blk_ready) && (&blk_done || ~|blk_done))
    else $error("hist_equ_array: blocks out of step");

endmodule
