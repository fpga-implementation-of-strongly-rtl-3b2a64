// opb_hist_equ: histogram-equalisation peripheral on an On-chip Peripheral Bus
// (OPB): a hist_equ_array of N_H x N_V hist_equ_blocks behind a small
// register interface. The default, N_H = N_V = 1, is a single block.
//
// A processor equalises W x W frames (20 x 20 by default) in three passes:
//   1. write CTRL.op = HIST_INC, then write the pixels of the union
//      rectangle ((W+N_H-1) x (W+N_V-1), the frame itself for one block) to
//      DATA in raster order, up to four per 32-bit word;
//   2. write CTRL.start = 1: every block reads its histogram, computes and
//      programs its table (131 clocks; 3 + 128/LANES with LANES RAM banks),
//      after which CTRL.busy reads 0;
//   3. write CTRL.op = LUT_CONV, write the same pixels to DATA again and
//      after each word read from RESULT_k the equalised pixels of block k.
// For the frames one row further down, only 2*N_V*(W+N_H-1) pixels need
// passing in step 1, with CTRL.diff = 1: the strip of union rows 0..N_V-1 with
// op = HIST_DEC, then the strip of rows W..W+N_V-1 with op = HIST_INC,
// provided the previous start ran with clear = 0 so the histograms were kept.
//
// Pixel coordinates are generated here: every CTRL write returns the position
// to column 0, row 0; each pixel taken from DATA advances the column, which
// wraps to the next row after W+N_H-1 pixels. A byte whose byte enable is low
// is skipped and does not advance the position, so rows that do not start on
// a word boundary are sent as words with partial byte enables.
// Histogram pixels go to the blocks one per clock; pixels to convert go
// CONV_LANES per clock (1 or 2).
//
// Register map (byte offsets from C_BASEADDR, bit 0 is the least significant):
//   0x00 CTRL  write: [1:0] op (0 HIST_INC, 1 HIST_DEC, 2 LUT_CONV),
//                     [4] clear-on-read, [5] diff, [8] start (not stored)
//              read : [1:0] op, [4] clear, [5] diff, [16] busy, [17] ready,
//                     [18] done (tables programmed since the last start)
//   0x04 DATA  write: pixels in bytes 0..3, taken in that order
//   0x40 + 4k  RESULT_k read: block k's (k = row*N_H + column) equalised pixels
//                     of the last DATA word, in the same byte lanes; zero
//                     in lanes skipped or outside block k's frame
// Bus timing: a CTRL or RESULT access is acknowledged (Sl_xferAck) two clocks
// after OPB_select rises; a DATA write 3 + (clocks to pass its four byte lanes)
// after: seven for histogram pixels, seven or five for conversion with one or
// two lanes. An access that arrives while the blocks are not ready (table
// programming, or the clear of the histograms after reset) is held without
// acknowledge until they are, with Sl_toutSup raised to keep the bus timeout
// off. Sl_DBus is zero except in the acknowledge clock, as the OR-ed OPB data
// bus needs. Errors and retries are never signalled.
// The document gives the peripheral's name, its OPB attachment, its contents
// (hist_equ_blocks plus control logic) and the multi-module arrangement; the
// register map, the coordinate generation, the bus timing and the
// little-endian bit numbering are this design's own. Over the bus, histogram
// and conversion pixels arrive in turn, so the blocks' ability to take both
// in the same clock is not used here.
module opb_hist_equ
  import hist_equ_pkg::PIX_W, hist_equ_pkg::CNT_W, hist_equ_pkg::FRAME_W,
         hist_equ_pkg::pix_op_e, hist_equ_pkg::OP_HIST_INC, hist_equ_pkg::OP_HIST_DEC,
         hist_equ_pkg::OP_LUT_CONV;
#(
  parameter int unsigned N_H        = 1,
  parameter int unsigned N_V        = 1,
  parameter int unsigned LANES      = hist_equ_pkg::LANES,
  parameter int unsigned CONV_LANES = hist_equ_pkg::CONV_LANES,
  parameter logic [31:0] C_BASEADDR = 32'hA000_0000,
  parameter logic [31:0] C_HIGHADDR = 32'hA000_00FF
) (
  input  logic        OPB_Clk,
  input  logic        OPB_Rst,
  input  logic [31:0] OPB_ABus,
  input  logic [3:0]  OPB_BE,
  input  logic [31:0] OPB_DBus,
  input  logic        OPB_RNW,
  input  logic        OPB_select,
  input  logic        OPB_seqAddr,
  output logic [31:0] Sl_DBus,
  output logic        Sl_xferAck,
  output logic        Sl_errAck,
  output logic        Sl_retry,
  output logic        Sl_toutSup
);

  localparam int unsigned NB      = N_H * N_V;
  localparam int unsigned CL      = CONV_LANES;
  localparam int unsigned COORD_W = 8;
  localparam int unsigned ROW_LEN = FRAME_W + N_H - 1;
  localparam logic [5:0] REG_CTRL   = 6'd0;
  localparam logic [5:0] REG_DATA   = 6'd1;
  localparam logic [5:0] REG_RESULT = 6'd16;   // RESULT_0, then one word per block

  typedef enum logic [2:0] {B_IDLE, B_WAIT, B_PUSH, B_DRAIN, B_ACK} bus_state_e;

  typedef struct packed {
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] x;
  } pos_t;

  logic rst_n;
  assign rst_n = !OPB_Rst;

  bus_state_e  bstate;
  logic [5:0]  reg_sel;
  logic        rnw_q;
  logic [3:0]  be_q;
  logic [31:0] wdata_q;
  logic [1:0]  lane;       // first byte lane handled this clock
  logic [1:0]  out_lane;   // first byte lane of the results arriving this clock
  logic [31:0] rdata;

  pix_op_e     op_q;
  logic        clear_q;
  logic        diff_q;
  logic        start_pulse;
  logic        done_q;
  logic [NB-1:0][31:0] result_q;
  pos_t        pos;

  logic        is_conv;
  logic [1:0]  step;       // byte lanes per clock: 1, or CONV_LANES when converting
  logic        last_step;

  logic        blk_ready, blk_busy, blk_done;
  logic        hist_valid;
  logic [CL-1:0]              conv_valid;
  logic [CL-1:0][PIX_W-1:0]   conv_pix;
  logic [CL-1:0][COORD_W-1:0] conv_x, conv_y;
  logic [NB-1:0][CL-1:0]              out_valid;
  logic [NB-1:0][CL-1:0][PIX_W-1:0]   out_pix;
  pos_t        pos_next;

  logic hit;
  assign hit = OPB_select && (OPB_ABus >= C_BASEADDR) && (OPB_ABus <= C_HIGHADDR);

  function automatic pos_t advance(input pos_t p);
    pos_t n;
    if (p.x == COORD_W'(ROW_LEN - 1)) begin
      n.x = '0;
      n.y = p.y + 1'b1;
    end else begin
      n.x = p.x + 1'b1;
      n.y = p.y;
    end
    return n;
  endfunction

  assign is_conv   = (op_q == OP_LUT_CONV);
  assign step      = is_conv ? 2'(CL) : 2'd1;
  assign last_step = (32'(lane) + 32'(step) >= 4);

  // pixels of the latched DATA word: byte lanes lane .. lane+step-1 this clock,
  // each at the position following the enabled lanes before it
  always_comb begin
    pos_t p;
    p          = pos;
    hist_valid = (bstate == B_PUSH) && !is_conv && be_q[lane];
    conv_valid = '0;
    conv_pix   = '0;
    conv_x     = '0;
    conv_y     = '0;
    if (hist_valid) p = advance(p);
    for (int c = 0; c < CL; c++) begin
      logic [1:0] b;
      b = lane + 2'(c);
      if ((bstate == B_PUSH) && is_conv && be_q[b]) begin
        conv_valid[c] = 1'b1;
        conv_pix[c]   = wdata_q[8*b +: 8];
        conv_x[c]     = p.x;
        conv_y[c]     = p.y;
        p = advance(p);
      end
    end
    pos_next = p;
  end

  always_ff @(posedge OPB_Clk or negedge rst_n) begin
    if (!rst_n) begin
      bstate      <= B_IDLE;
      reg_sel     <= REG_CTRL;
      rnw_q       <= 1'b1;
      be_q        <= '0;
      wdata_q     <= '0;
      lane        <= '0;
      out_lane    <= '0;
      op_q        <= OP_HIST_INC;
      clear_q     <= 1'b1;
      diff_q      <= 1'b0;
      result_q    <= '0;
      pos         <= '0;
      start_pulse <= 1'b0;
      done_q      <= 1'b0;
    end else begin
      start_pulse <= 1'b0;
      if (start_pulse)   done_q <= 1'b0;
      else if (blk_done) done_q <= 1'b1;
      out_lane <= lane;
      for (int k = 0; k < NB; k++)
        for (int c = 0; c < CL; c++)
          if (out_valid[k][c]) result_q[k][8*(2'(out_lane + 2'(c))) +: 8] <= out_pix[k][c];
      if (bstate == B_PUSH) pos <= pos_next;
      unique case (bstate)
        B_IDLE: if (hit) begin
          reg_sel <= OPB_ABus[7:2];
          rnw_q   <= OPB_RNW;
          be_q    <= OPB_BE;
          wdata_q <= OPB_DBus;
          bstate  <= B_WAIT;
        end
        B_WAIT: begin
          // reads and writes to unused offsets need no block
          if (rnw_q || (reg_sel != REG_CTRL && reg_sel != REG_DATA)) bstate <= B_ACK;
          else if (blk_ready && !start_pulse) begin
            if (reg_sel == REG_CTRL) begin
              op_q        <= pix_op_e'(wdata_q[1:0] == 2'd3 ? 2'd0 : wdata_q[1:0]);
              clear_q     <= wdata_q[4];
              diff_q      <= wdata_q[5];
              pos         <= '0;
              start_pulse <= wdata_q[8];
              bstate      <= B_ACK;
            end else begin
              if (is_conv) result_q <= '0;
              lane   <= '0;
              bstate <= B_PUSH;
            end
          end
        end
        B_PUSH: begin
          lane <= lane + step;
          if (last_step) bstate <= B_DRAIN;
        end
        B_DRAIN: bstate <= B_ACK;   // last converted pixels arrive
        B_ACK:   bstate <= B_IDLE;
        default: bstate <= B_IDLE;
      endcase
    end
  end

  always_comb begin
    rdata = '0;
    if (reg_sel == REG_CTRL)
      rdata = {13'd0, done_q, blk_ready, blk_busy, 10'd0, diff_q, clear_q, 2'd0, op_q};
    for (int k = 0; k < NB; k++)
      if (reg_sel == REG_RESULT + 6'(k)) rdata = result_q[k];
  end

  assign Sl_xferAck = (bstate == B_ACK);
  assign Sl_DBus    = (bstate == B_ACK && rnw_q) ? rdata : '0;
  assign Sl_errAck  = 1'b0;
  assign Sl_retry   = 1'b0;
  assign Sl_toutSup = (bstate == B_WAIT) && !rnw_q && !blk_ready;

  hist_equ_array #(
    .N_H(N_H), .N_V(N_V), .PIX_W(PIX_W), .CNT_W(CNT_W), .FRAME_W(FRAME_W), .LANES(LANES),
    .CONV_LANES(CL), .COORD_W(COORD_W)
  ) u_array (
    .clk        (OPB_Clk),
    .rst_n      (rst_n),
    .ready      (blk_ready),
    .hist_valid (hist_valid),
    .hist_dec   (op_q == OP_HIST_DEC),
    .hist_diff  (diff_q),
    .hist_pix   (wdata_q[8*lane +: 8]),
    .hist_x     (pos.x),
    .hist_y     (pos.y),
    .conv_valid (conv_valid),
    .conv_pix   (conv_pix),
    .conv_x     (conv_x),
    .conv_y     (conv_y),
    .out_valid  (out_valid),
    .out_pix    (out_pix),
    .prog_start (start_pulse),
    .prog_clear (clear_q),
    .prog_busy  (blk_busy),
    .prog_done  (blk_done)
  );

  if (NB > 48) begin : g_too_many
    $error("opb_hist_equ: at most 48 blocks fit the RESULT address range");
  end
  if (CL < 1 || CL > 2) begin : g_bad_lanes
    $error("opb_hist_equ: CONV_LANES must be 1 or 2");
  end

  // the bus must hold its select until the acknowledge
  a_select_until_ack: assert property (@(posedge OPB_Clk) disable iff (!rst_n)
      (bstate != B_IDLE && bstate != B_ACK) |-> OPB_select)
    else $error("opb_hist_equ: OPB_select dropped before Sl_xferAck");

endmodule
