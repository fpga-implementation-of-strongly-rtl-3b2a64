// hist_equ_block: histogram equalisation of one W x W frame, built from a
// histogram calculation module, an equation module and a LUT memory.
//
// A frame is processed in three steps:
//  1. Histogram: pixels enter on the histogram input, one per clock, to be
//     counted (hist_dec low) or removed (hist_dec high). A frame computed from
//     scratch sends all its pixels; a differential update of a frame shifted by
//     one pixel sends the pixels leaving the frame with hist_dec high and
//     those entering it with hist_dec low, and nothing of what both share.
//  2. Program: a prog_start pulse reads the histogram 2*LANES bins per
//     clock through both RAM ports, runs the bins through the equation module
//     and writes the new table 2*LANES entries per clock. With prog_clear set
//     the histogram is zeroed while it is read (the next frame is computed from
//     scratch); with it clear the histogram is kept for the next differential
//     update. This takes 1 (drain) + 2^PIX_W/(2*LANES) (read) + 2 (pipeline)
//     clocks: 131 for 8-bit pixels and one bank. prog_busy is high meanwhile
//     and prog_done pulses in its last clock.
//  3. Convert: pixels enter on the conversion input, up to CONV_LANES per
//     clock; each equalised pixel leaves on out_pix[c] with out_valid[c] one
//     clock later.
// Steps 1 and 3 use different memories, so the histogram of the next frame
// can be computed while the current frame is converted: both inputs may be
// used in the same clock. Both are accepted only while ready is high (after
// the histogram memory has cleared itself following reset, and not during
// step 2). A frame then takes max(t_hist, t_conv) + t_prog clocks.
// The structure, the three steps and their overlap follow the document; the
// sequencer, its timing and the interface signals are this design's own.
module hist_equ_block #(
  parameter int unsigned PIX_W      = hist_equ_pkg::PIX_W,
  parameter int unsigned CNT_W      = hist_equ_pkg::CNT_W,
  parameter int unsigned FRAME_W    = hist_equ_pkg::FRAME_W,
  parameter int unsigned LANES      = hist_equ_pkg::LANES,
  parameter int unsigned CONV_LANES = hist_equ_pkg::CONV_LANES
) (
  input  logic                             clk,
  input  logic                             rst_n,
  output logic                             ready,
  // histogram input (DataIn0 of the histogram module)
  input  logic                             hist_valid,
  input  logic                             hist_dec,
  input  logic [PIX_W-1:0]                 hist_pix,
  // conversion input and equalised output
  input  logic [CONV_LANES-1:0]            conv_valid,
  input  logic [CONV_LANES-1:0][PIX_W-1:0] conv_pix,
  output logic [CONV_LANES-1:0]            out_valid,
  output logic [CONV_LANES-1:0][PIX_W-1:0] out_pix,
  // read histogram / program LUT
  input  logic                             prog_start,
  input  logic                             prog_clear,
  output logic                             prog_busy,
  output logic                             prog_done
);

  localparam int unsigned ROW_W = PIX_W - $clog2(LANES);

  typedef enum logic [1:0] {S_IDLE, S_DRAIN, S_READ, S_FINISH} state_e;

  state_e           state;
  logic [ROW_W-2:0] pair;
  logic             clear_q;
  logic             fin_cnt;

  logic             h_ready, h_busy;
  logic             rd_en;
  logic [LANES-1:0][CNT_W-1:0] rd_data0, rd_data1;
  logic             rd_valid_q, rd_first_q;
  logic [ROW_W-2:0] rd_idx_q;

  logic             eq_valid;
  logic [ROW_W-1:0] eq_row0, eq_row1;
  logic [LANES-1:0][PIX_W-1:0] eq_v0, eq_v1;

  assign ready = h_ready && (state == S_IDLE);
  assign rd_en = (state == S_READ);

  // ---- sequencer ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pair       <= '0;
      clear_q    <= 1'b0;
      fin_cnt    <= 1'b0;
      rd_valid_q <= 1'b0;
      rd_first_q <= 1'b0;
      rd_idx_q   <= '0;
    end else begin
      rd_valid_q <= rd_en;
      rd_first_q <= rd_en && (pair == '0);
      rd_idx_q   <= pair;
      unique case (state)
        S_IDLE: if (prog_start && h_ready) begin
          state   <= S_DRAIN;
          clear_q <= prog_clear;
          pair    <= '0;
        end
        S_DRAIN: if (!h_busy) state <= S_READ;
        S_READ: begin
          pair <= pair + 1'b1;
          if (&pair) begin
            state   <= S_FINISH;
            fin_cnt <= 1'b0;
          end
        end
        S_FINISH: begin
          fin_cnt <= 1'b1;
          if (fin_cnt) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign prog_busy = (state != S_IDLE);
  assign prog_done = (state == S_FINISH) && fin_cnt;

  // ---- histogram calculation ----
  hist_calc #(.PIX_W(PIX_W), .CNT_W(CNT_W), .LANES(LANES)) u_hist (
    .clk      (clk),
    .rst_n    (rst_n),
    .ready    (h_ready),
    .busy     (h_busy),
    .in_valid (hist_valid && ready),
    .in_pix   (hist_pix),
    .in_dec   (hist_dec),
    .rd_en    (rd_en),
    .rd_clear (clear_q),
    .rd_row0  ({pair, 1'b0}),
    .rd_row1  ({pair, 1'b1}),
    .rd_data0 (rd_data0),
    .rd_data1 (rd_data1)
  );

  // ---- equation module ----
  equalization #(.PIX_W(PIX_W), .CNT_W(CNT_W), .FRAME_W(FRAME_W), .LANES(LANES)) u_eq (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rd_valid_q),
    .in_first  (rd_first_q),
    .in_idx    (rd_idx_q),
    .h0        (rd_data0),
    .h1        (rd_data1),
    .out_valid (eq_valid),
    .out_row0  (eq_row0),
    .out_row1  (eq_row1),
    .out_v0    (eq_v0),
    .out_v1    (eq_v1)
  );

  // ---- LUT memory ----
  lut_mem #(.PIX_W(PIX_W), .LANES(LANES), .CONV_LANES(CONV_LANES)) u_lut (
    .clk            (clk),
    .rst_n          (rst_n),
    .prog_en        (eq_valid),
    .prog_row0      (eq_row0),
    .prog_v0        (eq_v0),
    .prog_row1      (eq_row1),
    .prog_v1        (eq_v1),
    .conv_valid     (ready ? conv_valid : '0),
    .conv_pix       (conv_pix),
    .conv_valid_out (out_valid),
    .conv_pix_out   (out_pix)
  );

endmodule
