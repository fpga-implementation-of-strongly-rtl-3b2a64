// equalization: turns histogram bins into look-up table values.
//
// The new LUT value of grey level k is the cumulative histogram scaled to the
// grey-level range:
//     v_k = floor( (K-1) * (hist[0] + ... + hist[k]) / (W*W) )
// with K grey levels and a W x W frame. Bins arrive 2*LANES per clock in
// rising order, as the histogram's two RAM ports deliver them: h0[l] is bin
// (2*idx)*LANES + l (port A, row 2*idx) and h1[l] is bin (2*idx+1)*LANES + l
// (port B, row 2*idx+1); in_first marks idx = 0 and restarts the running sum.
// One clock later the block gives the LUT rows out_row0 = 2*idx and
// out_row1 = 2*idx+1 with the values of the same bins, ready to be written
// through both ports of the LUT memory. The division is by the constant W*W.
// A value that would exceed K-1 (a histogram holding more than W*W pixels) is
// held at K-1.
// The formula follows the document; rounding down, the saturation and the
// pipeline register are this design's own.
module equalization #(
  parameter int unsigned PIX_W   = hist_equ_pkg::PIX_W,
  parameter int unsigned CNT_W   = hist_equ_pkg::CNT_W,
  parameter int unsigned FRAME_W = hist_equ_pkg::FRAME_W,
  parameter int unsigned LANES   = hist_equ_pkg::LANES
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  input  logic                                 in_first,
  input  logic [PIX_W-$clog2(LANES)-2:0]       in_idx,
  input  logic [LANES-1:0][CNT_W-1:0]          h0,
  input  logic [LANES-1:0][CNT_W-1:0]          h1,
  output logic                                 out_valid,
  output logic [PIX_W-$clog2(LANES)-1:0]       out_row0,
  output logic [PIX_W-$clog2(LANES)-1:0]       out_row1,
  output logic [LANES-1:0][PIX_W-1:0]          out_v0,
  output logic [LANES-1:0][PIX_W-1:0]          out_v1
);

  localparam int unsigned SUM_W  = CNT_W + PIX_W;          // holds K bins of CNT_W
  localparam int unsigned PROD_W = SUM_W + PIX_W;
  localparam int unsigned AREA   = FRAME_W * FRAME_W;
  localparam logic [PIX_W-1:0] VMAX = {PIX_W{1'b1}};       // K-1

  logic [SUM_W-1:0] acc;
  logic [2*LANES-1:0][SUM_W-1:0] cdf;

  function automatic logic [PIX_W-1:0] scale(input logic [SUM_W-1:0] c);
    logic [PROD_W-1:0] q;
    q = (PROD_W'(c) * PROD_W'(VMAX)) / PROD_W'(AREA);
    return (q > PROD_W'(VMAX)) ? VMAX : q[PIX_W-1:0];
  endfunction

  // running sum over the 2*LANES bins of this clock, in bin order
  always_comb begin
    logic [SUM_W-1:0] run;
    run = in_first ? '0 : acc;
    for (int b = 0; b < 2 * LANES; b++) begin
      run    = run + SUM_W'((b < LANES) ? h0[b] : h1[b - LANES]);
      cdf[b] = run;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_row0  <= '0;
      out_row1  <= '0;
      out_v0    <= '0;
      out_v1    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        acc      <= cdf[2*LANES-1];
        out_row0 <= {in_idx, 1'b0};
        out_row1 <= {in_idx, 1'b1};
        for (int l = 0; l < LANES; l++) begin
          out_v0[l] <= scale(cdf[l]);
          out_v1[l] <= scale(cdf[LANES + l]);
        end
      end
    end
  end

endmodule
