// lut_mem: the look-up table of the equaliser, dual-port block RAM that serves
// two roles through two address multiplexers.
//
// The table is held in LANES banks, entry k in bank k mod LANES at row
// k / LANES (one 256-word RAM with the default LANES = 1).
// Programming (prog_en high): the equation module writes 2*LANES entries per
// clock: row prog_row0 of every bank through port A (entry
// prog_row0*LANES + l gets prog_v0[l]) and row prog_row1 through port B.
// Conversion (prog_en low): up to CONV_LANES pixels per clock. Pixel 0
// addresses port A of its bank and pixel 1 (when CONV_LANES = 2) port B, so
// both may fall in the same bank. Each table value appears on conv_pix_out[c],
// with conv_valid_out[c], one clock after its pixel. Conversion and
// programming exclude each other; a pixel presented while prog_en is high is
// not converted (an assertion flags it).
// The dual role, the multiplexers, the banked programming and the two
// conversions per clock follow the document; the lane and bank assignment is
// this design's own.
module lut_mem #(
  parameter int unsigned PIX_W      = hist_equ_pkg::PIX_W,
  parameter int unsigned LANES      = hist_equ_pkg::LANES,
  parameter int unsigned CONV_LANES = hist_equ_pkg::CONV_LANES
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // programming
  input  logic                                prog_en,
  input  logic [PIX_W-$clog2(LANES)-1:0]      prog_row0,
  input  logic [LANES-1:0][PIX_W-1:0]         prog_v0,
  input  logic [PIX_W-$clog2(LANES)-1:0]      prog_row1,
  input  logic [LANES-1:0][PIX_W-1:0]         prog_v1,
  // conversion
  input  logic [CONV_LANES-1:0]               conv_valid,
  input  logic [CONV_LANES-1:0][PIX_W-1:0]    conv_pix,
  output logic [CONV_LANES-1:0]               conv_valid_out,
  output logic [CONV_LANES-1:0][PIX_W-1:0]    conv_pix_out
);

  localparam int unsigned LB    = $clog2(LANES);
  localparam int unsigned ROW_W = PIX_W - LB;

  logic [LANES-1:0][PIX_W-1:0] dout_a, dout_b;
  logic [ROW_W-1:0]            addr_a, addr_b;
  logic [PIX_W-1:0]            conv_pix_b;

  // port B converts the second pixel when there is one
  if (CONV_LANES > 1) begin : g_conv_b
    assign conv_pix_b = conv_pix[1];
  end else begin : g_no_conv_b
    assign conv_pix_b = '0;
  end

  assign addr_a = prog_en ? prog_row0 : ROW_W'(conv_pix[0] >> LB);
  assign addr_b = prog_en ? prog_row1 : ROW_W'(conv_pix_b >> LB);

  for (genvar l = 0; l < LANES; l++) begin : g_bank
    dp_bram #(.ADDR_W(ROW_W), .DATA_W(PIX_W)) u_ram (
      .clk    (clk),
      .addr_a (addr_a),
      .we_a   (prog_en),
      .din_a  (prog_v0[l]),
      .dout_a (dout_a[l]),
      .addr_b (addr_b),
      .we_b   (prog_en),
      .din_b  (prog_v1[l]),
      .dout_b (dout_b[l])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) conv_valid_out <= '0;
    else        conv_valid_out <= prog_en ? '0 : conv_valid;
  end

  // bank of each converted pixel, one clock after it was presented
  for (genvar c = 0; c < CONV_LANES; c++) begin : g_lane
    logic [LANES-1:0][PIX_W-1:0] dout;
    assign dout = (c == 0) ? dout_a : dout_b;
    if (LANES == 1) begin : g_one_bank
      assign conv_pix_out[c] = dout[0];
    end else begin : g_banks
      logic [LB-1:0] bank_q;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) bank_q <= '0;
        else        bank_q <= conv_pix[c][LB-1:0];
      end
      assign conv_pix_out[c] = dout[bank_q];
    end
  end

  a_no_conv_while_prog: assert property (@(posedge clk) disable iff (!rst_n) prog_en |-> conv_valid == '0)
    else $error("lut_mem: pixel presented while the table is being programmed");

endmodule
