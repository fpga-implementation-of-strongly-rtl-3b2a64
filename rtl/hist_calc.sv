// hist_calc: histogram of a pixel stream in dual-port block RAM.
//
// The bins are held in LANES banks, bin k in bank k mod LANES at row
// k / LANES; with the default LANES = 1 this is a single 256-word RAM.
// Calculation (one pixel per clock): the pixel addresses port A of its bank,
// which returns the bin's count one clock later; the count plus one (or minus
// one when in_dec is set, for the decrement area of a differential update) is
// written back through port B of the same bank at the same row. Port A only
// reads and port B only writes, so a new pixel is taken every clock. When a
// pixel equals the one before it, port A has read the bin in the very clock
// its previous count was being written, so the just-written count is forwarded
// instead of the stale RAM word (the bypass).
//
// Reading (2*LANES bins per clock): with rd_en high both ports of every bank
// are taken over by the reader. Port A reads row rd_row0 and port B row
// rd_row1 of all banks; one clock later rd_data0[l] holds bin
// rd_row0*LANES + l and rd_data1[l] bin rd_row1*LANES + l. With rd_clear also
// high each port writes zero into the word it reads (read-first RAM), so the
// histogram is cleared during the read; with rd_clear low it is kept, as
// differential calculation needs.
//
// After reset the block clears all bins itself, two rows per clock, with ready
// low; pixels are accepted only when ready is high. rd_en must not be raised
// while busy is high (a pixel still in flight).
// The port multiplexing, the clear-on-read and the banked reading follow the
// document; the bypass and the clear after reset are this design's own.
module hist_calc #(
  parameter int unsigned PIX_W = hist_equ_pkg::PIX_W,
  parameter int unsigned CNT_W = hist_equ_pkg::CNT_W,
  parameter int unsigned LANES = hist_equ_pkg::LANES
) (
  input  logic                        clk,
  input  logic                        rst_n,
  output logic                        ready,     // clear after reset is done
  output logic                        busy,      // a pixel update is still in flight
  // pixel input
  input  logic                        in_valid,
  input  logic [PIX_W-1:0]            in_pix,
  input  logic                        in_dec,    // 1: decrement the bin, 0: increment
  // histogram read (2*LANES bins per clock, one clock latency)
  input  logic                        rd_en,
  input  logic                        rd_clear,
  input  logic [PIX_W-$clog2(LANES)-1:0] rd_row0,
  input  logic [PIX_W-$clog2(LANES)-1:0] rd_row1,
  output logic [LANES-1:0][CNT_W-1:0] rd_data0,
  output logic [LANES-1:0][CNT_W-1:0] rd_data1
);

  localparam int unsigned LB    = $clog2(LANES);   // bank-select bits
  localparam int unsigned ROW_W = PIX_W - LB;      // row-address bits

  // ---- clear after reset, two rows per clock ----
  logic             init_active;
  logic [ROW_W-2:0] init_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_active <= 1'b1;
      init_cnt    <= '0;
    end else if (init_active) begin
      init_cnt <= init_cnt + 1'b1;
      if (&init_cnt) init_active <= 1'b0;
    end
  end

  assign ready = !init_active;

  // ---- calculation pipeline ----
  logic             s1_valid, s1_dec;
  logic [PIX_W-1:0] s1_pix;
  logic             wr_valid_q;
  logic [PIX_W-1:0] wr_pix_q;
  logic [CNT_W-1:0] wr_val_q;
  logic [LANES-1:0][CNT_W-1:0] ram_dout_a, ram_dout_b;
  logic [CNT_W-1:0] s1_count, base, upd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid   <= 1'b0;
      s1_dec     <= 1'b0;
      s1_pix     <= '0;
      wr_valid_q <= 1'b0;
      wr_pix_q   <= '0;
      wr_val_q   <= '0;
    end else begin
      s1_valid   <= in_valid && ready;
      s1_dec     <= in_dec;
      s1_pix     <= in_pix;
      wr_valid_q <= s1_valid;
      wr_pix_q   <= s1_pix;
      wr_val_q   <= upd;
    end
  end

  // the count read for the pixel in stage 1, from its bank
  if (LANES == 1) begin : g_one_bank
    assign s1_count = ram_dout_a[0];
  end else begin : g_banks
    assign s1_count = ram_dout_a[s1_pix[LB-1:0]];
  end

  // bypass: the previous clock wrote this very bin
  always_comb begin
    base = (wr_valid_q && wr_pix_q == s1_pix) ? wr_val_q : s1_count;
    upd  = s1_dec ? base - 1'b1 : base + 1'b1;
  end

  assign busy = s1_valid;

  // ---- per-bank port multiplexers (Adr0 / Adr1) and RAMs ----
  for (genvar l = 0; l < LANES; l++) begin : g_bank
    logic [ROW_W-1:0] addr_a, addr_b;
    logic             we_a, we_b, s1_here;
    logic [CNT_W-1:0] din_b;

    always_comb begin
      s1_here = (LANES == 1) || (32'(s1_pix) % LANES == l);
      if (init_active) begin
        addr_a = {init_cnt, 1'b0};
        addr_b = {init_cnt, 1'b1};
      end else if (rd_en) begin
        addr_a = rd_row0;
        addr_b = rd_row1;
      end else begin
        addr_a = ROW_W'(in_pix >> LB);
        addr_b = ROW_W'(s1_pix >> LB);
      end
      we_a  = init_active || (rd_en && rd_clear);
      we_b  = (init_active || rd_en) ? we_a : (s1_valid && s1_here);
      din_b = (init_active || rd_en) ? '0 : upd;
    end

    dp_bram #(.ADDR_W(ROW_W), .DATA_W(CNT_W)) u_ram (
      .clk    (clk),
      .addr_a (addr_a),
      .we_a   (we_a),
      .din_a  ('0),
      .dout_a (ram_dout_a[l]),
      .addr_b (addr_b),
      .we_b   (we_b),
      .din_b  (din_b),
      .dout_b (ram_dout_b[l])
    );
  end

  assign rd_data0 = ram_dout_a;
  assign rd_data1 = ram_dout_b;

  a_no_read_while_busy: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !s1_valid)
    else $error("hist_calc: histogram read while a pixel update is in flight");
  a_no_pixel_while_reading: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !in_valid)
    else $error("hist_calc: pixel presented during a histogram read");

endmodule
