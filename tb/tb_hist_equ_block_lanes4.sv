// tb_hist_equ_block_lanes4: the tb_hist_equ_block test on a block with
// four RAM banks, as the in-module read parallelism of 8 bins per clock, and
// two conversion lanes. Header of tb_hist_equ_block follows.
//
// tb_hist_equ_block: end-to-end test of one histogram-equalisation block.
// A random 48x48 test image is generated. Three 20x20 frames are equalised and
// every output pixel is compared with floor(255 * cdf(p) / 400), the cdf taken
// from a histogram counted here:
//   A  rows 0..19, cols 0..19, from a cleared histogram; table programmed with
//      the histogram kept;
//   B  A moved one row down, by differential update only (the 20 pixels of
//      row 0 decremented, the 20 of row 20 incremented); programmed with clear;
//   C  rows 10..29, cols 7..26, from the histogram cleared by B's read.
// Frame B is converted while the histogram of frame C is computed, both
// inputs used in the same clocks. Conversion pixels are sent CONV_LANES per
// clock, with lane 1 idle in random clocks.
// Also checked: one histogram pixel accepted per clock, the programming time
// of 3 + 128/LANES clocks, the one-clock conversion latency, and the clear
// after reset.
// tb_hist_equ_block_lanes4 runs the same test with four RAM banks (eight
// bins read and eight table entries written per clock, 35-clock programming)
// and two conversion lanes.
module tb_hist_equ_block_lanes4;
  import hist_equ_pkg::*;
  localparam int unsigned W = 20, IMG = 48;
  localparam int unsigned LANES = 4;
  localparam int unsigned CONV_LANES = 2;
  localparam int unsigned PROG_CYCLES = 1 + 128 / LANES + 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, ready, hist_valid, hist_dec, prog_start, prog_clear, prog_busy, prog_done;
  logic [7:0] hist_pix;
  logic [CONV_LANES-1:0] conv_valid, out_valid;
  logic [CONV_LANES-1:0][7:0] conv_pix, out_pix;
  int checks = 0, failures = 0;
  int img [IMG][IMG];
  int hist [256];
  int n_inc = 0, n_dec = 0, n_conv = 0, n_prog_keep = 0, n_prog_clear = 0, n_both = 0;

  hist_equ_block #(.LANES(LANES), .CONV_LANES(CONV_LANES)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (hist_valid && conv_valid[0]) n_both++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic push(input pix_op_e op, input int p);
    @(negedge clk);
    check(ready, "ready while streaming pixels");
    hist_valid = 1; hist_dec = (op == OP_HIST_DEC); hist_pix = 8'(p);
    if (op == OP_HIST_INC) begin hist[p] = hist[p] + 1; n_inc++; end
    if (op == OP_HIST_DEC) begin hist[p] = hist[p] - 1; n_dec++; end
  endtask

  task automatic idle();
    @(negedge clk); hist_valid = 0;
  endtask

  task automatic hist_rect(input pix_op_e op, input int y0, input int x0, input int h, input int w);
    for (int y = y0; y < y0 + h; y++)
      for (int x = x0; x < x0 + w; x++) push(op, img[y][x]);
    idle();
  endtask

  task automatic program_lut(input bit clear);
    int cyc = 0;
    @(negedge clk); prog_start = 1; prog_clear = clear;
    @(negedge clk); prog_start = 0;
    cyc = 1;
    while (!prog_done) begin @(negedge clk); cyc++; end
    check(cyc == PROG_CYCLES, $sformatf("program step took %0d clocks, expected %0d", cyc, PROG_CYCLES));
    @(negedge clk);
    check(!prog_busy && ready, "idle after programming");
    if (clear) n_prog_clear++; else n_prog_keep++;
  endtask

  // convert the frame at (y0,x0) and compare with the reference table
  task automatic convert_check(input int y0, input int x0, input int tbl[256]);
    int n = 0;
    while (n < W * W) begin
      int pv[CONV_LANES];
      @(negedge clk);
      check(ready, "ready while converting");
      conv_valid = '0;
      for (int c = 0; c < CONV_LANES; c++)
        if (n < W * W && (c == 0 || $urandom_range(3) != 0)) begin
          pv[c] = img[y0 + n / W][x0 + n % W];
          conv_valid[c] = 1'b1; conv_pix[c] = 8'(pv[c]);
          n++;
        end
      @(posedge clk); #1;
      check(out_valid == conv_valid, "out_valid follows conv_valid one clock later");
      for (int c = 0; c < CONV_LANES; c++)
        if (conv_valid[c]) begin
          n_conv++;
          check(out_pix[c] == 8'(tbl[pv[c]]),
                $sformatf("lane %0d pixel %0d -> %0d, expected %0d", c, pv[c], out_pix[c], tbl[pv[c]]));
        end
    end
    @(negedge clk); conv_valid = '0;
  endtask

  // reference table from the model histogram of frame (y0,x0)
  task automatic ref_table(input int y0, input int x0, output int tbl[256]);
    int h[256], cdf;
    foreach (h[i]) h[i] = 0;
    for (int y = y0; y < y0 + W; y++)
      for (int x = x0; x < x0 + W; x++) h[img[y][x]] = h[img[y][x]] + 1;
    foreach (h[i]) check(h[i] == hist[i], $sformatf("model histogram bin %0d", i));
    cdf = 0;
    for (int k = 0; k < 256; k++) begin
      cdf += h[k];
      tbl[k] = (cdf * 255) / (W * W);
    end
  endtask

  initial begin
    int tbl[256];
    int cyc;
    rst_n = 0; hist_valid = 0; hist_dec = 0; hist_pix = 0; conv_valid = '0; conv_pix = '0;
    prog_start = 0; prog_clear = 0;
    foreach (hist[i]) hist[i] = 0;
    // low-contrast image with a gradient, so equalisation changes it
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) img[y][x] = 60 + (x + y) + int'($urandom % 30);
    repeat (2) @(negedge clk); rst_n = 1;
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    check(cyc == 128 / LANES, $sformatf("clear after reset took %0d clocks", cyc));

    // frame A
    hist_rect(OP_HIST_INC, 0, 0, W, W);
    ref_table(0, 0, tbl);
    program_lut(1'b0);
    convert_check(0, 0, tbl);
    // frame B: differential, one row down
    hist_rect(OP_HIST_DEC, 0, 0, 1, W);
    hist_rect(OP_HIST_INC, W, 0, 1, W);
    ref_table(1, 0, tbl);
    program_lut(1'b1);
    foreach (hist[i]) hist[i] = 0;
    // convert frame B while computing the histogram of frame C from scratch
    fork
      convert_check(1, 0, tbl);
      hist_rect(OP_HIST_INC, 10, 7, W, W);
    join
    ref_table(10, 7, tbl);
    program_lut(1'b1);
    convert_check(10, 7, tbl);

    check(n_dec == W && n_inc == 2 * W * W + W, "pixel counts");
    check(n_both >= W * W / CONV_LANES - 1, $sformatf("histogram and conversion overlapped in %0d clocks", n_both));
    $display("increments %0d decrements %0d conversions %0d programs kept %0d cleared %0d overlapped clocks %0d",
             n_inc, n_dec, n_conv, n_prog_keep, n_prog_clear, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
