// tb_hist_equ_array: self-checking test of the multi-module array on a 3 x 2
// grid of blocks (six neighbouring 20x20 frames, union 22 x 21).
// The union of a 48x48 generated image is streamed one pixel per clock with
// its coordinates to the histogram input, then two pixels per clock (lane 1
// idle in random clocks) to the conversion input; each block's equalised
// outputs are checked against floor(255 * cdf(p) / 400) of its own frame.
// While that conversion runs, all frames move one row down by a differential
// update (two strips of two rows) in the same clocks; the new frames are
// then programmed, converted and checked. Also checked: every block takes exactly W*W pixels of a full union
// and 2*W of a differential step, so the utilisation of a block equals
// W^2 / ((W+N_H-1)(W+N_V-1)), and the 131-clock programming time.
module tb_hist_equ_array;
  import hist_equ_pkg::*;
  localparam int unsigned N_H = 3, N_V = 2, NB = N_H * N_V, C = 2;
  localparam int unsigned W = 20, IMG = 48, UW = W + N_H - 1, UH = W + N_V - 1;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, ready, hist_valid, hist_dec, hist_diff, prog_start, prog_clear, prog_busy, prog_done;
  logic [7:0] hist_pix, hist_x, hist_y;
  logic [C-1:0] conv_valid;
  logic [C-1:0][7:0] conv_pix, conv_x, conv_y;
  logic [NB-1:0][C-1:0] out_valid;
  logic [NB-1:0][C-1:0][7:0] out_pix;
  int checks = 0, failures = 0;
  int img [IMG][IMG];
  int tbl [NB][256];
  int taken [NB];
  int n_clocks;

  hist_equ_array #(.N_H(N_H), .N_V(N_V), .CONV_LANES(C)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit mine(input int k, input bit diff, input int r, input int c);
    int i = k % N_H, j = k / N_H;
    return (c >= i) && (c < i + int'(W)) && (diff ? (r == j) : (r >= j && r < j + int'(W)));
  endfunction

  // pass h rows of UW pixels starting at image (y0,x0) to the histogram input
  task automatic hist_stream(input bit dec, input bit diff, input int y0, input int x0, input int h);
    n_clocks = 0;
    foreach (taken[k]) taken[k] = 0;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < int'(UW); c++) begin
        @(negedge clk);
        check(ready, "ready while streaming");
        hist_valid = 1; hist_dec = dec; hist_diff = diff;
        hist_pix = 8'(img[y0 + r][x0 + c]); hist_x = 8'(c); hist_y = 8'(r);
        n_clocks++;
        for (int k = 0; k < NB; k++) if (mine(k, diff, r, c)) taken[k]++;
      end
    @(negedge clk); hist_valid = 0;
  endtask

  // convert the union at image (y0,x0), C pixels per clock in raster order
  // (lane 1 idle in random clocks), and check every block's outputs one
  // clock later
  task automatic conv_stream(input int y0, input int x0);
    int n = 0;
    while (n < int'(UW * UH)) begin
      int r[C], c[C], pv[C];
      @(negedge clk);
      check(ready, "ready while converting");
      conv_valid = '0;
      for (int l = 0; l < int'(C); l++)
        if (n < int'(UW * UH) && (l == 0 || $urandom_range(3) != 0)) begin
          r[l] = n / UW; c[l] = n % UW; pv[l] = img[y0 + r[l]][x0 + c[l]];
          conv_valid[l] = 1'b1; conv_pix[l] = 8'(pv[l]); conv_x[l] = 8'(c[l]); conv_y[l] = 8'(r[l]);
          n++;
        end
      @(posedge clk); #1;
      for (int k = 0; k < NB; k++)
        for (int l = 0; l < int'(C); l++) begin
          bit m = conv_valid[l] && mine(k, 1'b0, r[l], c[l]);
          check(out_valid[k][l] == m, $sformatf("block %0d lane %0d out_valid at (%0d,%0d)", k, l, r[l], c[l]));
          if (m)
            check(out_pix[k][l] == 8'(tbl[k][pv[l]]),
                  $sformatf("block %0d pixel %0d -> %0d, expected %0d", k, pv[l], out_pix[k][l], tbl[k][pv[l]]));
        end
    end
    @(negedge clk); conv_valid = '0;
  endtask

  task automatic ref_tables(input int y0, input int x0);
    for (int k = 0; k < NB; k++) begin
      int h[256], cdf;
      foreach (h[v]) h[v] = 0;
      for (int y = y0 + k / N_H; y < y0 + k / N_H + W; y++)
        for (int x = x0 + k % N_H; x < x0 + k % N_H + W; x++) h[img[y][x]] = h[img[y][x]] + 1;
      cdf = 0;
      for (int v = 0; v < 256; v++) begin cdf += h[v]; tbl[k][v] = (cdf * 255) / (W * W); end
    end
  endtask

  task automatic program_all(input bit clear);
    int cyc;
    @(negedge clk); prog_start = 1; prog_clear = clear;
    @(negedge clk); prog_start = 0;
    cyc = 1;
    while (!prog_done) begin @(negedge clk); cyc++; end
    check(cyc == 131, $sformatf("programming took %0d clocks", cyc));
    @(negedge clk);
    check(!prog_busy && ready, "idle after programming");
  endtask

  initial begin
    rst_n = 0; hist_valid = 0; hist_dec = 0; hist_diff = 0; hist_pix = 0; hist_x = 0; hist_y = 0;
    conv_valid = '0; conv_pix = '0; conv_x = '0; conv_y = '0;
    prog_start = 0; prog_clear = 0;
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) img[y][x] = 40 + 2 * x + y + int'($urandom % 25);
    repeat (2) @(negedge clk); rst_n = 1;
    while (!ready) @(negedge clk);

    // full calculation of the six frames at union (3,5)
    hist_stream(1'b0, 1'b0, 3, 5, UH);
    check(n_clocks == UW * UH, "pixels of a full union");
    foreach (taken[k]) check(taken[k] == W * W, $sformatf("block %0d took %0d pixels", k, taken[k]));
    $display("full update: %0d pixels sent, utilisation per block %0d/%0d", n_clocks, W * W, n_clocks);
    ref_tables(3, 5);
    program_all(1'b0);

    // convert these frames while the differential step one row down runs
    fork
      conv_stream(3, 5);
      begin
        hist_stream(1'b1, 1'b1, 3, 5, N_V);
        hist_stream(1'b0, 1'b1, 3 + W, 5, N_V);
      end
    join
    foreach (taken[k]) check(taken[k] == W, $sformatf("block %0d took %0d pixels of a strip", k, taken[k]));
    check(n_clocks == N_V * UW, "pixels of a strip");
    ref_tables(4, 5);
    program_all(1'b1);
    conv_stream(4, 5);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
