// tb_face_scan: the face-detection workload, scaled down: a 20x20 window
// scanned down one column of a 64x64 generated 8-bit image, one pixel per
// step, through the OPB peripheral at its default configuration.
// The first window (rows 0..19, columns 5..24, so rows start mid-word) is
// computed from scratch; each of the following 40 windows is reached by a
// differential step only (the leaving row decremented, the entering row
// incremented, 40 pixels), with the histogram kept at every programming.
// Every pixel of every window is converted and checked against
// floor(255 * cdf(p) / 400) of a histogram counted here. The last window then
// steps right SIDE times: the 20 pixels of the leaving column are sent with
// op = decrement and those of the entering column with op = increment, with
// diff = 0 (a single block takes every pixel sent to it). The scan of a full
// 512x512 image repeats this for 492 columns of 492 windows each.
module tb_face_scan;
  localparam int unsigned N_H = 1, N_V = 1, LANES = 1;
  localparam int unsigned STEPS = 40, X0 = 5, SIDE = 4;
  localparam int unsigned NB = N_H * N_V;
  localparam int unsigned W = 20, IMG = 64;
  localparam int unsigned UW = W + N_H - 1, UH = W + N_V - 1;
  localparam logic [31:0] BASE = 32'hA000_0000;
  localparam logic [31:0] A_CTRL = BASE, A_DATA = BASE + 4, A_RESULT = BASE + 32'h40;

  logic OPB_Clk = 1'b0;
  always #5 OPB_Clk = ~OPB_Clk;

  logic        OPB_Rst, OPB_RNW, OPB_select, OPB_seqAddr;
  logic [31:0] OPB_ABus, OPB_DBus, Sl_DBus;
  logic [3:0]  OPB_BE;
  logic        Sl_xferAck, Sl_errAck, Sl_retry, Sl_toutSup;

  

  int checks = 0, failures = 0;
  int img [IMG][IMG];
  int hist [NB][256];
  int tbl [NB][256];
  int n_inc = 0, n_dec = 0, n_conv = 0, n_keep = 0, n_clear = 0, n_skipped = 0, n_held = 0;
  int n_sent = 0;
  int wait_cnt = 0;

  initial begin
    repeat (200000) @(posedge OPB_Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- bus rules, every clock, sampled just after the edge ----
  always @(posedge OPB_Clk) begin
    #2;
    if (!OPB_Rst) begin
      if (Sl_xferAck && !OPB_select) begin failures++; $display("FAIL: ack without select"); end
      if (!Sl_xferAck && Sl_DBus != 0) begin failures++; $display("FAIL: Sl_DBus not zero"); end
      if (Sl_errAck || Sl_retry) begin failures++; $display("FAIL: error or retry"); end
      if (OPB_select && !Sl_xferAck) begin
        if (Sl_toutSup) wait_cnt = 0; else wait_cnt++;
        if (wait_cnt > 16) begin failures++; $display("FAIL: bus timeout"); wait_cnt = 0; end
      end else wait_cnt = 0;
    end
  end

  // ---- OPB master ----
  task automatic opb_xfer(input logic [31:0] addr, input bit rnw, input logic [31:0] wd,
                          input logic [3:0] be, output logic [31:0] rd);
    int cyc = 0;
    bit held = 0;
    @(negedge OPB_Clk);
    OPB_select = 1; OPB_ABus = addr; OPB_RNW = rnw; OPB_BE = be;
    OPB_DBus = rnw ? 32'd0 : wd;
    do begin
      @(posedge OPB_Clk); #1;
      cyc++;
      if (Sl_toutSup) held = 1;
    end while (!Sl_xferAck && cyc < 1000);
    check(Sl_xferAck, "access acknowledged");
    rd = Sl_DBus;
    if (held) n_held++;
    @(negedge OPB_Clk);
    OPB_select = 0; OPB_ABus = 0; OPB_DBus = 0; OPB_BE = 0; OPB_RNW = 0;
  endtask

  task automatic wr(input logic [31:0] addr, input logic [31:0] wd, input logic [3:0] be = 4'hF);
    logic [31:0] unused;
    opb_xfer(addr, 1'b0, wd, be, unused);
  endtask

  task automatic rdr(input logic [31:0] addr, output logic [31:0] rd);
    opb_xfer(addr, 1'b1, 32'd0, 4'hF, rd);
  endtask

  function automatic logic [31:0] ctrl(input int op, input bit clear, input bit diff, input bit start);
    return 32'(op) | (32'(clear) << 4) | (32'(diff) << 5) | (32'(start) << 8);
  endfunction

  // does block (i,j) take the pixel at union column ux, row uy?
  function automatic bit takes(input int k, input int ux, input int uy, input bit diff);
    int i = k % N_H, j = k / N_H;
    bit col = (ux >= i) && (ux < i + W);
    if (diff) return col && (uy == j);
    return col && (uy >= j) && (uy < j + W);
  endfunction

  // Send h rows of UW pixels whose first pixel is image (y0,x0), in aligned
  // words with byte enables. op 0/1 update the model histograms, op 2 reads
  // and checks every block's results after each word.
  task automatic send_rows(input int op, input bit diff, input int y0, input int x0, input int h);
    logic [31:0] wd, rd;
    logic [3:0] be;
    int ux [4];
    int uy;
    for (int r = 0; r < h; r++) begin
      uy = r;
      for (int xw = (x0 / 4) * 4; xw < x0 + int'(UW); xw += 4) begin
        wd = 0; be = 0;
        for (int b = 0; b < 4; b++) begin
          int x = xw + b;
          ux[b] = x - x0;
          if (x >= x0 && x < x0 + int'(UW)) begin
            int p = img[y0 + r][x];
            be[b] = 1'b1;
            wd[8*b +: 8] = 8'(p);
            n_sent++;
            for (int k = 0; k < NB; k++)
              if (op != 2 && takes(k, ux[b], uy, diff)) begin
                if (op == 0) begin hist[k][p] = hist[k][p] + 1; n_inc++; end
                else         begin hist[k][p] = hist[k][p] - 1; n_dec++; end
              end
          end else begin
            wd[8*b +: 8] = 8'($urandom);   // must be ignored
            n_skipped++;
          end
        end
        wr(A_DATA, wd, be);
        if (op == 2)
          for (int k = 0; k < NB; k++) begin
            rdr(A_RESULT + 32'(4 * k), rd);
            for (int b = 0; b < 4; b++) begin
              if (be[b] && takes(k, ux[b], uy, 1'b0)) begin
                int p = img[y0 + r][xw + b];
                n_conv++;
                check(rd[8*b +: 8] == 8'(tbl[k][p]),
                      $sformatf("block %0d pixel (%0d,%0d)=%0d -> %0d, expected %0d",
                                k, y0 + r, xw + b, p, rd[8*b +: 8], tbl[k][p]));
              end else check(rd[8*b +: 8] == 8'd0, "lane outside the block's frame reads zero");
            end
          end
      end
    end
  endtask

  // send the W pixels of image column x, rows y0.. y0+W-1, four per word
  // (single block only), updating the model histogram with op 0/1
  task automatic send_column(input int op, input int y0, input int x);
    for (int r = 0; r < int'(W); r += 4) begin
      logic [31:0] wd = 0;
      logic [3:0] be = 0;
      for (int b = 0; b < 4 && r + b < int'(W); b++) begin
        int p = img[y0 + r + b][x];
        wd[8*b +: 8] = 8'(p);
        be[b] = 1'b1;
        n_sent++;
        if (op == 0) begin hist[0][p] = hist[0][p] + 1; n_inc++; end
        else         begin hist[0][p] = hist[0][p] - 1; n_dec++; end
      end
      wr(A_DATA, wd, be);
    end
  endtask

  // reference tables of all blocks for the union at image (y0,x0)
  task automatic ref_tables(input int y0, input int x0);
    for (int k = 0; k < NB; k++) begin
      int h[256], cdf;
      int fy = y0 + k / N_H, fx = x0 + k % N_H;
      foreach (h[i]) h[i] = 0;
      for (int y = fy; y < fy + W; y++)
        for (int x = fx; x < fx + W; x++) h[img[y][x]] = h[img[y][x]] + 1;
      foreach (h[i]) check(h[i] == hist[k][i], $sformatf("block %0d model histogram bin %0d", k, i));
      cdf = 0;
      for (int v = 0; v < 256; v++) begin
        cdf += h[v];
        tbl[k][v] = (cdf * 255) / (W * W);
      end
    end
  endtask

  // start programming, then switch to conversion: the CTRL write is held
  // until the tables are programmed
  task automatic program_and_switch(input bit clear);
    logic [31:0] rd;
    int t0, held_before;
    wr(A_CTRL, ctrl(0, clear, 1'b0, 1'b1));
    held_before = n_held;
    t0 = $time;
    wr(A_CTRL, ctrl(2, clear, 1'b0, 1'b0));
    check(n_held == held_before + 1, "access held while programming");
    check(($time - t0) / 10 >= 128 / LANES, "programming takes at least 128/LANES clocks");
    rdr(A_CTRL, rd);
    check(rd[16] == 1'b0 && rd[17] == 1'b1 && rd[18] == 1'b1 && rd[1:0] == 2'd2 && rd[4] == clear,
          $sformatf("CTRL after programming = %h", rd));
    if (clear) n_clear++; else n_keep++;
  endtask

  opb_hist_equ dut (.*);

  initial begin
    logic [31:0] rd;
    OPB_Rst = 1; OPB_select = 0; OPB_RNW = 0; OPB_seqAddr = 0;
    OPB_ABus = 0; OPB_DBus = 0; OPB_BE = 0;
    foreach (hist[0][v]) hist[0][v] = 0;
    // smooth background with a brighter blob, plus noise
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        int d = (y - 30) * (y - 30) + (x - 14) * (x - 14);
        img[y][x] = 70 + y / 2 + (d < 120 ? 60 : 0) + int'($urandom % 20);
      end
    repeat (3) @(negedge OPB_Clk); OPB_Rst = 0;

    wr(A_CTRL, ctrl(0, 1'b0, 1'b0, 1'b0));
    send_rows(0, 1'b0, 0, X0, UH);
    for (int s = 0; s <= int'(STEPS); s++) begin
      if (s > 0) begin
        n_sent = 0;
        wr(A_CTRL, ctrl(1, 1'b0, 1'b1, 1'b0));
        send_rows(1, 1'b1, s - 1, X0, 1);
        wr(A_CTRL, ctrl(0, 1'b0, 1'b1, 1'b0));
        send_rows(0, 1'b1, s - 1 + W, X0, 1);
        check(n_sent == 2 * W, "differential step sends 2W pixels");
      end
      ref_tables(s, X0);
      program_and_switch(1'b0);
      send_rows(2, 1'b0, s, X0, UH);
    end
    // sideways steps of the last window
    for (int t = 1; t <= int'(SIDE); t++) begin
      n_sent = 0;
      wr(A_CTRL, ctrl(1, 1'b0, 1'b0, 1'b0));
      send_column(1, STEPS, X0 + t - 1);
      wr(A_CTRL, ctrl(0, 1'b0, 1'b0, 1'b0));
      send_column(0, STEPS, X0 + t - 1 + W);
      check(n_sent == 2 * W, "sideways step sends 2W pixels");
      ref_tables(STEPS, X0 + t);
      program_and_switch(1'b0);
      send_rows(2, 1'b0, STEPS, X0 + t, UH);
    end
    $display("windows %0d: increments %0d decrements %0d conversions %0d held accesses %0d",
             STEPS + SIDE + 1, n_inc, n_dec, n_conv, n_held);
    check(n_dec == (STEPS + SIDE) * W && n_inc == W * W + (STEPS + SIDE) * W, "pixel counts of the scan");
    check(n_conv == (STEPS + SIDE + 1) * W * W, "every pixel of every window converted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
