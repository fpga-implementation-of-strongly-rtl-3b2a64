// tb_opb_hist_equ_2d: the end-to-end test of tb_opb_hist_equ run on a
// 4 x 2 grid of blocks (eight neighbouring 20x20 frames equalised at once,
// union rectangle 23 x 21), each block with two RAM banks (four histogram
// bins read and four table entries written per clock) and two conversion
// lanes (two pixels converted per clock, DATA writes acknowledged after five
// clocks instead of seven in conversion). Every block's results are read and
// checked, and the pixel counts per update are checked against
// (W+N_H-1)(W+N_V-1) and 2*N_V*(W+N_H-1).
module tb_opb_hist_equ_2d;
  localparam int unsigned N_H = 4, N_V = 2, LANES = 2, CONV_LANES = 2;
  localparam int unsigned NB = N_H * N_V;
  localparam int unsigned W = 20, IMG = 48;
  localparam int unsigned UW = W + N_H - 1, UH = W + N_V - 1;
  localparam logic [31:0] BASE = 32'hA000_0000;
  localparam logic [31:0] A_CTRL = BASE, A_DATA = BASE + 4, A_RESULT = BASE + 32'h40;

  logic OPB_Clk = 1'b0;
  always #5 OPB_Clk = ~OPB_Clk;

  logic        OPB_Rst, OPB_RNW, OPB_select, OPB_seqAddr;
  logic [31:0] OPB_ABus, OPB_DBus, Sl_DBus;
  logic [3:0]  OPB_BE;
  logic        Sl_xferAck, Sl_errAck, Sl_retry, Sl_toutSup;

  opb_hist_equ #(.N_H(N_H), .N_V(N_V), .LANES(LANES), .CONV_LANES(CONV_LANES)) dut (.*);

  int checks = 0, failures = 0;
  int img [IMG][IMG];
  int hist [NB][256];
  int tbl [NB][256];
  int n_inc = 0, n_dec = 0, n_conv = 0, n_keep = 0, n_clear = 0, n_skipped = 0, n_held = 0;
  int n_sent = 0;
  int wait_cnt = 0;
  int last_cyc = 0;        // clocks from select to acknowledge of the last access
  bit last_held = 0;

  initial begin
    repeat (400000) @(posedge OPB_Clk);
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
    last_cyc = cyc; last_held = held;
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
        if (!last_held)
          check(last_cyc == (op == 2 ? 3 + 4 / int'(CONV_LANES) : 7),
                $sformatf("DATA write acknowledged after %0d clocks", last_cyc));
        if (op == 2)
          for (int k = 0; k < NB; k++) begin
            rdr(A_RESULT + 32'(4 * k), rd);
            check(last_cyc == 2, $sformatf("RESULT read acknowledged after %0d clocks", last_cyc));
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

  task automatic clear_model();
    for (int k = 0; k < NB; k++) foreach (hist[k][v]) hist[k][v] = 0;
  endtask

  initial begin
    logic [31:0] rd;
    OPB_Rst = 1; OPB_select = 0; OPB_RNW = 0; OPB_seqAddr = 0;
    OPB_ABus = 0; OPB_DBus = 0; OPB_BE = 0;
    clear_model();
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) img[y][x] = 60 + (x + y) + int'($urandom % 30);
    repeat (3) @(negedge OPB_Clk); OPB_Rst = 0;

    // the first access arrives while the histograms clear after reset
    wr(A_CTRL, ctrl(0, 1'b0, 1'b0, 1'b0));
    check(n_held == 1, "access held during clear after reset");
    rdr(A_CTRL, rd);
    check(rd[17] == 1'b1 && rd[16] == 1'b0 && rd[18] == 1'b0, $sformatf("CTRL after reset = %h", rd));

    // A: full calculation at (0,0)
    n_sent = 0;
    send_rows(0, 1'b0, 0, 0, UH);
    check(n_sent == UW * UH, $sformatf("full update sent %0d pixels", n_sent));
    ref_tables(0, 0);
    program_and_switch(1'b0);
    send_rows(2, 1'b0, 0, 0, UH);
    // B: differential, one row down
    n_sent = 0;
    wr(A_CTRL, ctrl(1, 1'b1, 1'b1, 1'b0));
    send_rows(1, 1'b1, 0, 0, N_V);
    wr(A_CTRL, ctrl(0, 1'b1, 1'b1, 1'b0));
    send_rows(0, 1'b1, W, 0, N_V);
    check(n_sent == 2 * N_V * UW, $sformatf("differential update sent %0d pixels", n_sent));
    ref_tables(1, 0);
    program_and_switch(1'b1);
    send_rows(2, 1'b0, 1, 0, UH);
    clear_model();
    // C: full calculation at (10,7), rows not word aligned
    wr(A_CTRL, ctrl(0, 1'b1, 1'b0, 1'b0));
    send_rows(0, 1'b0, 10, 7, UH);
    ref_tables(10, 7);
    program_and_switch(1'b1);
    send_rows(2, 1'b0, 10, 7, UH);

    $display("blocks %0d: increments %0d decrements %0d conversions %0d kept %0d cleared %0d skipped lanes %0d held accesses %0d",
             NB, n_inc, n_dec, n_conv, n_keep, n_clear, n_skipped, n_held);
    check(n_inc == NB * (2 * W * W + W), "increments happened, W*W per block per full frame plus W per step");
    check(n_dec == NB * W, "decrements happened, W per block per step");
    check(n_conv == NB * 3 * W * W, "all pixels of all frames converted");
    check(n_keep > 0 && n_clear > 0, "programming with keep and with clear");
    check(n_skipped > 0, "byte lanes skipped");
    check(n_held >= 4, "held accesses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
