// tb_hist_calc: self-checking test of the histogram calculation module with
// four RAM banks (eight bins read per clock; the single-bank default is
// covered by the block and system tests).
// After the clear that follows reset (checked to take 2^PIX_W/8 clocks), it
// streams random pixels, one per clock, with runs of equal pixels to exercise
// the write-back bypass and with decrements mixed in, then reads the histogram
// eight bins per clock and compares every bin with a counted model. A first read
// keeps the histogram, a second read with clear must return the same counts
// and a third must return zeros.
module tb_hist_calc;
  localparam int unsigned PW = 8, CW = 9, L = 4, RW = PW - 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, ready, busy, in_valid, in_dec, rd_en, rd_clear;
  logic [PW-1:0] in_pix;
  logic [RW-1:0] rd_row0, rd_row1;
  logic [L-1:0][CW-1:0] rd_data0, rd_data1;
  int checks = 0, failures = 0;
  int model [1 << PW];
  int bypass_events = 0, dec_events = 0;

  hist_calc #(.PIX_W(PW), .CNT_W(CW), .LANES(L)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // read all bins, compare with model (or with zero)
  task automatic read_all(input bit clear, input bit expect_zero);
    for (int j = 0; j < (1 << PW) / (2 * L); j++) begin
      @(negedge clk);
      rd_en = 1; rd_clear = clear;
      rd_row0 = RW'(2 * j); rd_row1 = RW'(2 * j + 1);
      @(posedge clk); #1;
      for (int l = 0; l < L; l++) begin
        int b0 = 2 * j * L + l, b1 = (2 * j + 1) * L + l;
        check(rd_data0[l] == (expect_zero ? 0 : CW'(model[b0])), $sformatf("bin %0d = %0d", b0, rd_data0[l]));
        check(rd_data1[l] == (expect_zero ? 0 : CW'(model[b1])), $sformatf("bin %0d = %0d", b1, rd_data1[l]));
      end
    end
    @(negedge clk); rd_en = 0; rd_clear = 0;
  endtask

  initial begin
    int cyc;
    logic [PW-1:0] prev;
    rst_n = 0; in_valid = 0; in_dec = 0; in_pix = 0;
    rd_en = 0; rd_clear = 0; rd_row0 = 0; rd_row1 = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1; cyc++; end
    check(cyc == (1 << PW) / (2 * L), $sformatf("clear after reset took %0d clocks", cyc));
    // 400 increments (a 20x20 frame), with runs of repeated pixels
    prev = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = 1; in_dec = 0;
      in_pix = (($urandom % 4) == 0) ? prev : PW'($urandom % 40);
      if (n > 0 && in_pix == prev) bypass_events++;
      prev = in_pix;
      model[in_pix]++;
    end
    // 20 decrements of pixels that are present, 20 increments
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_dec = (n % 2 == 0);
      do in_pix = PW'($urandom % 40); while (in_dec && model[in_pix] == 0);
      if (in_dec) begin model[in_pix]--; dec_events++; end else model[in_pix]++;
    end
    // a decrement right after an increment of the same bin
    @(negedge clk); in_pix = 8'd200; in_dec = 0; model[200]++;
    @(negedge clk); in_pix = 8'd200; in_dec = 1; model[200]--; bypass_events++; dec_events++;
    @(negedge clk); in_pix = 8'd200; in_dec = 0; model[200]++; bypass_events++;
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    check(!busy, "busy after the last pixel");
    read_all(1'b0, 1'b0);   // keep
    read_all(1'b1, 1'b0);   // read and clear
    read_all(1'b0, 1'b1);   // all zero now
    check(bypass_events > 0 && dec_events > 0, "bypass and decrement exercised");
    $display("bypass events %0d, decrements %0d", bypass_events, dec_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
