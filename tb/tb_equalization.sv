// tb_equalization: self-checking test of the equation module with two RAM
// banks. Feeds random 20x20-frame histograms four bins per clock and checks each LUT
// value against floor(255 * cumulative_sum / 400) computed here, the output
// addresses, the one-clock latency, the restart of the running sum on
// in_first, and the saturation at 255 for an over-full histogram.
module tb_equalization;
  localparam int unsigned PW = 8, CW = 9, FW = 20, L = 2, RW = PW - 1;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_first, out_valid;
  logic [RW-2:0] in_idx;
  logic [L-1:0][CW-1:0] h0, h1;
  logic [RW-1:0] out_row0, out_row1;
  logic [L-1:0][PW-1:0] out_v0, out_v1;
  int checks = 0, failures = 0;
  int hist [256];

  equalization #(.PIX_W(PW), .CNT_W(CW), .FRAME_W(FW), .LANES(L)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ref_v(input int cdf);
    int v = (cdf * 255) / (FW * FW);
    return v > 255 ? 255 : v;
  endfunction

  task automatic run(input int total);
    int cdf = 0;
    int c [2*L];
    for (int j = 0; j < 256 / (2 * L); j++) begin
      @(negedge clk);
      in_valid = 1; in_first = (j == 0); in_idx = (RW-1)'(j);
      for (int b = 0; b < 2 * L; b++) begin
        int bin = 2 * j * L + b;
        if (b < L) h0[b] = CW'(hist[bin]); else h1[b - L] = CW'(hist[bin]);
        cdf += hist[bin];
        c[b] = cdf;
      end
      @(posedge clk); #1;
      check(out_valid, "out_valid one clock after in_valid");
      check(out_row0 == RW'(2*j) && out_row1 == RW'(2*j+1), "rows");
      for (int l = 0; l < L; l++) begin
        check(out_v0[l] == PW'(ref_v(c[l])), $sformatf("v[%0d]=%0d exp %0d", 2*j*L + l, out_v0[l], ref_v(c[l])));
        check(out_v1[l] == PW'(ref_v(c[L + l])), $sformatf("v[%0d]=%0d exp %0d", (2*j+1)*L + l, out_v1[l], ref_v(c[L + l])));
      end
    end
    @(negedge clk); in_valid = 0; in_first = 0;
    @(posedge clk); #1;
    check(!out_valid, "out_valid drops");
    check(cdf == total, $sformatf("histogram total %0d exp %0d", cdf, total));
  endtask

  initial begin
    rst_n = 0; in_valid = 0; in_first = 0; in_idx = 0; h0 = '0; h1 = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      foreach (hist[i]) hist[i] = 0;
      // frames 0..4: 400 pixels from a random range; frame 5: 500 pixels
      for (int n = 0; n < (f == 5 ? 500 : 400); n++) begin
        int idx;
        idx = ((f * 37) % 200 + int'($urandom % (16 + f * 40))) % 256;
        hist[idx] = hist[idx] + 1;
      end
      run(f == 5 ? 500 : 400);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
