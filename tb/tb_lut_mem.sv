// tb_lut_mem: self-checking test of the LUT memory with four RAM banks and
// two conversion lanes. Programs all 256 entries eight per clock with a random
// table, then converts random pixel pairs (lane 1 randomly idle, pairs often in
// the same bank) and checks each result, its valid and its one-clock latency;
// then reprograms with a second table and checks again.
module tb_lut_mem;
  localparam int unsigned PW = 8, L = 4, RW = PW - 2, C = 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, prog_en;
  logic [C-1:0] conv_valid, conv_valid_out;
  logic [RW-1:0] prog_row0, prog_row1;
  logic [L-1:0][PW-1:0] prog_v0, prog_v1;
  logic [C-1:0][PW-1:0] conv_pix, conv_pix_out;
  int checks = 0, failures = 0;
  logic [PW-1:0] table_m [256];

  lut_mem #(.PIX_W(PW), .LANES(L), .CONV_LANES(C)) dut (.*);

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

  task automatic program_table();
    foreach (table_m[i]) table_m[i] = PW'($urandom);
    for (int j = 0; j < 256 / (2 * L); j++) begin
      @(negedge clk);
      prog_en = 1;
      prog_row0 = RW'(2*j); prog_row1 = RW'(2*j+1);
      for (int l = 0; l < L; l++) begin
        prog_v0[l] = table_m[2*j*L + l];
        prog_v1[l] = table_m[(2*j+1)*L + l];
      end
    end
    @(negedge clk); prog_en = 0;
  endtask

  task automatic convert(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      conv_valid = {1'($urandom), 1'b1};
      conv_pix[0] = PW'($urandom);
      // half the pairs share a bank
      conv_pix[1] = ($urandom_range(1) == 0) ? PW'($urandom)
                                             : {PW'($urandom) & ~PW'(L-1)} | (conv_pix[0] & PW'(L-1));
      @(posedge clk); #1;
      check(conv_valid_out == conv_valid, "conv_valid_out one clock later");
      for (int c = 0; c < C; c++)
        if (conv_valid[c])
          check(conv_pix_out[c] == table_m[conv_pix[c]],
                $sformatf("lane %0d LUT[%0d]=%0d exp %0d", c, conv_pix[c], conv_pix_out[c],
                          table_m[conv_pix[c]]));
    end
    @(negedge clk); conv_valid = '0;
    @(posedge clk); #1;
    check(conv_valid_out == '0, "conv_valid_out drops");
  endtask

  initial begin
    rst_n = 0; prog_en = 0; conv_valid = '0; conv_pix = '0;
    prog_row0 = 0; prog_row1 = 0; prog_v0 = '0; prog_v1 = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    program_table(); convert(400);
    program_table(); convert(400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
