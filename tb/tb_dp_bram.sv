// tb_dp_bram: self-checking test of the dual-port RAM.
// Random writes and reads on both ports are compared against an array model:
// a read returns the word one clock later, a port that writes returns the old
// word (read-first), and a read of an address the other port writes in the same
// clock also returns the old word. Inputs change on the falling edge.
module tb_dp_bram;
  localparam int unsigned AW = 4, DW = 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [AW-1:0] addr_a, addr_b;
  logic we_a, we_b;
  logic [DW-1:0] din_a, din_b, dout_a, dout_b;
  int checks = 0, failures = 0;

  dp_bram #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  logic [DW-1:0] model [1 << AW];
  logic [DW-1:0] exp_a, exp_b;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_a = 0; we_b = 0; addr_a = 0; addr_b = 0; din_a = 0; din_b = 0;
    // fill every word through alternating ports
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      if (i % 2 == 0) begin we_a = 1; we_b = 0; addr_a = AW'(i); din_a = DW'(i * 7 + 3); end
      else            begin we_a = 0; we_b = 1; addr_b = AW'(i); din_b = DW'(i * 7 + 3); end
      model[i] = DW'(i * 7 + 3);
    end
    @(negedge clk); we_a = 0; we_b = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      addr_a = AW'($urandom); addr_b = AW'($urandom);
      din_a = DW'($urandom); din_b = DW'($urandom);
      we_a = ($urandom % 3) == 0;
      we_b = ($urandom % 3) == 0;
      if (we_a && we_b && addr_a == addr_b) we_b = 0;
      exp_a = model[addr_a];
      exp_b = model[addr_b];
      @(posedge clk); #1;
      if (we_a) model[addr_a] = din_a;
      if (we_b) model[addr_b] = din_b;
      checks += 2;
      if (dout_a !== exp_a) begin failures++; $display("port A addr %0d got %0d exp %0d", addr_a, dout_a, exp_a); end
      if (dout_b !== exp_b) begin failures++; $display("port B addr %0d got %0d exp %0d", addr_b, dout_b, exp_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
