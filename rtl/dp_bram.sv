// dp_bram: true dual-port synchronous RAM, the FPGA block RAM every other
// block is built on.
//
// Both ports have their own address, write enable and data. A read is
// synchronous: the word addressed at a clock edge appears on dout one clock
// later. The ports are "read-first": a port that writes returns the word the
// location held before the write, which the histogram uses to read a bin and
// clear it in the same clock. Writing the same address from both ports in one
// clock is not allowed (an assertion flags it); reading on one port an address
// the other port writes in the same clock returns the old word.
//
// The memory is left uninitialised, as block RAM contents are after
// configuration unless cleared; the users of this module clear it themselves.
module dp_bram #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 9
) (
  input  logic              clk,
  // port A
  input  logic [ADDR_W-1:0] addr_a,
  input  logic              we_a,
  input  logic [DATA_W-1:0] din_a,
  output logic [DATA_W-1:0] dout_a,
  // port B
  input  logic [ADDR_W-1:0] addr_b,
  input  logic              we_b,
  input  logic [DATA_W-1:0] din_b,
  output logic [DATA_W-1:0] dout_b
);

  logic [DATA_W-1:0] mem [1 << ADDR_W];

  // One process for both ports, so that the read-first order holds for either
  // port whatever the other one writes.
  always_ff @(posedge clk) begin
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
    if (we_a) mem[addr_a] <= din_a;
    if (we_b) mem[addr_b] <= din_b;
  end

  a_no_write_collision: assert property (@(posedge clk) !(we_a && we_b && addr_a == addr_b))
    else $error("dp_bram: both ports write address %0d", addr_a);

endmodule
