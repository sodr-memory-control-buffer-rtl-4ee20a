// sram_model: behavioural model of the MBC's buffer memory, 2^AW words of 32
// bits (1M x 32 by default, built on the board from four 256K x 32 static RAM
// modules and an address decoder). Not synthesizable design content: a
// testbench stand-in for the external RAM. A word is written at a rising
// clock edge while we_n is low; the addressed word is returned on dout while
// oe_n is low (zero otherwise), without delay. It also counts the writes and
// reads it sees and flags any write while oe_n is low.
// It checks, in whole clocks, the set-up and recovery rules of the RAM's data
// sheet: the address must already be stable in the clock before we_n falls
// (address to start of write) and must not change in the clock in which we_n
// rises again (write recovery). Every breach is counted in timing_errors.
module sram_model #(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   din,
  output logic [31:0]   dout,
  input  logic          we_n,
  input  logic          oe_n
);
  logic [31:0] mem [2**AW];
  int writes = 0, reads = 0, conflicts = 0, timing_errors = 0;
  logic oe_q = 1'b1, we_q = 1'b1;
  logic [AW-1:0] addr_q = '0;

  always @(posedge clk) begin
    if (!we_n) begin
      mem[addr] <= din;
      writes++;
      if (!oe_n) conflicts++;
    end
    if (!oe_n && oe_q) reads++;
    oe_q <= oe_n;
    // set-up: write pulse starting with an address that just changed
    if (!we_n && we_q && addr != addr_q) timing_errors++;
    // recovery: address moving in the clock after the write pulse
    if (we_n && !we_q && addr != addr_q) timing_errors++;
    we_q   <= we_n;
    addr_q <= addr;
  end

  assign dout = oe_n ? 32'h0 : mem[addr];
endmodule
