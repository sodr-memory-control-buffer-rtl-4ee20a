// sync_fifo: single-clock first-in first-out buffer with its own flag logic.
//
// The MBC uses two of these: 512 x 8 in the HIPPI interface and 256 x 16 in
// the SCSI interface. The read side is show-ahead: rdata is the oldest entry
// whenever empty is low, and pop removes it at the clock edge. A push while
// full and a pop while empty are ignored. Flags (empty, full, half = at least
// DEPTH/2 entries) come from a fill counter, so they are exact on the cycle
// after each push or pop. clear empties the FIFO synchronously.
// Depths and widths follow the document; the show-ahead read and the flag
// encoding are this design's own choices.
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          push,
  input  logic [W-1:0]  wdata,
  input  logic          pop,
  output logic [W-1:0]  rdata,
  output logic          empty,
  output logic          full,
  output logic          half,
  output logic [AW:0]   count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else if (clear) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  assign rdata = mem[rp];
  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign half  = (count >= (AW+1)'(DEPTH/2));

endmodule
