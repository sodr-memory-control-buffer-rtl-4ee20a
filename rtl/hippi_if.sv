// hippi_if: the MBC's HIPPI byte-lane interface.
//
// Four MBCs share one 32-bit HIPPI channel, one byte lane each. This unit does
// the low-level data transfer with the AMCC destination (input) and source
// (output) chips; the connect/disconnect protocol is left to external logic,
// except for the I-field, which the MBC presents on the bus. It buffers
// through a 512 x 8 FIFO and converts between bytes and 32-bit memory words.
//
// Input direction (HIPPI to SCSI / HIPPI to memory): the MBC enables the
// destination chip's outputs (dest_oe_n low) whenever the FIFO has room, and
// takes a byte in every clock in which the chip also has data (nrden low).
// rdyin is raised while the FIFO has room for a whole burst, so the
// destination can grant another burst. Bytes go through the FIFO to the packer
// and on to memory, least significant byte first.
//
// Output direction (SCSI to HIPPI / Memory to HIPPI): memory words are split
// into bytes and queued in the FIFO. While no burst runs the bus carries the
// I-field byte. pktav stays high while the transfer counter is non-zero; bstav
// rises once the FIFO holds a full 256-byte burst (the FIFO's half-full point)
// or, for the last burst of a packet, all the remaining bytes, in which case
// shbst marks a short burst. When the source chip requests data (dtreq) and
// the external synchronisation of all byte lanes (sync) is true, the burst is
// sent one byte per clock, each byte flagged by h_wr and covered by the odd
// parity bit paro. Every byte moved in either direction increments the
// transfer counter.
//
// The document gives the FIFO size, the 256-byte bursts, the half-full
// trigger, the I-field and the pin names. The single clock for all pins, the
// exact handshake timing (one byte per clock, the h_wr strobe, bursts start
// the clock after dtreq and sync are seen) and the meaning given to rdyin are
// this design's own choices. bist_start hands the FIFO to fifo_bist.
module hippi_if
  import mbc_pkg::*;
#(
  parameter int unsigned DEPTH       = 512,
  parameter int unsigned BURST_BYTES = 256,
  parameter int unsigned XC_W        = 48,
  localparam int unsigned AW         = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  dir_e            dir,
  input  logic [7:0]      ifield,
  // destination chip (input direction)
  input  logic [7:0]      h_din,
  input  logic            nrden,
  output logic            dest_oe_n,
  output logic            rdyin,
  // source chip (output direction)
  output logic [7:0]      h_dout,
  output logic            h_doe,
  output logic            h_wr,
  input  logic            dtreq,
  input  logic            sync,
  output logic            bstav,
  output logic            pktav,
  output logic            shbst,
  output logic            paro,
  // transfer counter
  input  logic [XC_W-1:0] xc_value,
  output logic            xc_inc,
  // words to memory
  output logic            mw_valid,
  output logic [31:0]     mw_data,
  input  logic            mw_ready,
  // words from memory
  input  logic            mr_valid,
  input  logic [31:0]     mr_data,
  output logic            mr_ready,
  // self test
  input  logic            bist_start,
  output logic            bist_done,
  output logic            bist_pass,
  // flags
  output logic            fifo_empty,
  output logic            fifo_full,
  output logic            fifo_half
);

  // ---------------- FIFO with self test in front ----------------
  logic        f_push, f_pop, f_clear;
  logic [7:0]  f_wdata, f_rdata;
  logic [AW:0] f_count;
  logic        b_active, b_clear, b_push, b_pop;
  logic [7:0]  b_wdata;
  logic        n_push, n_pop;
  logic [7:0]  n_wdata;

  sync_fifo #(.W(8), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clear(f_clear), .push(f_push), .wdata(f_wdata),
    .pop(f_pop), .rdata(f_rdata), .empty(fifo_empty), .full(fifo_full),
    .half(fifo_half), .count(f_count)
  );

  fifo_bist #(.W(8), .DEPTH(DEPTH)) u_bist (
    .clk, .rst_n, .start(bist_start), .active(b_active), .f_clear(b_clear),
    .f_push(b_push), .f_wdata(b_wdata), .f_pop(b_pop), .f_rdata(f_rdata),
    .f_empty(fifo_empty), .f_full(fifo_full), .done(bist_done), .pass(bist_pass)
  );

  assign f_clear = b_active ? b_clear : clear;
  assign f_push  = b_active ? b_push  : n_push;
  assign f_wdata = b_active ? b_wdata : n_wdata;
  assign f_pop   = b_active ? b_pop   : n_pop;

  // ---------------- input direction ----------------
  logic in_dir, out_dir, d_take;
  logic pk_valid, pk_ready;
  assign in_dir  = (dir == DIR_IN)  && !b_active;
  assign out_dir = (dir == DIR_OUT) && !b_active;

  assign dest_oe_n = !(in_dir && !fifo_full);
  assign d_take    = !dest_oe_n && !nrden;
  assign rdyin     = in_dir && (f_count <= (AW+1)'(DEPTH - BURST_BYTES));

  assign pk_valid = in_dir && !fifo_empty;

  word_packer #(.IN_W(8)) u_pack (
    .clk, .rst_n, .clear, .in_valid(pk_valid), .in_data(f_rdata), .in_ready(pk_ready),
    .out_valid(mw_valid), .out_data(mw_data), .out_ready(mw_ready)
  );

  // ---------------- output direction ----------------
  logic        up_valid, up_ready, up_in_ready;
  logic [7:0]  up_data;

  word_unpacker #(.OUT_W(8)) u_unpack (
    .clk, .rst_n, .clear, .in_valid(mr_valid && out_dir), .in_data(mr_data),
    .in_ready(up_in_ready), .out_valid(up_valid), .out_data(up_data), .out_ready(up_ready)
  );
  assign up_ready = out_dir && !fifo_full;
  assign mr_ready = up_in_ready && out_dir;

  // burst sequencer
  logic [XC_W-1:0]                remaining;
  logic [$clog2(BURST_BYTES+1)-1:0] burst_len, left;
  logic                           bursting, start, b_pop_n;
  logic [7:0]                     dout_q;
  logic                           wr_q;

  assign remaining = '0 - xc_value;
  assign burst_len = (remaining >= XC_W'(BURST_BYTES)) ? ($clog2(BURST_BYTES+1))'(BURST_BYTES)
                                                      : ($clog2(BURST_BYTES+1))'(remaining);
  assign pktav = out_dir && (xc_value != '0);
  assign bstav = pktav && !bursting && (f_count >= (AW+1)'(burst_len));
  assign shbst = bstav && (remaining < XC_W'(BURST_BYTES));
  assign start = bstav && dtreq && sync;
  assign b_pop_n = bursting && out_dir;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bursting <= 1'b0;
      left     <= '0;
      dout_q   <= '0;
      wr_q     <= 1'b0;
    end else if (clear) begin
      bursting <= 1'b0;
      left     <= '0;
      wr_q     <= 1'b0;
    end else begin
      wr_q <= b_pop_n;
      if (b_pop_n) dout_q <= f_rdata;
      if (start) begin
        bursting <= 1'b1;
        left     <= burst_len;
      end else if (b_pop_n) begin
        left <= left - 1'b1;
        if (left == 1) bursting <= 1'b0;
      end
    end
  end

  assign h_wr   = wr_q;
  assign h_dout = wr_q ? dout_q : ifield;
  assign h_doe  = out_dir;
  assign paro   = odd_parity(h_dout);

  // ---------------- FIFO port selection ----------------
  assign n_push  = in_dir ? d_take : (up_valid && up_ready);
  assign n_wdata = in_dir ? h_din : up_data;
  assign n_pop   = in_dir ? (pk_valid && pk_ready) : b_pop_n;
  assign xc_inc  = d_take || b_pop_n;

endmodule
