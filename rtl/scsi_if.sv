// scsi_if: the MBC's SCSI interface, the DMA port of the EMULEX FAS366.
//
// The MBC runs the DMA handshake and a 16-bit data path to the SCSI
// processor; the processor's microprocessor port belongs to the Group
// Controller. A 256 x 16 FIFO matches the memory rate to the SCSI rate, and
// 32-bit memory words are split into, or built from, two half-words, low half
// first.
//
// Handshake (this design's timing): the processor raises DREQ when it wants
// to move data. In the output direction (memory to SCSI), when DREQ is high
// and the FIFO has a half-word, the MBC drives DACKN_ and WRN_ low for one
// clock with the half-word on the bus, then releases them for one clock. In
// the input direction (SCSI to memory), when DREQ is high and the FIFO has
// room, it drives DACKN_ and RDN_ low for one clock and stores the bus value
// at the end of that clock. One half-word therefore takes two clocks. A full
// or empty FIFO simply withholds DACKN_, which is how a blocking drive stalls
// the buffer. The document gives the FIFO size, signal names and the
// 16/32-bit conversion; the two-clock handshake is assumed.
// bist_start hands the FIFO to fifo_bist.
module scsi_if
  import mbc_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  dir_e        dir,
  // FAS366 DMA port
  input  logic [15:0] s_din,
  output logic [15:0] s_dout,
  output logic        s_doe,
  input  logic        dreq,
  output logic        dackn_n,
  output logic        rdn_n,
  output logic        wrn_n,
  // words to memory
  output logic        mw_valid,
  output logic [31:0] mw_data,
  input  logic        mw_ready,
  // words from memory
  input  logic        mr_valid,
  input  logic [31:0] mr_data,
  output logic        mr_ready,
  // self test
  input  logic        bist_start,
  output logic        bist_done,
  output logic        bist_pass,
  // flags
  output logic        fifo_empty,
  output logic        fifo_full
);

  logic        f_push, f_pop, f_clear, f_half;
  logic [15:0] f_wdata, f_rdata;
  logic [AW:0] f_count;
  logic        b_active, b_clear, b_push, b_pop;
  logic [15:0] b_wdata;
  logic        n_push, n_pop;
  logic [15:0] n_wdata;

  sync_fifo #(.W(16), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clear(f_clear), .push(f_push), .wdata(f_wdata),
    .pop(f_pop), .rdata(f_rdata), .empty(fifo_empty), .full(fifo_full),
    .half(f_half), .count(f_count)
  );

  fifo_bist #(.W(16), .DEPTH(DEPTH)) u_bist (
    .clk, .rst_n, .start(bist_start), .active(b_active), .f_clear(b_clear),
    .f_push(b_push), .f_wdata(b_wdata), .f_pop(b_pop), .f_rdata(f_rdata),
    .f_empty(fifo_empty), .f_full(fifo_full), .done(bist_done), .pass(bist_pass)
  );

  assign f_clear = b_active ? b_clear : clear;
  assign f_push  = b_active ? b_push  : n_push;
  assign f_wdata = b_active ? b_wdata : n_wdata;
  assign f_pop   = b_active ? b_pop   : n_pop;

  logic in_dir, out_dir;
  assign in_dir  = (dir == DIR_IN)  && !b_active;
  assign out_dir = (dir == DIR_OUT) && !b_active;

  // ---------------- DMA handshake ----------------
  typedef enum logic {S_IDLE, S_ACK} sst_e;
  sst_e        st;
  logic        ack_rd;          // current acknowledge is a read from the processor
  logic [15:0] dout_q;
  logic        go_out, go_in;

  assign go_out = (st == S_IDLE) && out_dir && dreq && !fifo_empty;
  assign go_in  = (st == S_IDLE) && in_dir && dreq && !fifo_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      ack_rd <= 1'b0;
      dout_q <= '0;
    end else if (clear) begin
      st <= S_IDLE;
    end else begin
      unique case (st)
        S_IDLE: if (go_out || go_in) begin
          st     <= S_ACK;
          ack_rd <= go_in;
          if (go_out) dout_q <= f_rdata;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign dackn_n = !(st == S_ACK);
  assign rdn_n   = !(st == S_ACK && ack_rd);
  assign wrn_n   = !(st == S_ACK && !ack_rd);
  assign s_dout  = dout_q;
  assign s_doe   = out_dir;

  // ---------------- conversion to and from memory words ----------------
  logic        pk_valid, pk_ready;
  logic        up_valid, up_ready, up_in_ready;
  logic [15:0] up_data;

  assign pk_valid = in_dir && !fifo_empty;

  word_packer #(.IN_W(16)) u_pack (
    .clk, .rst_n, .clear, .in_valid(pk_valid), .in_data(f_rdata), .in_ready(pk_ready),
    .out_valid(mw_valid), .out_data(mw_data), .out_ready(mw_ready)
  );

  word_unpacker #(.OUT_W(16)) u_unpack (
    .clk, .rst_n, .clear, .in_valid(mr_valid && out_dir), .in_data(mr_data),
    .in_ready(up_in_ready), .out_valid(up_valid), .out_data(up_data), .out_ready(up_ready)
  );
  assign up_ready = out_dir && !fifo_full;
  assign mr_ready = up_in_ready && out_dir;

  assign n_push  = in_dir ? (st == S_ACK && ack_rd) : (up_valid && up_ready);
  assign n_wdata = in_dir ? s_din : up_data;
  assign n_pop   = in_dir ? (pk_valid && pk_ready) : go_out;

endmodule
