// mbc_asic: Memory Buffer Control ASIC of a spacecraft optical disk recorder.
//
// One MBC buffers one byte lane of a 32-bit HIPPI channel against one SCSI II
// disk: four MBCs, each with 4 MByte of SRAM, stripe a 600 Mbit/s HIPPI port
// across four drives. Inside, five units work under one mode register:
//   mbmc     master controller, six modes (see mbc_pkg::mode_e)
//   gc_if    Group Controller register port (8-bit bus, 5-bit register select)
//   hippi_if HIPPI byte lane, 512 x 8 FIFO, 256-byte bursts, I-field
//   scsi_if  FAS366 DMA port, 256 x 16 FIFO
//   mem_if   1M x 32 SRAM as a circular buffer with full/empty status
// plus the 48-bit transfer counter and a self test for each FIFO. In HIPPI to
// SCSI mode bytes are packed into 32-bit words, buffered in memory and sent
// to the SCSI processor as half-words; SCSI to HIPPI is the reverse, with
// bursts released only when the external sync input says every byte lane is
// ready. GC to Memory, Memory to HIPPI and Memory to SCSI are the diagnostic
// paths. Every pin is synchronous to the single clock `clk`; bidirectional
// pins are split into input, output and output-enable. The units, modes,
// sizes, register map and status bits 0-3 follow the document; pin timing,
// status bits 4-7 and the HIPPI status byte layout are this design's.
//
// System status (register 0x0B): bit0 transfer counter = 0, bit1 HIPPI FIFO
// empty, bit2 memory full, bit3 memory empty, bit4 SCSI FIFO full, bit5 SCSI
// FIFO empty, bit6 HIPPI FIFO full, bit7 HIPPI FIFO half full.
// HIPPI status (register 0x01): bit0 bstav, bit1 pktav, bit2 shbst, bit3 rdyin,
// bit4 sync, bit5 dtreq, bit6 nrden, bit7 dest_oe_n.
module mbc_asic
  import mbc_pkg::*;
#(
  parameter int unsigned MEM_AW      = 20,
  parameter int unsigned HFIFO_DEPTH = 512,
  parameter int unsigned SFIFO_DEPTH = 256,
  parameter int unsigned BURST_BYTES = 256,
  parameter int unsigned XC_W        = 48,
  parameter bit          GC_INVERT   = 1'b1
) (
  input  logic              clk,
  input  logic              reset_n,
  // self test
  input  logic              bist_test,
  output logic              bist_hresult,
  output logic              bist_sresult,
  // Group Controller port
  input  logic              asic_sel_n,
  input  logic              gc_rd_n,
  input  logic              gc_wr_n,
  input  logic [4:0]        reg_sel,
  input  logic [7:0]        gc_bus_in,
  output logic [7:0]        gc_bus_out,
  output logic              gc_bus_oe,
  // HIPPI source/destination chips
  input  logic [7:0]        hippi_din,
  output logic [7:0]        hippi_dout,
  output logic              hippi_doe,
  output logic              hippi_wr,
  input  logic              nrden,
  output logic              dest_oe_n,
  output logic              rdyin,
  input  logic              dtreq,
  input  logic              sync,
  output logic              bstav,
  output logic              pktav,
  output logic              shbst,
  output logic              paro,
  // buffer SRAM
  output logic [MEM_AW-1:0] mem_addr,
  input  logic [31:0]       mem_din,
  output logic [31:0]       mem_dout,
  output logic              mem_doe,
  output logic              mem_write_n,
  output logic              mem_oe_n,
  // FAS366 SCSI processor DMA port
  input  logic [15:0]       scsi_din,
  output logic [15:0]       scsi_dout,
  output logic              scsi_doe,
  input  logic              dreq,
  output logic              dackn_n,
  output logic              rdn_n,
  output logic              wrn_n
);

  mode_e     mode;
  mbc_ctrl_t ctrl;

  // GC port outputs
  logic              mode_wr;
  logic [2:0]        mode_code;
  logic [7:0]        ifield;
  logic              xc_wr;
  logic [2:0]        xc_idx;
  logic [7:0]        xc_wdata;
  logic [XC_W-1:0]   xc_value;
  logic              xc_zero, xc_inc;
  logic [MEM_AW-1:0] gc_addr;
  logic              addr_load, gc_mrd, gc_mwr, gc_rdone;
  logic [31:0]       gc_wdata, gc_rdata;
  logic [7:0]        status, hstatus;

  // memory streams
  logic        h_mw_valid, h_mw_ready, s_mw_valid, s_mw_ready;
  logic [31:0] h_mw_data, s_mw_data;
  logic        h_mr_ready, s_mr_ready;
  logic        wr_valid, wr_ready, rd_valid, rd_ready;
  logic [31:0] wr_data, rd_data;
  logic        mem_full, mem_empty;
  logic [MEM_AW:0] word_count;

  // flags
  logic h_empty, h_full, h_half, s_empty, s_full;
  logic h_bdone, h_bpass, s_bdone, s_bpass;

  mbmc u_mbmc (
    .clk, .rst_n(reset_n), .mode_wr, .mode_code, .mode, .ctrl
  );

  gc_if #(.AW(MEM_AW), .XC_W(XC_W), .GC_INVERT(GC_INVERT)) u_gc (
    .clk, .rst_n(reset_n),
    .gc_din(gc_bus_in), .gc_dout(gc_bus_out), .gc_doe(gc_bus_oe),
    .reg_sel, .gc_rd_n, .gc_wr_n, .asic_sel_n,
    .mode_wr, .mode_code, .ifield,
    .xc_wr, .xc_idx, .xc_wdata, .xc_value,
    .addr(gc_addr), .addr_load, .mem_rd(gc_mrd), .mem_wr(gc_mwr),
    .mem_wdata(gc_wdata), .mem_rdata(gc_rdata), .mem_rdone(gc_rdone),
    .status, .hstatus
  );

  xfer_counter #(.W(XC_W)) u_xc (
    .clk, .rst_n(reset_n), .wr(xc_wr), .wr_idx(xc_idx), .wr_data(xc_wdata),
    .inc(xc_inc), .value(xc_value), .zero(xc_zero)
  );

  hippi_if #(.DEPTH(HFIFO_DEPTH), .BURST_BYTES(BURST_BYTES), .XC_W(XC_W)) u_hippi (
    .clk, .rst_n(reset_n), .clear(ctrl.clear), .dir(ctrl.hippi_dir), .ifield,
    .h_din(hippi_din), .nrden, .dest_oe_n, .rdyin,
    .h_dout(hippi_dout), .h_doe(hippi_doe), .h_wr(hippi_wr),
    .dtreq, .sync, .bstav, .pktav, .shbst, .paro,
    .xc_value, .xc_inc,
    .mw_valid(h_mw_valid), .mw_data(h_mw_data), .mw_ready(h_mw_ready),
    .mr_valid(rd_valid && ctrl.rd_snk == PORT_HIPPI), .mr_data(rd_data), .mr_ready(h_mr_ready),
    .bist_start(bist_test), .bist_done(h_bdone), .bist_pass(h_bpass),
    .fifo_empty(h_empty), .fifo_full(h_full), .fifo_half(h_half)
  );

  scsi_if #(.DEPTH(SFIFO_DEPTH)) u_scsi (
    .clk, .rst_n(reset_n), .clear(ctrl.clear), .dir(ctrl.scsi_dir),
    .s_din(scsi_din), .s_dout(scsi_dout), .s_doe(scsi_doe),
    .dreq, .dackn_n, .rdn_n, .wrn_n,
    .mw_valid(s_mw_valid), .mw_data(s_mw_data), .mw_ready(s_mw_ready),
    .mr_valid(rd_valid && ctrl.rd_snk == PORT_SCSI), .mr_data(rd_data), .mr_ready(s_mr_ready),
    .bist_start(bist_test), .bist_done(s_bdone), .bist_pass(s_bpass),
    .fifo_empty(s_empty), .fifo_full(s_full)
  );

  // route the memory streams by mode
  always_comb begin
    unique case (ctrl.wr_src)
      PORT_HIPPI: begin wr_valid = h_mw_valid; wr_data = h_mw_data; end
      PORT_SCSI:  begin wr_valid = s_mw_valid; wr_data = s_mw_data; end
      default:    begin wr_valid = 1'b0;       wr_data = '0;        end
    endcase
    unique case (ctrl.rd_snk)
      PORT_HIPPI: rd_ready = h_mr_ready;
      PORT_SCSI:  rd_ready = s_mr_ready;
      default:    rd_ready = 1'b0;
    endcase
  end
  assign h_mw_ready = wr_ready && ctrl.wr_src == PORT_HIPPI;
  assign s_mw_ready = wr_ready && ctrl.wr_src == PORT_SCSI;

  mem_if #(.AW(MEM_AW)) u_mem (
    .clk, .rst_n(reset_n), .clear(ctrl.clear),
    .wr_en(ctrl.wr_src != PORT_NONE), .rd_en(ctrl.rd_snk != PORT_NONE), .gc_en(ctrl.gc_mem_en),
    .wr_valid, .wr_data, .wr_ready,
    .rd_valid, .rd_data, .rd_ready,
    .gc_wr(gc_mwr), .gc_rd(gc_mrd), .gc_addr, .gc_wdata, .gc_rdata, .gc_rdone,
    .ptr_load(addr_load && mode == MODE_RESET), .ptr_addr(gc_addr),
    .word_count, .mem_full, .mem_empty,
    .mem_addr, .mem_dout, .mem_doe, .mem_din, .mem_we_n(mem_write_n), .mem_oe_n
  );

  assign status  = {h_half, h_full, s_empty, s_full, mem_empty, mem_full, h_empty, xc_zero};
  assign hstatus = {dest_oe_n, nrden, dtreq, sync, rdyin, shbst, pktav, bstav};

  assign bist_hresult = h_bdone && h_bpass;
  assign bist_sresult = s_bdone && s_bpass;

endmodule
