// gc_if: Group Controller register port of the MBC.
//
// A generic memory-mapped port for a processor that was not yet chosen: an
// 8-bit data bus, a 5-bit register select, active-low read, write and ASIC
// select. The register map is the document's:
//   0x01 HIPPI status (read)          0x0B system status (read)
//   0x02 HIPPI control (write)        0x0C system mode (write)
//   0x03 HIPPI interrupt (read)       0x0D-0x0F memory address, LSB first
//   0x04 I-field (write)              0x10-0x13 memory-to-GC data, LSB first
//   0x05-0x0A transfer counter, LSB first (read/write)
//   0x14-0x17 GC-to-memory data, LSB first
//   0x18 load address, 0x19 read memory word, 0x1A write memory word (strobes)
// A write acts once, in the clock where ASIC_SEL_ and GC_WR_ are first both
// seen low; writing a strobe register acts regardless of the data. A read
// drives the bus combinationally while ASIC_SEL_ and GC_RD_ are low; write-only
// and unused registers, and the HIPPI control and interrupt registers whose
// bits the document does not give, read as zero and ignore writes. The HIPPI
// status byte and the system status byte are assembled by the caller.
// Data moving between this port and memory is inverted (GC_INVERT = 1), as the
// document reports for the fabricated chip: what the GC writes is stored
// inverted, what it reads is the stored value inverted, so a GC write and read
// back agree while HIPPI or SCSI see the inverse. The single clock and the
// write-edge detection are this design's choices.
module gc_if
  import mbc_pkg::*;
#(
  parameter int unsigned AW        = 20,
  parameter int unsigned XC_W      = 48,
  parameter bit          GC_INVERT = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  // pins
  input  logic [7:0]      gc_din,
  output logic [7:0]      gc_dout,
  output logic            gc_doe,
  input  logic [4:0]      reg_sel,
  input  logic            gc_rd_n,
  input  logic            gc_wr_n,
  input  logic            asic_sel_n,
  // to the master controller
  output logic            mode_wr,
  output logic [2:0]      mode_code,
  // to the HIPPI interface
  output logic [7:0]      ifield,
  // transfer counter
  output logic            xc_wr,
  output logic [2:0]      xc_idx,
  output logic [7:0]      xc_wdata,
  input  logic [XC_W-1:0] xc_value,
  // memory interface
  output logic [AW-1:0]   addr,
  output logic            addr_load,
  output logic            mem_rd,
  output logic            mem_wr,
  output logic [31:0]     mem_wdata,
  input  logic [31:0]     mem_rdata,
  input  logic            mem_rdone,
  // status
  input  logic [7:0]      status,
  input  logic [7:0]      hstatus
);

  logic        wr_act, wr_act_q, wr_pulse;
  logic [23:0] addr_q;
  logic [31:0] gc2m, m2gc;

  assign wr_act   = !asic_sel_n && !gc_wr_n;
  assign wr_pulse = wr_act && !wr_act_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_act_q <= 1'b0;
      ifield   <= '0;
      addr_q   <= '0;
      gc2m     <= '0;
      m2gc     <= '0;
    end else begin
      wr_act_q <= wr_act;
      if (wr_pulse) begin
        unique case (reg_sel)
          REG_IFIELD:                ifield        <= gc_din;
          REG_ADDR0, 5'h0E, REG_ADDR2: addr_q[32'(reg_sel - REG_ADDR0)*8 +: 8] <= gc_din;
          REG_GC2M0, 5'h15, 5'h16, REG_GC2M3: gc2m[32'(reg_sel - REG_GC2M0)*8 +: 8] <= gc_din;
          default: ;
        endcase
      end
      if (mem_rdone) m2gc <= GC_INVERT ? ~mem_rdata : mem_rdata;
    end
  end

  assign mode_wr   = wr_pulse && (reg_sel == REG_MODE);
  assign mode_code = gc_din[2:0];
  assign xc_wr     = wr_pulse && (reg_sel >= REG_XC0) && (reg_sel <= REG_XC5);
  assign xc_idx    = 3'(reg_sel - REG_XC0);
  assign xc_wdata  = gc_din;
  assign addr      = addr_q[AW-1:0];
  assign addr_load = wr_pulse && (reg_sel == REG_ALOAD);
  assign mem_rd    = wr_pulse && (reg_sel == REG_MREAD);
  assign mem_wr    = wr_pulse && (reg_sel == REG_MWRITE);
  assign mem_wdata = GC_INVERT ? ~gc2m : gc2m;

  // read multiplexer
  logic [8*((XC_W+7)/8)-1:0] xc_wide;
  assign xc_wide = (8*((XC_W+7)/8))'(xc_value);

  always_comb begin
    gc_dout = '0;
    unique case (reg_sel)
      REG_HSTATUS: gc_dout = hstatus;
      REG_STATUS:  gc_dout = status;
      REG_XC0, 5'h06, 5'h07, 5'h08, 5'h09, REG_XC5: begin
        if (32'(reg_sel - REG_XC0) < (XC_W+7)/8) gc_dout = xc_wide[32'(reg_sel - REG_XC0)*8 +: 8];
      end
      REG_M2GC0, 5'h11, 5'h12, REG_M2GC3: gc_dout = m2gc[32'(reg_sel - REG_M2GC0)*8 +: 8];
      default: gc_dout = '0;
    endcase
  end
  assign gc_doe = !asic_sel_n && !gc_rd_n;

endmodule
