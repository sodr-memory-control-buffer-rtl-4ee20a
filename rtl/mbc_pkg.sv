// mbc_pkg: types and constants shared by the Memory Buffer Control (MBC) ASIC.
//
// The six operating modes and the Group Controller (GC) register map follow
// the ASIC data sheet. The numeric code written to the mode register for each
// mode (the mode number itself) and the per-interface direction encodings are
// this design's own choices.
package mbc_pkg;

  // Operating modes of the master controller; the value is the code the GC
  // writes into the System Mode register (0x0C).
  typedef enum logic [2:0] {
    MODE_RESET = 3'd0,
    MODE_H2S   = 3'd1,   // HIPPI to SCSI
    MODE_S2H   = 3'd2,   // SCSI to HIPPI
    MODE_GC2M  = 3'd3,   // GC to Memory (diagnostic)
    MODE_M2H   = 3'd4,   // Memory to HIPPI (I-field, then buffered data)
    MODE_M2S   = 3'd5    // Memory to SCSI
  } mode_e;

  // Direction of a byte/half-word port.
  typedef enum logic [1:0] {
    DIR_OFF = 2'd0,
    DIR_IN  = 2'd1,      // external chip -> buffer memory
    DIR_OUT = 2'd2       // buffer memory -> external chip
  } dir_e;

  // Which unit feeds the buffer memory, and which unit drains it.
  typedef enum logic [1:0] {
    PORT_NONE  = 2'd0,
    PORT_HIPPI = 2'd1,
    PORT_SCSI  = 2'd2
  } port_e;

  // Control word the master controller hands to the interfaces.
  typedef struct packed {
    logic  clear;        // Reset mode: FIFOs, pointers, handshakes held cleared
    dir_e  hippi_dir;
    dir_e  scsi_dir;
    port_e wr_src;       // producer of memory writes
    port_e rd_snk;       // consumer of memory reads
    logic  gc_mem_en;    // GC may read/write memory words
  } mbc_ctrl_t;

  // GC register map (Reg_sel[4:0]).
  localparam logic [4:0] REG_HSTATUS  = 5'h01;
  localparam logic [4:0] REG_HCONTROL = 5'h02;
  localparam logic [4:0] REG_HINTR    = 5'h03;
  localparam logic [4:0] REG_IFIELD   = 5'h04;
  localparam logic [4:0] REG_XC0      = 5'h05;   // transfer counter LSB .. 0x0A MSB
  localparam logic [4:0] REG_XC5      = 5'h0A;
  localparam logic [4:0] REG_STATUS   = 5'h0B;
  localparam logic [4:0] REG_MODE     = 5'h0C;
  localparam logic [4:0] REG_ADDR0    = 5'h0D;   // address LSB .. 0x0F MSB
  localparam logic [4:0] REG_ADDR2    = 5'h0F;
  localparam logic [4:0] REG_M2GC0    = 5'h10;   // memory-to-GC data LSB .. 0x13 MSB
  localparam logic [4:0] REG_M2GC3    = 5'h13;
  localparam logic [4:0] REG_GC2M0    = 5'h14;   // GC-to-memory data LSB .. 0x17 MSB
  localparam logic [4:0] REG_GC2M3    = 5'h17;
  localparam logic [4:0] REG_ALOAD    = 5'h18;   // strobe: load address
  localparam logic [4:0] REG_MREAD    = 5'h19;   // strobe: read memory word
  localparam logic [4:0] REG_MWRITE   = 5'h1A;   // strobe: write memory word

  // Odd parity bit for a HIPPI byte: total number of ones including the bit is odd.
  function automatic logic odd_parity(input logic [7:0] b);
    return ~(^b);
  endfunction

endpackage
