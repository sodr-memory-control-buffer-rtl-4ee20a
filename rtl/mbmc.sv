// mbmc: Memory Buffer Master Controller.
//
// The central state machine of the MBC. Its state is the operating mode:
// Reset, HIPPI to SCSI, SCSI to HIPPI, GC to Memory, Memory to HIPPI and
// Memory to SCSI (the six modes of the document). A hardware reset, or the
// Group Controller writing code 0 to the mode register, enters Reset; any other
// valid code moves straight to that mode, and codes 6 and 7 are ignored. From
// the state it derives, one clock later, the control word every interface
// uses: each port's direction, which port feeds the buffer memory and which
// drains it, whether the GC may access memory, and the clear that holds FIFOs,
// pointers and handshakes idle in Reset. The mode list is the document's; the
// codes and the exact control word are this design's.
module mbmc
  import mbc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mode_wr,
  input  logic [2:0] mode_code,
  output mode_e      mode,
  output mbc_ctrl_t  ctrl
);

  mode_e     next_mode;
  mbc_ctrl_t c;

  always_comb begin
    next_mode = mode;
    if (mode_wr && mode_code <= 3'd5) next_mode = mode_e'(mode_code);
  end

  always_comb begin
    c = '{clear: 1'b0, hippi_dir: DIR_OFF, scsi_dir: DIR_OFF,
          wr_src: PORT_NONE, rd_snk: PORT_NONE, gc_mem_en: 1'b0};
    unique case (mode)
      MODE_RESET: c.clear = 1'b1;
      MODE_H2S: begin
        c.hippi_dir = DIR_IN;  c.scsi_dir = DIR_OUT;
        c.wr_src = PORT_HIPPI; c.rd_snk = PORT_SCSI;
      end
      MODE_S2H: begin
        c.hippi_dir = DIR_OUT; c.scsi_dir = DIR_IN;
        c.wr_src = PORT_SCSI;  c.rd_snk = PORT_HIPPI;
      end
      MODE_GC2M: c.gc_mem_en = 1'b1;
      MODE_M2H: begin
        c.hippi_dir = DIR_OUT; c.rd_snk = PORT_HIPPI;
      end
      MODE_M2S: begin
        c.scsi_dir = DIR_OUT;  c.rd_snk = PORT_SCSI;
      end
      default: c.clear = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= MODE_RESET;
      ctrl <= '{clear: 1'b1, hippi_dir: DIR_OFF, scsi_dir: DIR_OFF,
                wr_src: PORT_NONE, rd_snk: PORT_NONE, gc_mem_en: 1'b0};
    end else begin
      mode <= next_mode;
      ctrl <= c;
    end
  end

endmodule
