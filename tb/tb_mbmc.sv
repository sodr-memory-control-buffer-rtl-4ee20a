// tb_mbmc: self-checking test of the master controller. Each of the six mode
// codes is written and the resulting mode and control word are compared with
// a table written here from the mode descriptions (which port is input or
// output, who writes and who reads the buffer memory). Codes 6 and 7 must be
// ignored, and the control word must follow one clock after the mode.
module tb_mbmc;
  import mbc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, mode_wr = 1'b0;
  logic [2:0] mode_code = '0;
  mode_e mode;
  mbc_ctrl_t ctrl;
  int checks = 0, failures = 0;

  mbmc dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mbc_ctrl_t expected(input int m);
    mbc_ctrl_t e;
    e = '{clear: 1'b0, hippi_dir: DIR_OFF, scsi_dir: DIR_OFF, wr_src: PORT_NONE,
          rd_snk: PORT_NONE, gc_mem_en: 1'b0};
    case (m)
      0: e.clear = 1'b1;
      1: begin e.hippi_dir = DIR_IN;  e.scsi_dir = DIR_OUT; e.wr_src = PORT_HIPPI; e.rd_snk = PORT_SCSI;  end
      2: begin e.hippi_dir = DIR_OUT; e.scsi_dir = DIR_IN;  e.wr_src = PORT_SCSI;  e.rd_snk = PORT_HIPPI; end
      3: e.gc_mem_en = 1'b1;
      4: begin e.hippi_dir = DIR_OUT; e.rd_snk = PORT_HIPPI; end
      5: begin e.scsi_dir = DIR_OUT;  e.rd_snk = PORT_SCSI;  end
      default: ;
    endcase
    return e;
  endfunction

  task automatic write_mode(input int code);
    @(negedge clk);
    mode_wr = 1'b1; mode_code = 3'(code);
    @(negedge clk);
    mode_wr = 1'b0;
  endtask

  initial begin
    int cur;
    repeat (2) @(posedge clk);
    check(mode == MODE_RESET && ctrl == expected(0), "reset state");
    rst_n = 1'b1;
    cur = 0;
    for (int t = 0; t < 60; t++) begin
      int code;
      code = (t < 8) ? t : $urandom_range(0, 7);
      write_mode(code);
      if (code <= 5) cur = code;
      check(int'(mode) == cur, $sformatf("mode after code %0d", code));
      @(negedge clk);
      check(ctrl == expected(cur), $sformatf("control word for mode %0d", cur));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
