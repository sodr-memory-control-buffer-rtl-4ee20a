// tb_gc_if: self-checking test of the Group Controller register port.
// Bus cycles are driven as a processor would (select, register, data, write
// or read strobe held low for several clocks). Checked: every write register
// lands in the right field, strobes and the mode write fire exactly once per
// bus write however long the strobe is held, writes without ASIC select are
// ignored, data to memory and data read back from memory are inverted, the
// transfer counter and status bytes read back through their registers, and
// the bus is driven only during a selected read.
module tb_gc_if;
  localparam int AW = 20, XC_W = 48;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] gc_din = '0, gc_dout;
  logic gc_doe;
  logic [4:0] reg_sel = '0;
  logic gc_rd_n = 1'b1, gc_wr_n = 1'b1, asic_sel_n = 1'b1;
  logic mode_wr; logic [2:0] mode_code; logic [7:0] ifield;
  logic xc_wr; logic [2:0] xc_idx; logic [7:0] xc_wdata;
  logic [XC_W-1:0] xc_value = '0;
  logic [AW-1:0] addr; logic addr_load, mem_rd, mem_wr;
  logic [31:0] mem_wdata, mem_rdata = '0;
  logic mem_rdone = 1'b0;
  logic [7:0] status = '0, hstatus = '0;
  int checks = 0, failures = 0;

  gc_if #(.AW(AW), .XC_W(XC_W), .GC_INVERT(1'b1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse counters
  int n_mode = 0, n_load = 0, n_rd = 0, n_wr = 0, n_xc = 0;
  logic [2:0] last_code; logic [2:0] last_xc_idx; logic [7:0] last_xc_data;
  always @(posedge clk) begin
    if (mode_wr)   begin n_mode++; last_code = mode_code; end
    if (addr_load) n_load++;
    if (mem_rd)    n_rd++;
    if (mem_wr)    n_wr++;
    if (xc_wr)     begin n_xc++; last_xc_idx = xc_idx; last_xc_data = xc_wdata; end
  end

  task automatic gc_write(input logic [4:0] r, input logic [7:0] d, input bit sel = 1'b1);
    @(negedge clk);
    asic_sel_n = !sel; reg_sel = r; gc_din = d;
    @(negedge clk);
    gc_wr_n = 1'b0;
    repeat ($urandom_range(1, 4)) @(negedge clk);
    gc_wr_n = 1'b1;
    @(negedge clk);
    asic_sel_n = 1'b1;
  endtask

  task automatic gc_read(input logic [4:0] r, output logic [7:0] d);
    @(negedge clk);
    asic_sel_n = 1'b0; reg_sel = r;
    check(!gc_doe, "bus not driven n_before read strobe");
    gc_rd_n = 1'b0;
    @(negedge clk);
    check(gc_doe, "bus driven during read");
    d = gc_dout;
    gc_rd_n = 1'b1;
    asic_sel_n = 1'b1;
  endtask

  initial begin
    logic [7:0] d;
    logic [31:0] w;
    logic [47:0] xv;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // mode register: one pulse per bus write
    for (int c = 0; c < 6; c++) begin
      int n_before;
      n_before = n_mode;
      gc_write(5'h0C, 8'(c));
      check(n_mode == n_before + 1 && last_code == 3'(c), "one mode write per bus write");
    end
    // I-field
    gc_write(5'h04, 8'hB6);
    check(ifield == 8'hB6, "I-field register");
    // address registers and load strobe
    gc_write(5'h0D, 8'h34); gc_write(5'h0E, 8'h12); gc_write(5'h0F, 8'h0A);
    check(addr == 20'hA1234, "20-bit address from three registers");
    gc_write(5'h18, 8'h00);
    check(n_load == 1, "address load strobe");
    // write ignored without ASIC select
    gc_write(5'h0D, 8'hFF, 1'b0);
    check(addr == 20'hA1234 && n_load == 1, "write ignored without select");
    // GC to memory data, inverted towards memory
    w = 32'h0403_0201;
    for (int b = 0; b < 4; b++) gc_write(5'(8'h14 + b), w[8*b +: 8]);
    check(mem_wdata == ~w, "GC-to-memory data stored inverted");
    gc_write(5'h1A, 8'h00);
    check(n_wr == 1, "memory write strobe");
    gc_write(5'h19, 8'h00);
    check(n_rd == 1, "memory read strobe");
    // memory to GC data, inverted back
    @(negedge clk);
    mem_rdata = 32'h8967_4523; mem_rdone = 1'b1;
    @(negedge clk);
    mem_rdone = 1'b0; mem_rdata = '0;
    for (int b = 0; b < 4; b++) begin
      gc_read(5'(8'h10 + b), d);
      check(d == ~(8'(32'h8967_4523 >> (8*b))), $sformatf("memory-to-GC byte %0d", b));
    end
    // transfer counter: writes go out as byte writes, reads come from xc_value
    for (int b = 0; b < 6; b++) begin
      gc_write(5'(8'h05 + b), 8'(8'hA0 + b));
      check(last_xc_idx == 3'(b) && last_xc_data == 8'(8'hA0 + b), $sformatf("counter byte %0d write", b));
    end
    check(n_xc == 6, "six counter byte writes");
    xv = 48'hFEDC_BA98_7654;
    xc_value = xv;
    for (int b = 0; b < 6; b++) begin
      gc_read(5'(8'h05 + b), d);
      check(d == xv[8*b +: 8], $sformatf("counter byte %0d read", b));
    end
    // status bytes
    status = 8'h5A; hstatus = 8'hC3;
    gc_read(5'h0B, d); check(d == 8'h5A, "system status read");
    gc_read(5'h01, d); check(d == 8'hC3, "HIPPI status read");
    gc_read(5'h1C, d); check(d == 8'h00, "unused register reads zero");
    gc_read(5'h04, d); check(d == 8'h00, "write-only register reads zero");
    // strobes counted once each overall
    check(n_load == 1 && n_rd == 1 && n_wr == 1, "no stray strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
