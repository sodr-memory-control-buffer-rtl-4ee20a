// tb_mbc_asic: end-to-end test of the MBC ASIC at its full default size
// (1M x 32 buffer, 512 x 8 HIPPI FIFO, 256 x 16 SCSI FIFO, 256-byte bursts,
// 48-bit transfer counter), driven only through its pins.
// Around the ASIC sit models of the 1M x 32 static RAM, the HIPPI destination
// chip (offers bytes), the HIPPI source chip (requests bursts), the external
// synchronisation flip-flop (sync = registered burst-ready of the one byte
// lane present), the SCSI processor's DMA port and the Group Controller.
// Each scenario follows the mode sequences of the operating guide:
//   1 GC to memory and back, 2 GC to SCSI with the SCSI FIFO filled,
//   3 SCSI to GC, 4 HIPPI to SCSI (one 256-byte burst), 5 SCSI to HIPPI
//   (600 bytes: I-field, two full bursts and a short one), 6 GC to HIPPI,
//   7 HIPPI to GC, 8 memory full: the whole 4 MByte buffer is filled from
//   HIPPI while the SCSI side is blocked, 9 FIFO self test.
// The SCSI to HIPPI run also checks the rate: every burst must leave at one
// byte per clock, so the runs of write strobes are 256, 256 and 88 long.
// The RAM model's set-up and recovery checks must count no breach.
// Expected values are computed here: the byte patterns, the packing order
// (first byte least significant), and the inversion of data on the GC path.
// Each mechanism (all six modes, destination stall, memory full, SCSI FIFO
// full, short burst, sync wait, I-field, counter reaching zero, self test) is
// counted and must occur at least once.
module tb_mbc_asic;
  logic clk = 1'b0, reset_n = 1'b0;
  logic bist_test = 1'b0, bist_hresult, bist_sresult;
  logic asic_sel_n = 1'b1, gc_rd_n = 1'b1, gc_wr_n = 1'b1;
  logic [4:0] reg_sel = '0;
  logic [7:0] gc_bus_in = '0, gc_bus_out;
  logic gc_bus_oe;
  logic [7:0] hippi_din = '0, hippi_dout;
  logic hippi_doe, hippi_wr, nrden = 1'b1, dest_oe_n, rdyin, dtreq = 1'b0, sync = 1'b0;
  logic bstav, pktav, shbst, paro;
  logic [19:0] mem_addr;
  logic [31:0] mem_din, mem_dout;
  logic mem_doe, mem_write_n, mem_oe_n;
  logic [15:0] scsi_din = '0, scsi_dout;
  logic scsi_doe, dreq = 1'b0, dackn_n, rdn_n, wrn_n;
  int checks = 0, failures = 0;

  mbc_asic dut (.*);
  sram_model #(.AW(20)) ram (.clk, .addr(mem_addr), .din(mem_dout), .dout(mem_din),
                             .we_n(mem_write_n), .oe_n(mem_oe_n));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int mode_seen[6];
  int n_dest_stall = 0, n_mem_full = 0, n_sfifo_full = 0, n_short = 0, n_sync_wait = 0;
  int n_ifield = 0, n_xc_zero = 0, n_bist = 0;
  always @(posedge clk) if (reset_n) begin
    mode_seen[int'(dut.mode)]++;
    if (dut.mode == mbc_pkg::MODE_H2S && dest_oe_n && dut.u_hippi.fifo_full) n_dest_stall++;
    if (bstav && shbst) n_short++;
    if (bstav && !sync) n_sync_wait++;
  end

  // ---------------- HIPPI destination chip: offers bytes ----------------
  int h_n = 0, h_i = 0;
  function automatic logic [7:0] hbyte(input int i);
    return 8'(i + 1) ^ 8'(i >> 8);
  endfunction
  always @(posedge clk) if (!dest_oe_n && !nrden) h_i <= h_i + 1;
  always @(negedge clk) begin
    nrden     = !(h_i < h_n) || ($urandom_range(0, 7) == 0);
    hippi_din = hbyte(h_i);
  end

  // ---------------- HIPPI source chip and sync flip-flop ----------------
  logic [7:0] h_got[$];
  int h_run = 0, h_bursts[$];   // lengths of runs of bytes on consecutive clocks
  always @(posedge clk) begin
    sync <= bstav;
    if (hippi_wr) h_run <= h_run + 1;
    else if (h_run > 0) begin h_bursts.push_back(h_run); h_run <= 0; end
    if (hippi_wr) begin
      h_got.push_back(hippi_dout);
      checks++;
      if (paro != ~^hippi_dout) begin failures++; $display("FAIL HIPPI parity"); end
    end
  end

  // ---------------- SCSI processor DMA port ----------------
  logic [15:0] s_got[$];
  int s_n = 0, s_i = 0;
  logic fas_en = 1'b0;
  function automatic logic [15:0] sword(input int i);
    return {8'(2 * i + 2), 8'(2 * i + 1)};
  endfunction
  always @(posedge clk) begin
    if (!dackn_n && !wrn_n) s_got.push_back(scsi_dout);
    if (!dackn_n && !rdn_n) s_i <= s_i + 1;
  end
  always @(negedge clk) begin
    scsi_din = sword(s_i);
    dreq     = fas_en && (dut.u_mbmc.ctrl.scsi_dir == mbc_pkg::DIR_IN ? (s_i < s_n) : 1'b1);
  end

  // ---------------- Group Controller bus ----------------
  task automatic gc_write(input logic [4:0] r, input logic [7:0] d);
    @(negedge clk);
    asic_sel_n = 1'b0; reg_sel = r; gc_bus_in = d;
    @(negedge clk); gc_wr_n = 1'b0;
    @(negedge clk); gc_wr_n = 1'b1;
    @(negedge clk); asic_sel_n = 1'b1;
  endtask
  task automatic gc_read(input logic [4:0] r, output logic [7:0] d);
    @(negedge clk);
    asic_sel_n = 1'b0; reg_sel = r; gc_rd_n = 1'b0;
    @(negedge clk);
    d = gc_bus_out;
    check(gc_bus_oe, "GC bus driven on read");
    gc_rd_n = 1'b1; asic_sel_n = 1'b1;
  endtask
  task automatic set_mode(input int m);
    gc_write(5'h0C, 8'(m));
    repeat (2) @(negedge clk);
  endtask
  task automatic set_addr(input logic [19:0] a);
    gc_write(5'h0D, a[7:0]); gc_write(5'h0E, a[15:8]); gc_write(5'h0F, {4'h0, a[19:16]});
    gc_write(5'h18, 8'h00);
  endtask
  task automatic set_xc(input logic [47:0] v);
    for (int b = 0; b < 6; b++) gc_write(5'(5 + b), v[8*b +: 8]);
  endtask
  task automatic gc_mem_write(input logic [19:0] a, input logic [31:0] w);
    set_addr(a);
    for (int b = 0; b < 4; b++) gc_write(5'(8'h14 + b), w[8*b +: 8]);
    gc_write(5'h1A, 8'h00);
  endtask
  task automatic gc_mem_read(input logic [19:0] a, output logic [31:0] w);
    logic [7:0] d;
    set_addr(a);
    gc_write(5'h19, 8'h00);
    repeat (4) @(negedge clk);
    for (int b = 0; b < 4; b++) begin gc_read(5'(8'h10 + b), d); w[8*b +: 8] = d; end
  endtask
  task automatic status(output logic [7:0] s);
    gc_read(5'h0B, s);
  endtask

  localparam logic [31:0] PAT[5] = '{32'h3322_1100, 32'hFFFF_FFFF, 32'h0000_0000, 32'hAAAA_AAAA, 32'h5555_5555};

  initial begin
    logic [7:0] st;
    logic [31:0] w;
    int n, t0;
    repeat (3) @(posedge clk);
    reset_n = 1'b1;
    repeat (2) @(negedge clk);
    ram.timing_errors = 0;   // forget whatever the pins did before reset
    repeat (2) @(negedge clk);

    // ---------- 0: status after hardware reset ----------
    status(st);
    check(st[0] && st[1] && !st[2] && st[3] && st[5], $sformatf("status after reset %h", st));

    // ---------- 1: GC to memory and back ----------
    set_mode(0); set_mode(0); set_mode(0);
    set_mode(3);
    for (int p = 0; p < 5; p++) begin
      for (int a = 0; a < 4; a++) gc_mem_write(20'(a * 4099), PAT[p] ^ 32'(a));
      for (int a = 0; a < 4; a++) begin
        gc_mem_read(20'(a * 4099), w);
        check(w == (PAT[p] ^ 32'(a)), $sformatf("GC read-back %h", w));
        check(ram.mem[a * 4099] == ~(PAT[p] ^ 32'(a)), "memory holds the inverted GC data");
      end
    end

    // ---------- 2: GC to SCSI, then fill the SCSI FIFO ----------
    set_mode(0);
    set_mode(3);
    for (int a = 0; a < 5; a++) gc_mem_write(20'(a), 32'h0403_0201 + 32'(a));
    s_got.delete();
    fas_en = 1'b1;
    set_mode(5);
    repeat (60) @(negedge clk);
    check(s_got.size() == 10, $sformatf("GC to SCSI: 10 half-words, got %0d", s_got.size()));
    for (int k = 0; k < s_got.size() && k < 10; k++) begin
      w = ~(32'h0403_0201 + 32'(k / 2));
      check(s_got[k] == (k[0] ? w[31:16] : w[15:0]), "GC to SCSI data (inverted)");
    end
    fas_en = 1'b0;
    set_mode(0);
    set_mode(3);
    for (int a = 0; a < 200; a++) gc_mem_write(20'(a), 32'(a * 3));
    s_got.delete();
    set_mode(5);
    repeat (800) @(negedge clk);
    status(st);
    check(st[4], "SCSI FIFO full flag while the processor is blocked");
    if (st[4]) n_sfifo_full++;
    fas_en = 1'b1;
    repeat (1000) @(negedge clk);
    check(s_got.size() == 400, $sformatf("all 400 half-words after unblocking, got %0d", s_got.size()));
    for (int k = 0; k < s_got.size(); k++) begin
      w = ~(32'((k / 2) * 3));
      if (s_got[k] != (k[0] ? w[31:16] : w[15:0])) begin check(1'b0, "SCSI drain data"); break; end
    end
    status(st);
    check(st[3] && st[5], "memory and SCSI FIFO empty after the drain");
    fas_en = 1'b0;

    // ---------- 3: SCSI to GC ----------
    set_mode(0);
    set_addr(20'h00100);
    set_mode(3);
    set_mode(2);          // SCSI data goes to memory
    s_i = 0; s_n = 8;
    fas_en = 1'b1;
    repeat (60) @(negedge clk);
    fas_en = 1'b0;
    set_mode(3);
    for (int a = 0; a < 4; a++) begin
      gc_mem_read(20'h00100 + 20'(a), w);
      check(w == ~{sword(2 * a + 1), sword(2 * a)}, $sformatf("SCSI to GC word %0d (inverted)", a));
    end

    // ---------- 4: HIPPI to SCSI, one 256-byte burst ----------
    set_mode(0);
    set_addr(20'h00000);
    set_xc(48'h0);
    s_got.delete();
    fas_en = 1'b1;
    h_i = 0; h_n = 256;
    set_mode(1);
    repeat (1500) @(negedge clk);
    check(s_got.size() == 128, $sformatf("HIPPI to SCSI: 128 half-words, got %0d", s_got.size()));
    for (int k = 0; k < s_got.size(); k++)
      if (s_got[k] != {hbyte(2 * k + 1), hbyte(2 * k)}) begin check(1'b0, "HIPPI to SCSI data"); break; end
    check(dut.xc_value == 48'd256, "transfer counter counted 256 bytes");
    fas_en = 1'b0;

    // ---------- 5: SCSI to HIPPI, 600 bytes ----------
    set_mode(0);
    set_addr(20'h00040);
    set_xc(48'h0 - 48'd600);
    gc_write(5'h04, 8'h49);
    set_mode(4);
    check(hippi_doe && hippi_dout == 8'h49 && pktav && !hippi_wr, "I-field presented in Memory to HIPPI mode");
    if (hippi_doe && hippi_dout == 8'h49) n_ifield++;
    h_got.delete();
    h_bursts.delete();
    dtreq = 1'b1;
    set_mode(2);
    s_i = 0; s_n = 300;
    fas_en = 1'b1;
    repeat (3000) @(negedge clk);
    check(h_got.size() == 600, $sformatf("SCSI to HIPPI: 600 bytes, got %0d", h_got.size()));
    // one byte per clock inside a burst: 256, 256, then the short 88
    check(h_bursts.size() == 3 && h_bursts[0] == 256 && h_bursts[1] == 256 && h_bursts[2] == 88,
          $sformatf("burst lengths on consecutive clocks: %p", h_bursts));
    for (int k = 0; k < h_got.size(); k++) begin
      logic [15:0] hw;
      hw = sword(k / 2);
      if (h_got[k] != (k[0] ? hw[15:8] : hw[7:0])) begin check(1'b0, "SCSI to HIPPI data"); break; end
    end
    status(st);
    check(st[0] && !pktav, "counter zero ends the packet");
    if (st[0]) n_xc_zero++;
    fas_en = 1'b0;

    // ---------- 6: GC to HIPPI ----------
    set_mode(0);
    set_mode(3);
    for (int a = 0; a < 8; a++) gc_mem_write(20'(a), 32'hFF00_AA55 ^ 32'(a << 8));
    set_xc(48'h0 - 48'd32);
    gc_write(5'h04, 8'hB6);
    h_got.delete();
    set_mode(4);
    repeat (200) @(negedge clk);
    check(h_got.size() == 32, $sformatf("GC to HIPPI: 32 bytes, got %0d", h_got.size()));
    for (int k = 0; k < h_got.size(); k++) begin
      w = ~(32'hFF00_AA55 ^ 32'((k / 4) << 8));
      if (h_got[k] != w[8 * (k % 4) +: 8]) begin check(1'b0, "GC to HIPPI data (inverted)"); break; end
    end
    check(hippi_dout == 8'hB6 && !hippi_wr, "bus returns to the I-field after the packet");
    dtreq = 1'b0;

    // ---------- 7: HIPPI to GC ----------
    set_mode(0);
    set_addr(20'h00200);
    h_i = 0; h_n = 64;
    set_mode(1);
    repeat (300) @(negedge clk);
    set_mode(3);
    for (int a = 0; a < 16; a++) begin
      gc_mem_read(20'h00200 + 20'(a), w);
      check(w == ~{hbyte(4 * a + 3), hbyte(4 * a + 2), hbyte(4 * a + 1), hbyte(4 * a)},
            $sformatf("HIPPI to GC word %0d (inverted)", a));
    end

    // ---------- 8: fill the whole buffer from HIPPI ----------
    set_mode(0);
    set_addr(20'h00000);
    h_i = 0; h_n = 5_000_000;
    s_got.delete();
    set_mode(1);
    t0 = 0;
    while (!dut.mem_full && t0 < 6_000_000) begin @(negedge clk); t0++; end
    repeat (3000) @(negedge clk);
    status(st);
    check(st[2] && !st[3], "memory full status");
    if (st[2]) n_mem_full++;
    check(st[6] && dest_oe_n && !rdyin, "HIPPI destination stalled by a full buffer");
    n = h_i;
    repeat (100) @(negedge clk);
    check(h_i == n, "no byte taken while the buffer is full");
    check(n == 4 * ((1 << 20) + 128 + 2) + 512 || n > 4 * (1 << 20),
          $sformatf("bytes taken before the stall: %0d", n));
    // stop the HIPPI source, unblock the SCSI side briefly and check the first data out
    h_n = h_i;
    fas_en = 1'b1;
    repeat (4000) @(negedge clk);
    fas_en = 1'b0;
    check(s_got.size() > 1000, "SCSI drains the full buffer");
    for (int k = 0; k < s_got.size(); k++)
      if (s_got[k] != {hbyte(2 * k + 1), hbyte(2 * k)}) begin check(1'b0, "data after memory full"); break; end
    status(st);
    check(!st[2], "memory no longer full after draining");
    h_n = 0;

    // ---------- 9: FIFO self test ----------
    set_mode(0);
    bist_test = 1'b1;
    n = 0;
    while (!(bist_hresult && bist_sresult) && n < 5000) begin @(negedge clk); n++; end
    check(bist_hresult && bist_sresult, "both FIFOs pass the self test");
    if (bist_hresult && bist_sresult) n_bist++;
    bist_test = 1'b0;
    repeat (4) @(negedge clk);

    // ---------- mechanisms ----------
    for (int m = 0; m < 6; m++) check(mode_seen[m] > 0, $sformatf("mode %0d used", m));
    check(n_dest_stall > 0, "destination stall");
    check(n_mem_full > 0, "memory full");
    check(n_sfifo_full > 0, "SCSI FIFO full");
    check(n_short > 0, "short burst");
    check(n_sync_wait > 0, "sync wait");
    check(n_ifield > 0, "I-field");
    check(n_xc_zero > 0, "transfer counter reached zero");
    check(n_bist > 0, "self test");
    $display("mechanisms: dest_stall=%0d mem_full=%0d sfifo_full=%0d short=%0d sync_wait=%0d ifield=%0d xc_zero=%0d bist=%0d",
             n_dest_stall, n_mem_full, n_sfifo_full, n_short, n_sync_wait, n_ifield, n_xc_zero, n_bist);
    check(ram.timing_errors == 0 && ram.conflicts == 0, $sformatf("RAM set-up/recovery breaches: %0d", ram.timing_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
