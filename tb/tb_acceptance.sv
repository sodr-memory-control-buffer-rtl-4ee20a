// tb_acceptance: the production data-path tests of the MBC, with their
// published data patterns, run on the chip at full default size.
//
// Each test moves a short list of 32-bit patterns along one data path and
// checks them where they arrive. Memory contents are checked directly in the
// 1M x 32 SRAM model, as a tester probing the memory pins would.
//   GC to Memory     55555555 AAAAAAAA 00000000 11111111
//                    GC writes; the RAM must hold each word inverted (GC
//                    path inversion), and a GC read must return the original.
//   Memory to GC     99887766 00000000 FFFFFFFF AAAAAAAA 55555555
//                    put straight into the RAM; GC reads return them inverted.
//   Memory to SCSI   33221100 FFFFFFFF 00000000 AAAAAAAA 55555555
//                    written by the GC in GC to Memory mode, then sent in
//                    Memory to SCSI mode: low half-word first, inverted.
//   SCSI to Memory   33221100 00000000 55555555 AAAAAAAA
//                    sent as half-words in SCSI to HIPPI mode; the RAM must
//                    hold them unchanged.
//   HIPPI to Memory  bytes FF 00 AA 55, four of each, in HIPPI to SCSI mode;
//                    the RAM must hold FFFFFFFF 00000000 AAAAAAAA 55555555.
//   Memory to HIPPI  FFFFFFFF 00000000 AAAAAAAA 55555555 FF00AA55 in the RAM
//                    (the GC writes their inverse, so the RAM holds them),
//                    sent in Memory to HIPPI mode as one short 20-byte burst,
//                    least significant byte first, with odd parity.
//   Self test        BIST_Test raises both result pins.
// The RAM model's set-up and recovery checks must count no breach.
// The memory, the SCSI processor's DMA side, the HIPPI destination and source
// chips and the lane sync flip-flop are modelled here.
module tb_acceptance;
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
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- HIPPI destination chip: offers the bytes in h_src ----------------
  logic [7:0] h_src[$];
  int h_i = 0;
  always @(posedge clk) if (reset_n && !dest_oe_n && !nrden) h_i <= h_i + 1;
  always @(negedge clk) begin
    nrden     = !(h_i < h_src.size());
    hippi_din = (h_i < h_src.size()) ? h_src[h_i] : 8'h00;
  end

  // ---------------- HIPPI source chip and sync flip-flop ----------------
  logic [7:0] h_got[$];
  always @(posedge clk) begin
    sync <= bstav;
    if (reset_n && hippi_wr) begin
      h_got.push_back(hippi_dout);
      check(paro == ~^hippi_dout, "HIPPI odd parity");
    end
  end

  // ---------------- SCSI processor DMA port ----------------
  logic [15:0] s_src[$], s_got[$];
  int s_i = 0;
  bit fas_en = 1'b0;
  always @(posedge clk) if (reset_n) begin
    if (!dackn_n && !wrn_n) s_got.push_back(scsi_dout);
    if (!dackn_n && !rdn_n) s_i <= s_i + 1;
  end
  always @(negedge clk) begin
    scsi_din = (s_i < s_src.size()) ? s_src[s_i] : 16'h0000;
    dreq     = fas_en && (dut.u_mbmc.ctrl.scsi_dir == mbc_pkg::DIR_IN ? (s_i < s_src.size()) : 1'b1);
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
  task automatic gc_mem_write(input logic [19:0] a, input logic [31:0] w);
    set_addr(a);
    for (int b = 0; b < 4; b++) gc_write(5'(8'h14 + b), w[8*b +: 8]);
    gc_write(5'h1A, 8'h00);
    repeat (4) @(negedge clk);   // let the two-clock RAM write finish
  endtask
  task automatic gc_mem_read(input logic [19:0] a, output logic [31:0] w);
    logic [7:0] d;
    set_addr(a);
    gc_write(5'h19, 8'h00);
    repeat (4) @(negedge clk);
    for (int b = 0; b < 4; b++) begin gc_read(5'(8'h10 + b), d); w[8*b +: 8] = d; end
  endtask

  localparam logic [31:0] P_GC2M[4] = '{32'h5555_5555, 32'hAAAA_AAAA, 32'h0000_0000, 32'h1111_1111};
  localparam logic [31:0] P_M2GC[5] = '{32'h9988_7766, 32'h0000_0000, 32'hFFFF_FFFF, 32'hAAAA_AAAA, 32'h5555_5555};
  localparam logic [31:0] P_M2S[5]  = '{32'h3322_1100, 32'hFFFF_FFFF, 32'h0000_0000, 32'hAAAA_AAAA, 32'h5555_5555};
  localparam logic [31:0] P_S2M[4]  = '{32'h3322_1100, 32'h0000_0000, 32'h5555_5555, 32'hAAAA_AAAA};
  localparam logic [7:0]  P_H2M[4]  = '{8'hFF, 8'h00, 8'hAA, 8'h55};
  localparam logic [31:0] P_M2H[5]  = '{32'hFFFF_FFFF, 32'h0000_0000, 32'hAAAA_AAAA, 32'h5555_5555, 32'hFF00_AA55};

  initial begin
    logic [31:0] w;
    logic [47:0] xc;
    repeat (3) @(posedge clk);
    reset_n = 1'b1;
    repeat (2) @(negedge clk);
    ram.timing_errors = 0;   // forget whatever the pins did before reset
    repeat (2) @(negedge clk);

    // ---------- GC to Memory ----------
    set_mode(0);
    set_mode(3);
    foreach (P_GC2M[i]) begin
      gc_mem_write(20'(i), P_GC2M[i]);
      check(ram.mem[i] == ~P_GC2M[i], $sformatf("GC to Memory: RAM[%0d] = %h", i, ram.mem[i]));
      gc_mem_read(20'(i), w);
      check(w == P_GC2M[i], $sformatf("GC to Memory: read back %h", w));
    end

    // ---------- Memory to GC ----------
    foreach (P_M2GC[i]) ram.mem[20'h100 + i] = P_M2GC[i];
    foreach (P_M2GC[i]) begin
      gc_mem_read(20'h100 + 20'(i), w);
      check(w == ~P_M2GC[i], $sformatf("Memory to GC: %h read as %h", P_M2GC[i], w));
    end

    // ---------- Memory to SCSI ----------
    set_mode(0);
    set_mode(3);
    foreach (P_M2S[i]) gc_mem_write(20'(i), P_M2S[i]);
    s_got.delete();
    fas_en = 1'b1;
    set_mode(5);
    repeat (60) @(negedge clk);
    fas_en = 1'b0;
    check(s_got.size() == 10, $sformatf("Memory to SCSI: 10 half-words, got %0d", s_got.size()));
    for (int k = 0; k < s_got.size() && k < 10; k++) begin
      w = ~P_M2S[k / 2];
      check(s_got[k] == (k[0] ? w[31:16] : w[15:0]), $sformatf("Memory to SCSI half-word %0d = %h", k, s_got[k]));
    end

    // ---------- SCSI to Memory ----------
    set_mode(0);
    set_addr(20'h00200);
    s_src.delete();
    foreach (P_S2M[i]) begin s_src.push_back(P_S2M[i][15:0]); s_src.push_back(P_S2M[i][31:16]); end
    s_i = 0;
    set_mode(2);
    fas_en = 1'b1;
    repeat (60) @(negedge clk);
    fas_en = 1'b0;
    check(s_i == 8, $sformatf("SCSI to Memory: 8 half-words taken, got %0d", s_i));
    foreach (P_S2M[i])
      check(ram.mem[20'h200 + i] == P_S2M[i], $sformatf("SCSI to Memory: RAM = %h, expected %h", ram.mem[20'h200 + i], P_S2M[i]));

    // ---------- HIPPI to Memory ----------
    set_mode(0);
    set_addr(20'h00300);
    h_src.delete();
    foreach (P_H2M[i]) repeat (4) h_src.push_back(P_H2M[i]);
    h_i = 0;
    set_mode(1);
    repeat (40) @(negedge clk);
    check(h_i == 16, $sformatf("HIPPI to Memory: 16 bytes taken, got %0d", h_i));
    foreach (P_H2M[i])
      check(ram.mem[20'h300 + i] == {4{P_H2M[i]}}, $sformatf("HIPPI to Memory: RAM = %h", ram.mem[20'h300 + i]));

    // ---------- Memory to HIPPI ----------
    set_mode(0);
    set_mode(3);
    foreach (P_M2H[i]) gc_mem_write(20'(i), ~P_M2H[i]);
    foreach (P_M2H[i]) check(ram.mem[i] == P_M2H[i], "Memory to HIPPI: RAM loaded");
    xc = 48'h0 - 48'd20;
    for (int b = 0; b < 6; b++) gc_write(5'(5 + b), xc[8*b +: 8]);
    gc_write(5'h04, 8'h5A);
    h_got.delete();
    dtreq = 1'b1;
    set_mode(4);
    repeat (100) @(negedge clk);
    dtreq = 1'b0;
    check(h_got.size() == 20, $sformatf("Memory to HIPPI: 20 bytes, got %0d", h_got.size()));
    for (int k = 0; k < h_got.size() && k < 20; k++)
      check(h_got[k] == P_M2H[k / 4][8 * (k % 4) +: 8], $sformatf("Memory to HIPPI byte %0d = %h", k, h_got[k]));
    check(!pktav && dut.xc_value == 48'd0, "Memory to HIPPI: packet complete");

    // ---------- self test ----------
    set_mode(0);
    bist_test = 1'b1;
    repeat (3000) @(negedge clk);
    check(bist_hresult && bist_sresult, "self test passes on both FIFOs");
    bist_test = 1'b0;

    check(ram.timing_errors == 0 && ram.conflicts == 0, $sformatf("RAM set-up/recovery breaches: %0d", ram.timing_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
