// tb_sync_lanes: synchronisation of two MBC byte lanes sending to HIPPI.
//
// Two MBC ASICs at their full default size, each with its own 1M x 32 SRAM
// model and its own SCSI processor model, are put in SCSI to HIPPI mode for
// the same 600-byte packet. They share the HIPPI DTREQ line, and their burst
// outputs are combined by the board logic that joins the lanes: a
// four-input AND of the BSTAV outputs (the two unused inputs tied high, as
// for a channel with two lanes fitted) whose result is registered in a
// flip-flop and fed back to every chip as SYNC.
// The SCSI sides are deliberately out of step: lane 0 gets its data at the
// full handshake rate from the start, lane 1 only after a delay and with
// random pauses on DREQ. Lane 0 therefore has a burst ready long before lane
// 1 and must wait for SYNC.
// Lane 0 acts as master: its write strobe clocks the HIPPI source chip,
// which takes lane 0 on bits 7:0 and lane 1 on bits 15:8. The test checks, on
// every clock, that the slave's strobe equals the master's (the lanes leave
// in the same clock), that every 16-bit channel word carries both lanes'
// next bytes, that the bursts are 256, 256 and a short 88 bytes long at one
// byte per clock, that lane 0 waited for SYNC, and that both transfer
// counters end at zero. Both RAM models must see their set-up and
// recovery rules kept.
module tb_sync_lanes;
  localparam int N = 600;   // bytes per lane

  logic clk = 1'b0, reset_n = 1'b0;
  logic asic_sel_n = 1'b1, gc_rd_n = 1'b1, gc_wr_n = 1'b1;
  logic [4:0] reg_sel = '0;
  logic [7:0] gc_bus_in = '0;
  logic dtreq = 1'b0, sync = 1'b0;
  int checks = 0, failures = 0;

  // per-lane pins
  logic        bist_hresult[2], bist_sresult[2];
  logic [7:0]  gc_bus_out[2];
  logic        gc_bus_oe[2];
  logic [7:0]  hippi_dout[2];
  logic        hippi_doe[2], hippi_wr[2], dest_oe_n[2], rdyin[2];
  logic        bstav[2], pktav[2], shbst[2], paro[2];
  logic [19:0] mem_addr[2];
  logic [31:0] mem_din[2], mem_dout[2];
  logic        mem_doe[2], mem_write_n[2], mem_oe_n[2];
  logic [15:0] scsi_din[2], scsi_dout[2];
  logic        scsi_doe[2], dreq[2], dackn_n[2], rdn_n[2], wrn_n[2];

  for (genvar k = 0; k < 2; k++) begin : g_lane
    mbc_asic dut (
      .clk, .reset_n, .bist_test(1'b0),
      .bist_hresult(bist_hresult[k]), .bist_sresult(bist_sresult[k]),
      .asic_sel_n, .gc_rd_n, .gc_wr_n, .reg_sel, .gc_bus_in,
      .gc_bus_out(gc_bus_out[k]), .gc_bus_oe(gc_bus_oe[k]),
      .hippi_din(8'h00), .hippi_dout(hippi_dout[k]), .hippi_doe(hippi_doe[k]),
      .hippi_wr(hippi_wr[k]), .nrden(1'b1), .dest_oe_n(dest_oe_n[k]), .rdyin(rdyin[k]),
      .dtreq, .sync, .bstav(bstav[k]), .pktav(pktav[k]), .shbst(shbst[k]), .paro(paro[k]),
      .mem_addr(mem_addr[k]), .mem_din(mem_din[k]), .mem_dout(mem_dout[k]),
      .mem_doe(mem_doe[k]), .mem_write_n(mem_write_n[k]), .mem_oe_n(mem_oe_n[k]),
      .scsi_din(scsi_din[k]), .scsi_dout(scsi_dout[k]), .scsi_doe(scsi_doe[k]),
      .dreq(dreq[k]), .dackn_n(dackn_n[k]), .rdn_n(rdn_n[k]), .wrn_n(wrn_n[k]));
    sram_model #(.AW(20)) ram (.clk, .addr(mem_addr[k]), .din(mem_dout[k]),
                               .dout(mem_din[k]), .we_n(mem_write_n[k]), .oe_n(mem_oe_n[k]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- lane synchronisation logic on the board ----------------
  always @(posedge clk) sync <= bstav[0] & bstav[1] & 1'b1 & 1'b1;

  // ---------------- SCSI processors, one per lane ----------------
  // lane k, half-word i carries bytes lbyte(k, 2i) (low) and lbyte(k, 2i+1)
  function automatic logic [7:0] lbyte(input int k, input int i);
    return k == 0 ? 8'(i * 3 + 7) : 8'(8'hA0 ^ 8'(i) ^ 8'(i >> 8));
  endfunction
  int  s_i[2] = '{0, 0};
  bit  s_go[2] = '{1'b0, 1'b0};
  always @(posedge clk)
    for (int k = 0; k < 2; k++) if (reset_n && !dackn_n[k] && !rdn_n[k]) s_i[k] <= s_i[k] + 1;
  always @(negedge clk)
    for (int k = 0; k < 2; k++) begin
      scsi_din[k] = {lbyte(k, 2 * s_i[k] + 1), lbyte(k, 2 * s_i[k])};
      dreq[k]     = s_go[k] && (s_i[k] < N / 2) && (k == 0 || $urandom_range(0, 3) != 0);
    end

  // ---------------- HIPPI source chip, clocked by the master lane ----------------
  logic [15:0] words[$];
  int run = 0, bursts[$], lag = 0, waits = 0;
  always @(posedge clk) begin
    if (reset_n) begin
      checks++;
      if (hippi_wr[1] != hippi_wr[0]) begin
        failures++; lag++;
        if (lag < 5) $display("FAIL lanes out of step at %0t", $time);
      end
      if (bstav[0] && !bstav[1] && pktav[0]) waits++;
    end
    if (hippi_wr[0] && reset_n) begin
      words.push_back({hippi_dout[1], hippi_dout[0]});
      run <= run + 1;
    end else if (run > 0) begin
      bursts.push_back(run);
      run <= 0;
    end
  end

  // ---------------- Group Controller, writing both chips at once ----------------
  task automatic gc_write(input logic [4:0] r, input logic [7:0] d);
    @(negedge clk);
    asic_sel_n = 1'b0; reg_sel = r; gc_bus_in = d;
    @(negedge clk); gc_wr_n = 1'b0;
    @(negedge clk); gc_wr_n = 1'b1;
    @(negedge clk); asic_sel_n = 1'b1;
  endtask
  task automatic set_mode(input int m);
    gc_write(5'h0C, 8'(m));
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [47:0] xc;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    repeat (2) @(negedge clk);
    g_lane[0].ram.timing_errors = 0;   // forget whatever the pins did before reset
    g_lane[1].ram.timing_errors = 0;
    set_mode(0);
    xc = 48'h0 - 48'(N);
    for (int b = 0; b < 6; b++) gc_write(5'(5 + b), xc[8*b +: 8]);
    gc_write(5'h04, 8'h3C);
    set_mode(4);
    check(hippi_dout[0] == 8'h3C && hippi_dout[1] == 8'h3C, "I-field on both lanes");
    dtreq = 1'b1;
    set_mode(2);
    s_go[0] = 1'b1;
    repeat (900) @(negedge clk);
    check(words.size() == 0, "nothing sent while lane 1 has no data");
    check(bstav[0] && !bstav[1] && !sync, "lane 0 ready, lane 1 not, no sync");
    s_go[1] = 1'b1;
    repeat (6000) @(negedge clk);

    check(words.size() == N, $sformatf("%0d channel words sent, got %0d", N, words.size()));
    for (int i = 0; i < words.size(); i++)
      if (words[i] != {lbyte(1, i), lbyte(0, i)}) begin
        check(1'b0, $sformatf("word %0d: %h, expected %h", i, words[i], {lbyte(1, i), lbyte(0, i)}));
        break;
      end
    check(bursts.size() == 3 && bursts[0] == 256 && bursts[1] == 256 && bursts[2] == 88,
          $sformatf("bursts of 256, 256, 88 bytes at one per clock: %p", bursts));
    check(waits > 0, $sformatf("lane 0 waited for sync (%0d clocks)", waits));
    check(g_lane[0].dut.xc_value == 48'd0 && g_lane[1].dut.xc_value == 48'd0,
          "both transfer counters at zero");
    check(!pktav[0] && !pktav[1], "packet finished on both lanes");
    check(lag == 0, "slave strobe always equal to the master's");
    $display("sync wait clocks=%0d bursts=%p", waits, bursts);
    check(g_lane[0].ram.timing_errors == 0 && g_lane[1].ram.timing_errors == 0, "RAM set-up/recovery rules kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
