// tb_hippi_if: self-checking test of the HIPPI byte-lane interface at its
// full size (512-byte FIFO, 256-byte bursts, 48-bit counter).
// Input direction: a destination-chip model offers bytes at random; the
// memory side stalls for long stretches so the FIFO fills. Checked: every byte
// arrives, packed least significant first; the chip's output enable is
// withdrawn while the FIFO is full and rdyin only shows room for a whole
// burst; the transfer counter sees every byte.
// Output direction: the counter is preset to 2^48 - 600 and 600 bytes are fed
// from memory. Checked: the I-field sits on the bus until the first burst;
// bursts of 256, 256 and a short 88 bytes, each on consecutive clocks, with
// shbst only on the last; no burst starts while sync is low; bytes and odd
// parity are right; pktav falls when the counter reaches zero.
// Finally the FIFO self test must pass.
module tb_hippi_if;
  import mbc_pkg::*;
  localparam int DEPTH = 512, BURST = 256, XC_W = 48;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  dir_e dir = DIR_OFF;
  logic [7:0] ifield = 8'hB6;
  logic [7:0] h_din = '0, h_dout;
  logic nrden = 1'b1, dest_oe_n, rdyin, h_doe, h_wr;
  logic dtreq = 1'b0, sync = 1'b0, bstav, pktav, shbst, paro;
  logic [XC_W-1:0] xc_value = '0;
  logic xc_inc;
  logic mw_valid, mw_ready = 1'b0; logic [31:0] mw_data;
  logic mr_valid = 1'b0, mr_ready; logic [31:0] mr_data = '0;
  logic bist_start = 1'b0, bist_done, bist_pass;
  logic fifo_empty, fifo_full, fifo_half;
  int checks = 0, failures = 0;

  hippi_if #(.DEPTH(DEPTH), .BURST_BYTES(BURST), .XC_W(XC_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transfer counter stand-in
  always @(posedge clk) if (xc_inc) xc_value <= xc_value + 1'b1;

  // ---------------- input direction scoreboard ----------------
  logic [7:0] sent[$];
  int oe_stalls = 0, words_in = 0;
  always @(posedge clk) if (rst_n && dir == DIR_IN) begin
    if (!dest_oe_n && !nrden) sent.push_back(h_din);
    if (fifo_full) begin
      checks++;
      if (!dest_oe_n) begin failures++; $display("FAIL output enable while FIFO full"); end
      oe_stalls++;
    end
    if (mw_valid && mw_ready) begin
      logic [31:0] e;
      e = {sent[3], sent[2], sent[1], sent[0]};
      repeat (4) void'(sent.pop_front());
      checks++;
      words_in++;
      if (mw_data != e) begin failures++; $display("FAIL packed word %h exp %h", mw_data, e); end
    end
  end

  // ---------------- output direction capture ----------------
  logic [7:0] expect_q[$];
  int burst_lens[$];
  int run = 0, sync_waits = 0, short_seen = 0, bytes_out = 0;
  logic in_burst = 1'b0;
  always @(posedge clk) if (rst_n && dir == DIR_OUT) begin
    if (h_wr) begin
      checks++;
      if (expect_q.size() == 0 || h_dout != expect_q[0]) begin
        failures++; $display("FAIL HIPPI byte %h", h_dout);
      end
      if (expect_q.size() > 0) void'(expect_q.pop_front());
      if (paro != ~^h_dout) begin failures++; $display("FAIL parity"); end
      run++; bytes_out++;
    end else if (run != 0) begin
      burst_lens.push_back(run);
      run = 0;
    end
    if (bstav && !sync) sync_waits++;
    if (bstav && shbst) short_seen++;
  end

  task automatic set_xc(input logic [XC_W-1:0] v);
    @(negedge clk);
    force xc_value = v;
    @(negedge clk);
    release xc_value;
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // ================= input direction =================
    dir = DIR_IN;
    for (int c = 0; c < 12000; c++) begin
      @(negedge clk);
      nrden = ($urandom_range(0, 3) == 0);
      h_din = 8'($urandom);
      // memory side: long stall, then random
      mw_ready = (c < 1500) ? 1'b0 : ($urandom_range(0, 1) == 1);
      if (c == 800) check(fifo_full, "FIFO filled during memory stall");
      if (c == 800) check(!rdyin, "rdyin low with no room for a burst");
    end
    @(negedge clk);
    nrden = 1'b1; mw_ready = 1'b1;
    repeat (2 * DEPTH + 20) @(negedge clk);
    check(sent.size() < 4 && fifo_empty, "all whole words reached memory");
    check(rdyin, "rdyin high when the FIFO is empty");
    check(oe_stalls > 0, "destination stalled while the FIFO was full");
    check(xc_value == XC_W'(words_in * 4 + sent.size()), "counter counted every byte");

    // ================= output direction =================
    dir = DIR_OFF;
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    set_xc(48'h0 - 48'd600);
    dir = DIR_OUT;
    @(negedge clk);
    check(h_doe && h_dout == 8'hB6 && !h_wr, "I-field on the bus before the first burst");
    check(pktav, "packet available while the counter is not zero");
    // feed 150 words
    fork
      begin
        for (int w = 0; w < 150; w++) begin
          logic [31:0] word;
          word = $urandom;
          for (int k = 0; k < 4; k++) expect_q.push_back(word[8*k +: 8]);
          @(negedge clk);
          mr_valid = 1'b1; mr_data = word;
          do @(posedge clk); while (!mr_ready);
          #1 mr_valid = 1'b0;
        end
      end
      begin
        // source chip and external sync: hold sync low for a while first
        dtreq = 1'b1;
        repeat (700) @(negedge clk);
        check(bytes_out == 0, "no burst while sync is low");
        for (int c = 0; c < 3000; c++) begin
          @(posedge clk);
          sync <= bstav;          // external flip-flop on the ANDed burst-ready signals
        end
      end
    join
    check(burst_lens.size() == 3, $sformatf("three bursts, got %0d", burst_lens.size()));
    if (burst_lens.size() == 3)
      check(burst_lens[0] == 256 && burst_lens[1] == 256 && burst_lens[2] == 88,
            $sformatf("burst lengths %0d %0d %0d", burst_lens[0], burst_lens[1], burst_lens[2]));
    check(expect_q.size() == 0 && bytes_out == 600, "all 600 bytes sent");
    check(xc_value == 0 && !pktav && !bstav, "packet ends when the counter reaches zero");
    check(short_seen > 0 && sync_waits > 0, "short burst and sync wait seen");

    // ================= self test =================
    dir = DIR_OFF; dtreq = 1'b0;
    @(negedge clk);
    bist_start = 1'b1;
    n = 0;
    while (!bist_done && n < 10 * DEPTH) begin @(negedge clk); n++; end
    check(bist_done && bist_pass, "FIFO self test passes");
    bist_start = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
