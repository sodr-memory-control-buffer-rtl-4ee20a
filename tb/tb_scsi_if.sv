// tb_scsi_if: self-checking test of the SCSI DMA interface at its full size
// (256 x 16 FIFO), with a model of the SCSI processor's DMA port.
// Output direction: 200 memory words are sent while the processor first
// withholds DREQ (the FIFO fills and memory reads stop), then requests
// continuously (one half-word every two clocks), then at random. Every
// half-word must arrive in order, low half of each word first, with DACKN_
// and WRN_ low together.
// Input direction: the processor offers half-words at random while memory
// stalls for a while; DACKN_ must be withheld while the FIFO is full, and the
// words reaching memory must be the half-words packed low half first.
// Finally the FIFO self test must pass.
module tb_scsi_if;
  import mbc_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  dir_e dir = DIR_OFF;
  logic [15:0] s_din = '0, s_dout;
  logic s_doe, dreq = 1'b0, dackn_n, rdn_n, wrn_n;
  logic mw_valid, mw_ready = 1'b0; logic [31:0] mw_data;
  logic mr_valid = 1'b0, mr_ready; logic [31:0] mr_data = '0;
  logic bist_start = 1'b0, bist_done, bist_pass, fifo_empty, fifo_full;
  int checks = 0, failures = 0;

  scsi_if #(.DEPTH(DEPTH)) dut (.*);
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

  logic [15:0] exp_q[$];
  logic [15:0] in_q[$];
  int got = 0, full_blocks = 0, last_ack = 0, gap_sum = 0, gap_n = 0, cyc = 0;
  logic measure = 1'b0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    // output direction: processor samples the bus while DACKN_ and WRN_ are low
    if (!dackn_n && !wrn_n) begin
      checks++;
      if (exp_q.size() == 0 || s_dout != exp_q[0]) begin
        failures++; $display("FAIL SCSI half-word %h", s_dout);
      end
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      got++;
      if (measure) begin gap_sum += cyc - last_ack; gap_n++; end
      last_ack = cyc;
      if (rdn_n == 1'b0) begin failures++; $display("FAIL RDN_ and WRN_ together"); end
    end
    // input direction: the MBC takes s_din while DACKN_ and RDN_ are low
    if (!dackn_n && !rdn_n) in_q.push_back(s_din);
    if (dir == DIR_IN && fifo_full && dreq) begin
      full_blocks++;
      checks++;
      if (!dackn_n) begin failures++; $display("FAIL acknowledge while FIFO full"); end
    end
    if (mw_valid && mw_ready) begin
      logic [31:0] e;
      e = {in_q[1], in_q[0]};
      repeat (2) void'(in_q.pop_front());
      checks++;
      if (mw_data != e) begin failures++; $display("FAIL packed word %h exp %h", mw_data, e); end
    end
  end

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // ================= output direction =================
    dir = DIR_OUT;
    fork
      for (int w = 0; w < 200; w++) begin
        logic [31:0] word;
        word = $urandom;
        exp_q.push_back(word[15:0]);
        exp_q.push_back(word[31:16]);
        @(negedge clk);
        mr_valid = 1'b1; mr_data = word;
        do @(posedge clk); while (!mr_ready);
        #1 mr_valid = 1'b0;
      end
      begin
        repeat (700) @(negedge clk);
        check(fifo_full && !mr_ready, "FIFO full stops memory reads while DREQ is low");
        check(got == 0, "nothing sent without DREQ");
        dreq = 1'b1;
        repeat (3) @(negedge clk);
        measure = 1'b1;
        repeat (100) @(negedge clk);
        measure = 1'b0;
        check(gap_n > 40 && gap_sum == 2 * gap_n, $sformatf("two clocks per half-word (%0d over %0d)", gap_sum, gap_n));
        for (int c = 0; c < 2000; c++) begin
          @(negedge clk);
          dreq = $urandom_range(0, 2) != 0;
        end
        dreq = 1'b1;
        repeat (100) @(negedge clk);
      end
    join
    check(got == 400 && exp_q.size() == 0, $sformatf("all 400 half-words sent, got %0d", got));

    // ================= input direction =================
    dreq = 1'b0;
    dir = DIR_OFF;
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    dir = DIR_IN;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      dreq = $urandom_range(0, 3) != 0;
      s_din = 16'($urandom);
      mw_ready = (c < 1500) ? 1'b0 : ($urandom_range(0, 1) == 1);
    end
    @(negedge clk);
    dreq = 1'b0; mw_ready = 1'b1;
    repeat (2 * DEPTH + 20) @(negedge clk);
    check(in_q.size() < 2 && fifo_empty, "all whole words reached memory");
    check(full_blocks > 0, "acknowledge withheld while FIFO full");

    // ================= self test =================
    dir = DIR_OFF;
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
