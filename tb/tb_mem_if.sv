// tb_mem_if: self-checking test of the buffer-memory interface with a small
// memory (AW = 6, 64 words) so that the full condition is reached quickly.
// Against a queue model it checks: words come back in the order written,
// across pointer wrap-around; writes stop at memory full and reads at memory
// empty; a stream of writes runs at one word per three clocks; GC writes and
// reads reach the given address and GC-written words are what a following
// stream read delivers; a pointer load moves the start address; clear empties
// the buffer.
module tb_mem_if;
  localparam int AW = 6;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0, gc_en = 1'b0;
  logic wr_valid = 1'b0, wr_ready; logic [31:0] wr_data = '0;
  logic rd_valid, rd_ready = 1'b0; logic [31:0] rd_data;
  logic gc_wr = 1'b0, gc_rd = 1'b0; logic [AW-1:0] gc_addr = '0;
  logic [31:0] gc_wdata = '0, gc_rdata; logic gc_rdone;
  logic ptr_load = 1'b0; logic [AW-1:0] ptr_addr = '0;
  logic [AW:0] word_count; logic mem_full, mem_empty;
  logic [AW-1:0] mem_addr; logic [31:0] mem_dout, mem_din; logic mem_doe, mem_we_n, mem_oe_n;
  int checks = 0, failures = 0;

  mem_if #(.AW(AW)) dut (.*);
  sram_model #(.AW(AW)) ram (.clk, .addr(mem_addr), .din(mem_dout), .dout(mem_din),
                             .we_n(mem_we_n), .oe_n(mem_oe_n));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] q[$];
  int full_stalls = 0;
  // scoreboard on the streams
  always @(posedge clk) if (rst_n) begin
    if (wr_valid && wr_ready) q.push_back(wr_data);
    if (rd_valid && rd_ready) begin
      checks++;
      if (q.size() == 0 || rd_data != q[0]) begin
        failures++;
        $display("FAIL read order at %0t", $time);
      end
      if (q.size() > 0) void'(q.pop_front());
    end
    if (wr_valid && mem_full) begin
      full_stalls++;
      checks++;
      if (wr_ready) begin failures++; $display("FAIL write accepted while full"); end
    end
    if (!mem_we_n && !mem_oe_n) begin failures++; $display("FAIL write and read together"); end
  end

  initial begin
    int t0, t1, n;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    ram.timing_errors = 0;   // forget whatever the pins did before reset
    @(negedge clk);
    check(mem_empty && !mem_full && word_count == 0, "empty after reset");

    // A: fill with back-to-back writes, measuring the rate
    wr_en = 1'b1;
    wr_valid = 1'b1; wr_data = $urandom;
    t0 = $time; n = 0;
    while (!mem_full) begin
      @(posedge clk);
      if (wr_ready) n++;
      #1 wr_data = $urandom;
      if (n > 100) break;
    end
    t1 = $time;
    check(n == 64, $sformatf("64 words to full, got %0d", n));
    check(((t1 - t0) / 10) >= 3 * 64 - 4 && ((t1 - t0) / 10) <= 3 * 64 + 2, $sformatf("write rate: %0d clocks for 64 words", (t1 - t0) / 10));
    repeat (10) @(negedge clk);
    check(mem_full && word_count == 64, "memory full flag");
    wr_valid = 1'b0;
    // drain
    rd_en = 1'b1; rd_ready = 1'b1;
    repeat (400) @(negedge clk);
    check(mem_empty && q.size() == 0, "drained to empty");
    check(full_stalls > 0, "full stall seen");

    // B: random concurrent traffic across pointer wrap-around
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      wr_valid = $urandom_range(0, 1);
      rd_ready = $urandom_range(0, 3) != 0;
      @(posedge clk);
      #1 if (!wr_valid || wr_ready) wr_data = $urandom;
    end
    @(negedge clk);
    wr_valid = 1'b0; rd_ready = 1'b1;
    repeat (300) @(negedge clk);
    check(q.size() == 0 && mem_empty, "random traffic drained");

    // C: GC accesses (diagnostic mode); pointers start at 0 after clear
    wr_en = 1'b0; rd_en = 1'b0;
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    gc_en = 1'b1;
    for (int a = 0; a < 5; a++) begin
      gc_addr = 6'(a); gc_wdata = 32'h0403_0201 + 32'(a);
      gc_wr = 1'b1; @(negedge clk); gc_wr = 1'b0;
      repeat (4) @(negedge clk);
      check(ram.mem[a] == 32'h0403_0201 + 32'(a), "GC write reaches the address");
    end
    check(word_count == 5, "GC writes counted as buffered words");
    gc_addr = 6'd3; gc_rd = 1'b1; @(negedge clk); gc_rd = 1'b0;
    n = 0;
    while (!gc_rdone && n < 10) begin @(negedge clk); n++; end
    @(negedge clk);
    check(gc_rdata == 32'h0403_0204, "GC read returns the word");
    check(word_count == 5, "GC read leaves the buffer alone");
    gc_en = 1'b0;
    for (int a = 0; a < 5; a++) q.push_back(32'h0403_0201 + 32'(a));
    rd_en = 1'b1;
    repeat (40) @(negedge clk);
    check(q.size() == 0 && mem_empty, "stream read delivers GC-written words");

    // D: pointer load sets the start address
    rd_en = 1'b0; wr_en = 1'b1;
    ptr_addr = 6'h3E; ptr_load = 1'b1; @(negedge clk); ptr_load = 1'b0;
    wr_valid = 1'b1; wr_data = 32'hCAFE_0001;
    @(posedge clk); #1 wr_data = 32'hCAFE_0002;
    @(posedge clk); @(posedge clk); #1 wr_data = 32'hCAFE_0003;
    repeat (6) @(negedge clk);
    wr_valid = 1'b0;
    repeat (4) @(negedge clk);
    check(ram.mem[6'h3E] == 32'hCAFE_0001, "first word at the loaded address");
    check(word_count >= 2, "words buffered after pointer load");
    rd_en = 1'b1;
    repeat (40) @(negedge clk);
    check(q.size() == 0, "words after pointer load read back in order");

    // E: clear
    rd_en = 1'b0; wr_valid = 1'b1;
    repeat (10) @(negedge clk);
    wr_valid = 1'b0;
    repeat (4) @(negedge clk);
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    q.delete();
    check(mem_empty && word_count == 0, "clear empties the buffer");
    check(ram.conflicts == 0, "no write during output enable");
    check(ram.timing_errors == 0 && ram.conflicts == 0, $sformatf("RAM set-up/recovery breaches: %0d", ram.timing_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
