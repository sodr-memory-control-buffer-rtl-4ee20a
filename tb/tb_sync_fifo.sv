// tb_sync_fifo: self-checking test of sync_fifo at the HIPPI size (512 x 8).
// Random pushes and pops, with bursts that fill and drain the FIFO, are
// compared against a queue model: the head value, the empty, full and
// half-full flags and the fill count are checked every clock, and a clear is
// checked to empty the FIFO.
module tb_sync_fifo;
  localparam int W = 8, DEPTH = 512;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, push = 1'b0, pop = 1'b0;
  logic [W-1:0] wdata = '0, rdata;
  logic empty, full, half;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

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

  int phase_bias;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // compare state before this clock's operation
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      check(half == (q.size() >= DEPTH/2), "half flag");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(rdata == q[0], "head data");
      phase_bias = (cyc / 1500) % 2;   // alternate filling and draining phases
      push  = ($urandom_range(0, 99) < (phase_bias ? 80 : 30));
      pop   = ($urandom_range(0, 99) < (phase_bias ? 30 : 80));
      wdata = W'($urandom);
      clear = (cyc == 17000);
      @(posedge clk);
      #1;
      if (clear) q.delete();
      else begin
        int sz;
        sz = q.size();
        if (pop && sz > 0) void'(q.pop_front());
        if (push && sz < DEPTH) q.push_back(wdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
