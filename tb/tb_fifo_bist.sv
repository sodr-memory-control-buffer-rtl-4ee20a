// tb_fifo_bist: self-checking test of fifo_bist driving a real sync_fifo at
// the HIPPI size (512 x 8). A healthy FIFO must pass, and the test must take
// the expected 4*DEPTH+6 clocks (two fill/drain passes plus their checks).
// Then a FIFO with one read bit stuck at 1, and one whose full flag never
// rises, must both fail, and the controller must hand the FIFO back when
// start falls.
module tb_fifo_bist;
  localparam int W = 8, DEPTH = 512;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic active, f_clear, f_push, f_pop, done, pass;
  logic [W-1:0] f_wdata, f_rdata, raw_rdata;
  logic f_empty, f_full, raw_full, f_half;
  logic [$clog2(DEPTH):0] f_count;
  logic stuck_bit = 1'b0, no_full = 1'b0;
  int checks = 0, failures = 0;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (.clk, .rst_n, .clear(f_clear), .push(f_push),
    .wdata(f_wdata), .pop(f_pop), .rdata(raw_rdata), .empty(f_empty), .full(raw_full),
    .half(f_half), .count(f_count));
  // fault injection between the FIFO and the self test
  assign f_rdata = raw_rdata | {W{stuck_bit}} & W'(8'h10);
  assign f_full  = raw_full && !no_full;

  fifo_bist #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_bist(output int cycles, output logic result);
    @(negedge clk);
    start = 1'b1;
    cycles = 0;
    do begin
      @(negedge clk);
      cycles++;
    end while (!done && cycles < 10 * DEPTH);
    result = pass;
    check(active, "controller owns the FIFO while done");
    start = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(!active && !done, "FIFO handed back after start falls");
  endtask

  initial begin
    int cyc;
    logic res;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(!active && !done, "idle after reset");
    run_bist(cyc, res);
    check(res === 1'b1, "healthy FIFO passes");
    check(cyc == 4 * DEPTH + 6, $sformatf("self-test length %0d clocks", cyc));
    stuck_bit = 1'b1;
    run_bist(cyc, res);
    check(res === 1'b0, "stuck data bit detected");
    stuck_bit = 1'b0;
    no_full = 1'b1;
    run_bist(cyc, res);
    check(res === 1'b0, "missing full flag detected");
    no_full = 1'b0;
    run_bist(cyc, res);
    check(res === 1'b1, "healthy FIFO passes again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
