// tb_xfer_counter: self-checking test of the 48-bit transfer counter. Bytes
// are written through the six byte registers and read back; a preset of
// 2^48 - n must reach zero, and raise the zero flag, after exactly n
// increments, as for a transfer of n HIPPI bytes (n = 512, two bursts). A
// write must win over a simultaneous increment.
module tb_xfer_counter;
  logic clk = 1'b0, rst_n = 1'b0, wr = 1'b0, inc = 1'b0;
  logic [2:0] wr_idx = '0;
  logic [7:0] wr_data = '0;
  logic [47:0] value;
  logic zero;
  int checks = 0, failures = 0;

  xfer_counter #(.W(48)) dut (.*);
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

  task automatic load(input logic [47:0] v);
    for (int b = 0; b < 6; b++) begin
      @(negedge clk);
      wr = 1'b1; wr_idx = 3'(b); wr_data = v[8*b +: 8];
    end
    @(negedge clk);
    wr = 1'b0;
  endtask

  initial begin
    logic [47:0] v;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(value == 0 && zero, "reset value");
    for (int t = 0; t < 20; t++) begin
      v = {$urandom, $urandom};
      load(v);
      check(value == v, "byte-wise load");
      check(zero == (v == 0), "zero flag after load");
    end
    // 2^48 - 512: two 256-byte bursts
    load(48'h0 - 48'd512);
    for (int n = 0; n < 512; n++) begin
      check(!zero, "not zero before the last byte");
      @(negedge clk); inc = 1'b1;
      @(negedge clk); inc = 1'b0;
    end
    check(zero && value == 0, "zero after 512 increments");
    // write wins over increment
    @(negedge clk);
    wr = 1'b1; inc = 1'b1; wr_idx = 3'd0; wr_data = 8'h5A;
    @(negedge clk);
    wr = 1'b0; inc = 1'b0;
    check(value == 48'h5A, "write beats increment");
    // carry across bytes
    load(48'h0000_0000_FFFF);
    @(negedge clk); inc = 1'b1;
    @(negedge clk); inc = 1'b0;
    check(value == 48'h0000_0001_0000, "carry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
