// tb_word_packer: self-checking test of word_packer for both widths the MBC
// uses, 8-bit HIPPI bytes and 16-bit SCSI half-words. Random item streams with
// random stalls on both sides; every 32-bit output word must hold the next
// 32/IN_W items with the first in the least significant position.
module tb_word_packer;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
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

  // 8-bit instance
  logic b_iv = 0, b_ir, b_ov, b_or = 0;
  logic [7:0]  b_id = 0;
  logic [31:0] b_od;
  word_packer #(.IN_W(8)) u8 (.clk, .rst_n, .clear(1'b0), .in_valid(b_iv), .in_data(b_id),
    .in_ready(b_ir), .out_valid(b_ov), .out_data(b_od), .out_ready(b_or));
  // 16-bit instance
  logic h_iv = 0, h_ir, h_ov, h_or = 0;
  logic [15:0] h_id = 0;
  logic [31:0] h_od;
  word_packer #(.IN_W(16)) u16 (.clk, .rst_n, .clear(1'b0), .in_valid(h_iv), .in_data(h_id),
    .in_ready(h_ir), .out_valid(h_ov), .out_data(h_od), .out_ready(h_or));

  logic [7:0]  bq[$];
  logic [15:0] hq[$];
  int words8 = 0, words16 = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      b_iv = $urandom_range(0, 3) != 0;  b_id = 8'($urandom);  b_or = $urandom_range(0, 2) != 0;
      h_iv = $urandom_range(0, 3) != 0;  h_id = 16'($urandom); h_or = $urandom_range(0, 2) != 0;
      @(posedge clk);
      if (b_ov && b_or) begin
        logic [31:0] exp;
        exp = {bq[3], bq[2], bq[1], bq[0]};
        repeat (4) void'(bq.pop_front());
        check(b_od == exp, "8-bit packed word");
        words8++;
      end
      if (b_iv && b_ir) bq.push_back(b_id);
      if (h_ov && h_or) begin
        logic [31:0] exp;
        exp = {hq[1], hq[0]};
        repeat (2) void'(hq.pop_front());
        check(h_od == exp, "16-bit packed word");
        words16++;
      end
      if (h_iv && h_ir) hq.push_back(h_id);
    end
    check(words8 > 1000 && words16 > 1000, "enough words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
