// tb_word_unpacker: self-checking test of word_unpacker for 16-bit (SCSI) and
// 8-bit (HIPPI) items. Random 32-bit words go in with random stalls; the items
// that come out must be the words' pieces, least significant first, in order.
module tb_word_unpacker;
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

  logic h_iv = 0, h_ir, h_ov, h_or = 0;
  logic [31:0] h_id = 0;
  logic [15:0] h_od;
  word_unpacker #(.OUT_W(16)) u16 (.clk, .rst_n, .clear(1'b0), .in_valid(h_iv), .in_data(h_id),
    .in_ready(h_ir), .out_valid(h_ov), .out_data(h_od), .out_ready(h_or));
  logic b_iv = 0, b_ir, b_ov, b_or = 0;
  logic [31:0] b_id = 0;
  logic [7:0]  b_od;
  word_unpacker #(.OUT_W(8)) u8 (.clk, .rst_n, .clear(1'b0), .in_valid(b_iv), .in_data(b_id),
    .in_ready(b_ir), .out_valid(b_ov), .out_data(b_od), .out_ready(b_or));

  logic [15:0] hq[$];
  logic [7:0]  bq[$];
  int n16 = 0, n8 = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      h_iv = $urandom_range(0, 2) != 0; h_id = $urandom; h_or = $urandom_range(0, 3) != 0;
      b_iv = $urandom_range(0, 2) != 0; b_id = $urandom; b_or = $urandom_range(0, 3) != 0;
      @(posedge clk);
      if (h_ov && h_or) begin
        check(hq.size() > 0 && h_od == hq[0], "16-bit item");
        if (hq.size() > 0) void'(hq.pop_front());
        n16++;
      end
      if (h_iv && h_ir) begin hq.push_back(h_id[15:0]); hq.push_back(h_id[31:16]); end
      if (b_ov && b_or) begin
        check(bq.size() > 0 && b_od == bq[0], "8-bit item");
        if (bq.size() > 0) void'(bq.pop_front());
        n8++;
      end
      if (b_iv && b_ir) for (int k = 0; k < 4; k++) bq.push_back(b_id[8*k +: 8]);
    end
    check(n16 > 1000 && n8 > 1000, "enough items seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
