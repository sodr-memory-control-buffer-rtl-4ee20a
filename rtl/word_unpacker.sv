// word_unpacker: splits one 32-bit buffer-memory word into 32/OUT_W items.
//
// This is the multiplexer of the MBC data path: memory words go out as SCSI
// half-words (OUT_W = 16) or HIPPI bytes (OUT_W = 8), least significant item
// first, the inverse of word_packer. Interface: valid/ready on both sides. A
// word is accepted only when the previous one has been sent entirely; the
// current item is offered on out_valid/out_data. clear drops the held word.
module word_unpacker #(
  parameter int unsigned OUT_W = 16,
  localparam int unsigned N    = 32 / OUT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [31:0]      in_data,
  output logic             in_ready,
  output logic             out_valid,
  output logic [OUT_W-1:0] out_data,
  input  logic             out_ready
);

  logic [31:0]            word;
  logic [$clog2(N+1)-1:0] left;

  assign in_ready  = (left == '0);
  assign out_valid = (left != '0);
  assign out_data  = word[OUT_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= '0;
      left <= '0;
    end else if (clear) begin
      left <= '0;
    end else if (in_ready) begin
      if (in_valid) begin
        word <= in_data;
        left <= ($clog2(N+1))'(N);
      end
    end else if (out_ready) begin
      word <= word >> OUT_W;
      left <= left - 1'b1;
    end
  end

endmodule
