// word_packer: gathers 32/IN_W narrow items into one 32-bit buffer-memory word.
//
// This is the de-multiplexer of the MBC data path: HIPPI bytes (IN_W = 8) or
// SCSI half-words (IN_W = 16) are collected with the first item in the least
// significant position, which is the byte order the memory shows for an
// incrementing HIPPI stream (bytes 01,02,03,04 give word 0x04030201).
// Interface: valid/ready on both sides. An item is taken when in_valid and
// in_ready; a full word is offered on out_valid until out_ready. While a word
// waits, no item is taken, so the packer holds exactly one word. clear drops
// any partial word.
module word_packer #(
  parameter int unsigned IN_W = 8,
  localparam int unsigned N   = 32 / IN_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            in_valid,
  input  logic [IN_W-1:0] in_data,
  output logic            in_ready,
  output logic            out_valid,
  output logic [31:0]     out_data,
  input  logic            out_ready
);

  logic [$clog2(N+1)-1:0] fill;

  assign in_ready  = !out_valid;
  assign out_valid = (fill == ($clog2(N+1))'(N));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill     <= '0;
      out_data <= '0;
    end else if (clear) begin
      fill <= '0;
    end else if (out_valid) begin
      if (out_ready) fill <= '0;
    end else if (in_valid) begin
      out_data <= {in_data, out_data[31:IN_W]};
      fill     <= fill + 1'b1;
    end
  end

endmodule
