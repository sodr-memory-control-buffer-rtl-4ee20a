// xfer_counter: the MBC's 48-bit transfer counter.
//
// The Group Controller writes it one byte at a time (registers 0x05 = least
// significant .. 0x0A = most significant) with 2^48 minus the number of bytes
// to move, and it counts up by one for every HIPPI data byte. It therefore
// reaches zero exactly when the transfer is complete; zero is reported in
// status bit 0 and ends the HIPPI packet. The document gives the register
// layout, the 2^48 - n preset and the automatic increment; counting HIPPI
// bytes (not 32-bit words) is this design's reading of "number of words" for a
// byte-wide HIPPI lane. A byte write in the same cycle as an increment wins.
module xfer_counter #(
  parameter int unsigned W = 48,
  localparam int unsigned NB = (W + 7) / 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr,        // one-cycle byte write
  input  logic [$clog2(NB)-1:0]  wr_idx,    // byte index, 0 = least significant
  input  logic [7:0]             wr_data,
  input  logic                   inc,       // one HIPPI byte moved
  output logic [W-1:0]           value,
  output logic                   zero
);

  logic [NB*8-1:0] wide;

  always_comb begin
    wide = (NB*8)'(value);
    wide[32'(wr_idx)*8 +: 8] = wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   value <= '0;
    else if (wr)  value <= wide[W-1:0];
    else if (inc) value <= value + 1'b1;
  end

  assign zero = (value == '0);

endmodule
