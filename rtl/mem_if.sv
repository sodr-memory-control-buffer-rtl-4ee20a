// mem_if: buffer-memory interface of the MBC.
//
// Drives the external 1M x 32 static RAM (address, 32-bit data, active-low
// WRITE_ and MEM_OE_) and runs it as a circular buffer: a write pointer marks
// the tail, a read pointer the head, and a word count gives the memory full
// and memory empty flags the GC reads in the status register. Those three
// things are from the document. The access timing, arbitration and the way GC
// accesses touch the pointers are this design's own:
//  * A write takes three clocks: address and data are driven with WRITE_
//    high (address set-up), then WRITE_ is low for one clock (the write
//    pulse), then high again with address and data held (write recovery), so
//    the address never changes on an edge of WRITE_, as the memory's set-up
//    and recovery rules demand. At the 25 MHz ASIC clock this gives a 40 ns
//    pulse and 80 ns from address to end of write. A read takes two clocks
//    with MEM_OE_ low, the data sampled at the end of the second (80 ns of
//    access time at 25 MHz). The next access may start right after.
//  * Stream writes (from the HIPPI or SCSI packer, as the mode selects) go to
//    the write pointer; stream reads (to the HIPPI or SCSI unpacker) come from
//    the read pointer into a one-word output register. When both wait they
//    take turns. A write waits while the memory is full, a read while it is
//    empty, which is how a full buffer stalls the producer.
//  * GC accesses (diagnostic mode) use the GC address register and have
//    priority. A GC write also counts as buffered data: the word count grows
//    and the write pointer moves past the written word, so words the GC put
//    at addresses 0..n-1 after a reset are what a later Memory-to-SCSI or
//    Memory-to-HIPPI transfer sends. A GC read leaves the pointers alone.
//  * clear (held through Reset mode) empties the buffer and stops any
//    access; on its first clock it also returns both pointers to address 0.
//    ptr_load sets both pointers to an address and empties the buffer; it
//    is used in Reset mode to choose the starting address.
module mem_if #(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  // permissions from the master controller
  input  logic          wr_en,
  input  logic          rd_en,
  input  logic          gc_en,
  // write stream (packed words to store)
  input  logic          wr_valid,
  input  logic [31:0]   wr_data,
  output logic          wr_ready,
  // read stream (words fetched from the buffer)
  output logic          rd_valid,
  output logic [31:0]   rd_data,
  input  logic          rd_ready,
  // GC single-word access
  input  logic          gc_wr,
  input  logic          gc_rd,
  input  logic [AW-1:0] gc_addr,
  input  logic [31:0]   gc_wdata,
  output logic [31:0]   gc_rdata,
  output logic          gc_rdone,
  // pointer load
  input  logic          ptr_load,
  input  logic [AW-1:0] ptr_addr,
  // status
  output logic [AW:0]   word_count,
  output logic          mem_full,
  output logic          mem_empty,
  // SRAM pins
  output logic [AW-1:0] mem_addr,
  output logic [31:0]   mem_dout,
  output logic          mem_doe,
  input  logic [31:0]   mem_din,
  output logic          mem_we_n,
  output logic          mem_oe_n
);

  typedef enum logic [2:0] {M_IDLE, M_W0, M_W1, M_W2, M_R1, M_R2} mst_e;
  typedef enum logic [2:0] {OP_NONE, OP_SWR, OP_SRD, OP_GRD, OP_GWR} op_e;

  mst_e          st;
  logic          rd_is_gc;
  logic [AW-1:0] wp, rp;
  logic          gc_wr_pend, gc_rd_pend;
  logic          last_wr;          // last stream access was a write
  logic          clear_q;
  logic          decide;
  op_e           op;

  // an access may be chosen in idle or in the last cycle of an access
  assign decide    = (st == M_IDLE) || (st == M_W2) || (st == M_R2);
  assign mem_full  = (word_count == (AW+1)'(1) << AW);
  assign mem_empty = (word_count == '0);

  logic want_swr, want_srd, out_free;
  // the output register is free unless it holds a word that is not being
  // taken, or a stream read is completing this cycle
  assign out_free = (!rd_valid || rd_ready) && !(st == M_R2 && !rd_is_gc);
  assign want_swr = wr_en && wr_valid && !mem_full;
  assign want_srd = rd_en && !mem_empty && out_free;

  always_comb begin
    op = OP_NONE;
    if (decide && !clear && !ptr_load) begin
      if (gc_en && gc_wr_pend)       op = OP_GWR;
      else if (gc_en && gc_rd_pend)  op = OP_GRD;
      else if (want_swr && want_srd) op = last_wr ? OP_SRD : OP_SWR;
      else if (want_swr)             op = OP_SWR;
      else if (want_srd)             op = OP_SRD;
    end
  end

  assign wr_ready = (op == OP_SWR);
  assign mem_we_n = !(st == M_W1);
  assign mem_oe_n = !(st == M_R1 || st == M_R2);
  assign mem_doe  = (st == M_W0 || st == M_W1 || st == M_W2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= M_IDLE;
      rd_is_gc   <= 1'b0;
      wp         <= '0;
      rp         <= '0;
      word_count <= '0;
      gc_wr_pend <= 1'b0;
      gc_rd_pend <= 1'b0;
      last_wr    <= 1'b0;
      mem_addr   <= '0;
      mem_dout   <= '0;
      rd_valid   <= 1'b0;
      rd_data    <= '0;
      gc_rdata   <= '0;
      gc_rdone   <= 1'b0;
      clear_q    <= 1'b0;
    end else begin
      gc_rdone <= 1'b0;
      clear_q  <= clear;
      if (gc_wr) gc_wr_pend <= 1'b1;
      if (gc_rd) gc_rd_pend <= 1'b1;
      if (rd_valid && rd_ready) rd_valid <= 1'b0;

      // completion of a read
      if (st == M_R2) begin
        if (rd_is_gc) begin
          gc_rdata <= mem_din;
          gc_rdone <= 1'b1;
        end else begin
          rd_data  <= mem_din;
          rd_valid <= 1'b1;
        end
      end

      // sequencing
      unique case (st)
        M_W0:    st <= M_W1;
        M_W1:    st <= M_W2;
        M_R1:    st <= M_R2;
        default: st <= M_IDLE;
      endcase

      unique case (op)
        OP_SWR: begin
          st         <= M_W0;
          mem_addr   <= wp;
          mem_dout   <= wr_data;
          wp         <= wp + 1'b1;
          word_count <= word_count + 1'b1;
          last_wr    <= 1'b1;
        end
        OP_SRD: begin
          st         <= M_R1;
          rd_is_gc   <= 1'b0;
          mem_addr   <= rp;
          rp         <= rp + 1'b1;
          word_count <= word_count - 1'b1;
          last_wr    <= 1'b0;
        end
        OP_GWR: begin
          st         <= M_W0;
          mem_addr   <= gc_addr;
          mem_dout   <= gc_wdata;
          wp         <= gc_addr + 1'b1;
          if (!mem_full) word_count <= word_count + 1'b1;
          gc_wr_pend <= gc_wr;
        end
        OP_GRD: begin
          st         <= M_R1;
          rd_is_gc   <= 1'b1;
          mem_addr   <= gc_addr;
          gc_rd_pend <= gc_rd;
        end
        default: ;
      endcase

      if (ptr_load) begin
        wp <= ptr_addr;
        rp <= ptr_addr;
      end else if (clear && !clear_q) begin
        wp <= '0;
        rp <= '0;
      end
      if (clear || ptr_load) begin
        word_count <= '0;
        rd_valid   <= 1'b0;
        gc_wr_pend <= 1'b0;
        gc_rd_pend <= 1'b0;
        if (clear) st <= M_IDLE;
      end
    end
  end

endmodule
