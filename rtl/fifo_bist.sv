// fifo_bist: built-in self test for one of the MBC's FIFOs.
//
// The document states that every FIFO has a built-in self test, run through
// the BIST_Test pin and reported on BIST_HResult (HIPPI FIFO) and
// BIST_SResult (SCSI FIFO); it does not describe the algorithm. This design
// uses a simple two-pass data test: while `start` is high the controller owns
// the FIFO ports. It clears the FIFO, writes DEPTH words of a pattern
// (index XOR 0101..), checks that the full flag is set, reads every word back
// comparing it with the pattern, checks that the empty flag is set, then
// repeats with the inverted pattern so every cell holds both values. `done`
// rises when both passes end and `pass` tells whether no compare or flag
// check failed. Both stay until `start` falls, which hands the FIFO back.
// One FIFO operation per clock: a test takes about 4*DEPTH cycles.
module fifo_bist #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         active,    // controller owns the FIFO ports
  output logic         f_clear,
  output logic         f_push,
  output logic [W-1:0] f_wdata,
  output logic         f_pop,
  input  logic [W-1:0] f_rdata,
  input  logic         f_empty,
  input  logic         f_full,
  output logic         done,
  output logic         pass
);

  typedef enum logic [2:0] {B_IDLE, B_CLEAR, B_FILL, B_CHKFULL, B_DRAIN, B_CHKEMPTY, B_DONE} bst_e;

  bst_e                       st;
  logic                       phase;
  logic [$clog2(DEPTH+1)-1:0] idx;
  logic                       err;

  function automatic logic [W-1:0] pattern(input logic [$clog2(DEPTH+1)-1:0] i, input logic ph);
    logic [W-1:0] p;
    p = W'(i) ^ {(W+1)/2{2'b01}}[W-1:0];
    return ph ? ~p : p;
  endfunction

  assign active  = (st != B_IDLE);
  assign f_clear = (st == B_CLEAR);
  assign f_push  = (st == B_FILL);
  assign f_wdata = pattern(idx, phase);
  assign f_pop   = (st == B_DRAIN);
  assign done    = (st == B_DONE);
  assign pass    = done && !err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= B_IDLE;
      phase <= 1'b0;
      idx   <= '0;
      err   <= 1'b0;
    end else begin
      unique case (st)
        B_IDLE: if (start) begin
          st    <= B_CLEAR;
          phase <= 1'b0;
          err   <= 1'b0;
        end
        B_CLEAR: begin
          idx <= '0;
          st  <= B_FILL;
        end
        B_FILL: begin
          idx <= idx + 1'b1;
          if (idx == ($clog2(DEPTH+1))'(DEPTH-1)) st <= B_CHKFULL;
        end
        B_CHKFULL: begin
          if (!f_full) err <= 1'b1;
          idx <= '0;
          st  <= B_DRAIN;
        end
        B_DRAIN: begin
          if (f_empty || f_rdata != pattern(idx, phase)) err <= 1'b1;
          idx <= idx + 1'b1;
          if (idx == ($clog2(DEPTH+1))'(DEPTH-1)) st <= B_CHKEMPTY;
        end
        B_CHKEMPTY: begin
          if (!f_empty) err <= 1'b1;
          if (phase) st <= B_DONE;
          else begin
            phase <= 1'b1;
            idx   <= '0;
            st    <= B_FILL;
          end
        end
        B_DONE: if (!start) st <= B_IDLE;
        default: st <= B_IDLE;
      endcase
    end
  end

endmodule
