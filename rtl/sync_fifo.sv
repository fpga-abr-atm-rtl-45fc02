// sync_fifo: single-clock first-in first-out buffer with an occupancy count.
//
// Used for the eligible FIFO of the scheduler, the free cell pointer and cell
// history FIFOs of the sender and the 64-bit cell enqueue/dequeue FIFOs.
// DEPTH need not be a power of two. A write when full is dropped and flagged
// on `overflow` for one cycle (the document notes that a lost free pointer
// leaves its memory unusable until reset, so the drop is made visible). A read
// when empty does nothing. `rdata` is the head entry (show-ahead), valid
// whenever `empty` is low; a read and a write may happen in the same cycle.
// Pointers and count are cleared by the asynchronous clear `aclr`.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned CW = $clog2(DEPTH + 1),
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             aclr,
  input  logic             wrreq,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rdreq,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [CW-1:0]    count,
  output logic             overflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign do_rd = rdreq && !empty;
  assign do_wr = wrreq && !full;
  assign rdata = mem[rptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or posedge aclr) begin
    if (aclr) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wrreq && full;
      if (do_wr) wptr <= inc(wptr);
      if (do_rd) rptr <= inc(rptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

endmodule
