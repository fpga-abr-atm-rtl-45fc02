// cong_ack_handler: collects the outcome of every cell the bus device sent
// (acknowledged or not, and whether the destination reported congestion)
// and presents the outcomes to the sender, oldest first.
//
// The bus device side reports one outcome per cycle with `res_valid`,
// `res_ack` and `res_cong`. The outcomes are kept in a small FIFO of
// (congestion, nack) pairs, nack being the inverse of the acknowledge; the
// head is shown on `cb_avail`/`cb_cong`/`cb_nack` and removed by the sender's
// one-cycle `cb_clear`. `overflow` rises for good if an outcome arrives while
// the FIFO is full; with the sender allowing at most HIST_DEPTH cells on the
// way this does not happen. `pending` counts the stored outcomes. The
// document names this block and what it hands to the sender; the FIFO and
// the pin-level interface on the bus side are this design's choices.
module cong_ack_handler
  import abr_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          aclr,
  // bus device
  input  logic          res_valid,
  input  logic          res_ack,
  input  logic          res_cong,
  // sender
  output logic          cb_avail,
  output logic          cb_cong,
  output logic          cb_nack,
  input  logic          cb_clear,
  output logic [CW-1:0] pending,
  output logic          overflow
);
  congnack_t head;
  logic      empty, ovf_pulse;

  sync_fifo #(.WIDTH($bits(congnack_t)), .DEPTH(DEPTH)) u_fifo (
    .clk(clk), .aclr(aclr),
    .wrreq(res_valid), .wdata(congnack_t'{cong: res_cong, nack: !res_ack}),
    .rdreq(cb_clear && !empty), .rdata(head),
    .empty(empty), .full(), .count(pending), .overflow(ovf_pulse));

  assign cb_avail = !empty;
  assign cb_cong  = head.cong;
  assign cb_nack  = head.nack;

  always_ff @(posedge clk or posedge aclr) begin
    if (aclr) overflow <= 1'b0;
    else if (ovf_pulse) overflow <= 1'b1;
  end

  a_clear_when_avail: assert property (@(posedge clk) disable iff (aclr) cb_clear |-> cb_avail);
endmodule
