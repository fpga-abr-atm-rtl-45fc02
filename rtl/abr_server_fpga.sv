// abr_server_fpga: the FPGA of the ABR server card of an ATM switch. It
// schedules the aggregated ABR flow groups of the switch's output links,
// asks the queue manager for their cells, sends the cells over the bus device
// (a CellBus access chip) and retransmits those the bus refused, while
// passing RM cells between the bus and the cell processor.
//
// Data flow:
//  scheduler -> eligible FIFO -> sender -> queue-manager request
//  queue manager -> 64-bit cell dequeue FIFO -> forwarder -> 16-bit utopia
//    transmitter -> bus device
//  bus device results -> cong/ack handler -> sender -> scheduler
//    (congestion, nack) and free cell pointer FIFO -> queue manager
//  bus device -> 16-bit utopia receiver -> demux -> 64-bit cell enqueue FIFO
//    -> queue manager, or RM cells -> 8-bit utopia transmitter -> cell
//    processor
//  cell processor -> 8-bit utopia receiver -> forwarder (control/RM cells,
//    sent before data cells)
//
// The queue manager with its SDRAM controller, the CPU interface and the
// external chips are not part of this module: their connections are ports.
// CPU side: service-interval writes and the RM routing switch. Queue-manager
// side: empty-flag writes, the request handshake, the free-pointer FIFO read
// port, the enqueue FIFO read port and the dequeue FIFO write port. Bus
// device side: the two 16-bit utopia links and a per-cell result strobe.
// Cell processor side: the two 8-bit utopia links. Everything but the four
// utopia link clocks runs on `clk`; `aclr` clears all and starts the
// self-initialisation of the scheduler and the sender (N_FG + 3 cycles).
// Block partition and connections follow the document; the result strobe,
// the monitoring outputs and the FIFO sizes not given there are this
// design's choices.
module abr_server_fpga
  import abr_pkg::*;
#(
  parameter int unsigned N_FG        = 128,
  parameter int unsigned ELIG_DEPTH  = 10,
  parameter int unsigned FREE_DEPTH  = 7,
  parameter int unsigned HIST_DEPTH  = 7,
  parameter int unsigned RES_DEPTH   = 8,
  parameter int unsigned CELLQ_DEPTH = 256,
  parameter int unsigned UTOPIA_WORDS = 256,
  localparam int unsigned FGW = (N_FG > 1) ? $clog2(N_FG) : 1,
  localparam int unsigned QCW = $clog2(CELLQ_DEPTH + 1)
) (
  input  logic                clk,
  input  logic                aclr,
  output logic                init_done,
  // CPU interface
  input  logic                si_wr,
  input  logic [FGW-1:0]      si_wraddr,
  input  logic [SI_W-1:0]     si_wrdata,
  input  logic                rm_to_cp,
  // queue manager
  input  logic                em_wr,
  input  logic [FGW-1:0]      em_wraddr,
  input  logic                em_wrdata,
  output logic                qm_opavail,
  output qm_op_e              qm_op,
  output logic [PTR_W-1:0]    qm_operand,
  input  logic                qm_take,
  input  logic                qm_done,
  input  logic                qm_opvalid,
  input  logic [PTR_W-1:0]    qm_deqptr,
  input  logic                free_rdreq,
  output logic [PTR_W-1:0]    free_ptr,
  output logic                free_empty,
  input  logic                enq_rdreq,
  output logic [63:0]         enq_data,
  output logic                enq_empty,
  input  logic                dq_wrreq,
  input  logic [63:0]         dq_data,
  output logic [QCW-1:0]      dq_count,
  // bus device: per-cell transmission result
  input  logic                res_valid,
  input  logic                res_ack,
  input  logic                res_cong,
  // bus device: 16-bit utopia, cells towards the bus
  input  logic                ciclk,
  output logic                ciclav,
  input  logic                cienb_n,
  output logic                cisoc,
  output logic [15:0]         cidata,
  // bus device: 16-bit utopia, cells from the bus
  input  logic                coclk,
  output logic                coclav,
  input  logic                coenb_n,
  input  logic                cosoc,
  input  logic [15:0]         codata,
  // cell processor: 8-bit utopia, RM cells towards it
  input  logic                txclk,
  input  logic                txclav,
  output logic                txenb_n,
  output logic                txsoc,
  output logic [7:0]          txdata,
  // cell processor: 8-bit utopia, control/RM cells from it
  input  logic                rxclk,
  input  logic                rxclav,
  output logic                rxenb_n,
  input  logic                rxsoc,
  input  logic [7:0]          rxdata,
  // monitoring
  output logic [SI_INT_W-1:0] vtime,
  output logic [$clog2(ELIG_DEPTH+1)-1:0] elig_count,
  output logic                stalled,
  output logic                ev_stall,
  output logic                ev_backoff,
  output logic                ev_elig,
  output logic                ev_retx,
  output logic                ev_wait_unknown,
  output logic                ev_deq_fail,
  output logic                ev_ctrl_cell,
  output logic                ev_rm_cell,
  output logic                ev_data_cell,
  output logic                socerr_bus,
  output logic                socerr_cp,
  output logic                overflow
);
  // scheduler <-> sender
  logic                          sch_init_done, snd_init_done;
  logic                          elig_rdreq, elig_empty;
  logic [FGW-1:0]                elig_fgid;
  logic                          cn_wr;
  logic [FGW-1:0]                cn_wraddr;
  congnack_t                     cn_wrdata;
  // sender <-> forwarder / cong-ack handler
  logic                          fw_ready, fw_start, ctrl_avail;
  cell_type_e                    fw_cltype;
  logic                          cb_avail, cb_cong, cb_nack, cb_clear;
  logic                          free_overflow, res_overflow;
  // cell FIFOs
  logic                          dq_rdreq, dq_empty, dq_ovf;
  logic [63:0]                   dq_rdata;
  logic                          enq_wrreq, enq_ovf;
  logic [63:0]                   enq_wdata;
  logic [QCW-1:0]                enq_count;
  // utopia internal sides
  logic                          tx_wrreq, tx_cellinc, tx_cellspc;
  logic [15:0]                   tx_data;
  logic                          rx_rdreq, rx_cellav, rx_celldec;
  logic [15:0]                   rx_data;
  logic                          tm_wrreq, tm_cellinc, tm_cellspc;
  logic [7:0]                    tm_data;
  logic                          rm_rdreq, rm_cellav, rm_celldec;
  logic [7:0]                    rm_data;

  assign init_done = sch_init_done && snd_init_done;

  scheduler #(.N_FG(N_FG), .ELIG_DEPTH(ELIG_DEPTH)) u_scheduler (
    .clk, .aclr, .init_done(sch_init_done),
    .si_wr, .si_wraddr, .si_wrdata,
    .em_wr, .em_wraddr, .em_wrdata,
    .cn_wr, .cn_wraddr, .cn_wrdata,
    .elig_rdreq, .elig_fgid, .elig_empty, .elig_count,
    .vtime, .stalled, .ev_stall, .ev_backoff, .ev_elig);

  sender #(.N_FG(N_FG), .FREE_DEPTH(FREE_DEPTH), .HIST_DEPTH(HIST_DEPTH)) u_sender (
    .clk, .aclr, .init_done(snd_init_done),
    .elig_rdreq, .elig_fgid, .elig_empty,
    .cn_wr, .cn_wraddr, .cn_wrdata,
    .qm_opavail, .qm_op, .qm_operand, .qm_take, .qm_done, .qm_opvalid, .qm_deqptr,
    .free_rdreq, .free_ptr, .free_empty, .free_overflow,
    .fw_ready, .fw_start, .fw_cltype, .ctrl_avail,
    .cb_avail, .cb_cong, .cb_nack, .cb_clear,
    .ev_retx, .ev_wait_unknown, .ev_deq_fail);

  cong_ack_handler #(.DEPTH(RES_DEPTH)) u_cong_ack (
    .clk, .aclr, .res_valid, .res_ack, .res_cong,
    .cb_avail, .cb_cong, .cb_nack, .cb_clear, .pending(), .overflow(res_overflow));

  sync_fifo #(.WIDTH(64), .DEPTH(CELLQ_DEPTH)) u_dequeue_fifo (
    .clk, .aclr, .wrreq(dq_wrreq), .wdata(dq_data), .rdreq(dq_rdreq), .rdata(dq_rdata),
    .empty(dq_empty), .full(), .count(dq_count), .overflow(dq_ovf));

  forwarder u_forwarder (
    .clk, .aclr, .fw_start, .fw_cltype, .fw_ready, .ctrl_avail,
    .dq_rdreq, .dq_data(dq_rdata), .dq_empty,
    .rm_rdreq, .rm_data, .rm_cellav, .rm_celldec,
    .cellspc(tx_cellspc), .cellinc(tx_cellinc), .tx_wrreq, .tx_data);

  utopia_phy_tx #(.FIFO_WORDS(UTOPIA_WORDS)) u_utopia_phy_tx (
    .clk, .reset(aclr), .wrreq(tx_wrreq), .data(tx_data), .cellinc(tx_cellinc),
    .cellspc(tx_cellspc), .ciclk, .ciclav, .cienb_n, .cisoc, .cidata);

  utopia_phy_rx #(.FIFO_WORDS(UTOPIA_WORDS)) u_utopia_phy_rx (
    .clk, .reset(aclr), .rdreq(rx_rdreq), .data(rx_data), .cellav(rx_cellav),
    .celldec(rx_celldec), .socerr(socerr_bus), .coclk, .coclav, .coenb_n, .cosoc, .codata);

  demux u_demux (
    .clk, .aclr, .rm_to_cp,
    .rx_rdreq, .rx_data, .rx_cellav, .rx_celldec,
    .tm_wrreq, .tm_data, .tm_cellspc, .tm_cellinc,
    .enq_wrreq, .enq_data(enq_wdata), .enq_room(enq_count <= QCW'(CELLQ_DEPTH - CELL_WORDS64)),
    .ev_rm_cell, .ev_data_cell);

  sync_fifo #(.WIDTH(64), .DEPTH(CELLQ_DEPTH)) u_enqueue_fifo (
    .clk, .aclr, .wrreq(enq_wrreq), .wdata(enq_wdata), .rdreq(enq_rdreq), .rdata(enq_data),
    .empty(enq_empty), .full(), .count(enq_count), .overflow(enq_ovf));

  utopia_atm_tx #(.FIFO_BYTES(UTOPIA_WORDS)) u_utopia_atm_tx (
    .clk, .reset(aclr), .wrreq(tm_wrreq), .data(tm_data), .cellinc(tm_cellinc),
    .cellspc(tm_cellspc), .txclk, .txclav, .txenb_n, .txsoc, .txdata);

  utopia_atm_rx #(.FIFO_BYTES(UTOPIA_WORDS)) u_utopia_atm_rx (
    .clk, .reset(aclr), .rdreq(rm_rdreq), .data(rm_data), .cellav(rm_cellav),
    .celldec(rm_celldec), .socerr(socerr_cp), .rxclk, .rxclav, .rxenb_n, .rxsoc, .rxdata);

  assign ev_ctrl_cell = fw_start && (fw_cltype == CL_CTRL);

  // sticky: any FIFO written while full
  always_ff @(posedge clk or posedge aclr) begin
    if (aclr) overflow <= 1'b0;
    else if (free_overflow || res_overflow || dq_ovf || enq_ovf) overflow <= 1'b1;
  end
endmodule
