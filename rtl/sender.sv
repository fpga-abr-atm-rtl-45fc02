// sender: turns eligible flow-group ids into queue-manager requests and cell
// transmissions, and interprets the bus results.
//
// For every flow group a status memory keeps a 22-bit cell pointer and a
// 2-bit pointer status (invalid / valid / unknown). The memory is 16 bits
// wide and holds each entry in two consecutive words: the even word carries
// the status bits with the six low pointer bits, the odd word the sixteen
// high pointer bits, so changing a status is a read-modify-write.
//
// The FSM (numbered states follow the document's sender FSM) has two hubs:
//  SERVE (2): re-check a group waiting on an unknown status (priority 1) or
//    pop the eligible FIFO (priority 2), read the two status words; status
//    unknown -> remember the group and retry later (the cell's bus result is
//    pending); invalid -> dequeue request with the group id; valid -> cell
//    read request with the kept pointer (retransmission). One queue-manager
//    request is outstanding at a time.
//  FWD (3): in priority order
//    P1 control/RM cell available and forwarder ready: push a control entry
//       in the cell history FIFO and start the forwarder (16),
//    P2 queue-manager request done and forwarder ready: write status unknown
//       and the pointer (14, 15), start the forwarder, push the group id in
//       the cell history FIFO; a dequeue that failed only marks the pointer
//       invalid,
//    P3 bus result available: pop the cell history (9); results of control
//       cells are ignored; for a data cell the scheduler is told the
//       congestion and nack bits, a nack marks the pointer valid (retransmit),
//       an ack marks it invalid and pushes the pointer in the free cell
//       pointer FIFO, which the queue manager reads,
//    P4 no request outstanding: go to SERVE.
// Issuing a request costs six cycles, a bus result about six and starting the
// forwarder three, as the document reports. After aclr the FSM invalidates all
// N_FG status entries (N_FG cycles) before it serves.
//
// Queue-manager handshake (from the document): the sender raises opavail with
// op and operand; the queue manager clears opavail (qm_take) no later than
// it reports completion (qm_done with opvalid and the dequeued pointer), which
// sets the internal opdone flag; the sender clears opdone before the next
// request. Forwarder handshake: fw_start pulse with cltype; fw_ready high when
// idle. Bus results: cb_avail with cb_cong / cb_nack, consumed by a cb_clear
// pulse. FIFO sizes (seven entries) follow the document's remark on
// logic-cell FIFOs; the memory layout follows the document's figures; the
// rest of the encoding is this design's.
module sender
  import abr_pkg::*;
#(
  parameter int unsigned N_FG       = 128,
  parameter int unsigned FREE_DEPTH = 7,
  parameter int unsigned HIST_DEPTH = 7,
  localparam int unsigned FGW = (N_FG > 1) ? $clog2(N_FG) : 1
) (
  input  logic             clk,
  input  logic             aclr,
  output logic             init_done,
  // eligible FIFO of the scheduler
  output logic             elig_rdreq,
  input  logic [FGW-1:0]   elig_fgid,
  input  logic             elig_empty,
  // congestion / nack updates to the scheduler
  output logic             cn_wr,
  output logic [FGW-1:0]   cn_wraddr,
  output congnack_t        cn_wrdata,
  // queue manager requests
  output logic             qm_opavail,
  output qm_op_e           qm_op,
  output logic [PTR_W-1:0] qm_operand,   // flow group id (dequeue) or pointer (read)
  input  logic             qm_take,      // queue manager clears opavail
  input  logic             qm_done,      // queue manager sets opdone
  input  logic             qm_opvalid,
  input  logic [PTR_W-1:0] qm_deqptr,
  // free cell pointer FIFO, read by the queue manager
  input  logic             free_rdreq,
  output logic [PTR_W-1:0] free_ptr,
  output logic             free_empty,
  output logic             free_overflow,
  // forwarder
  input  logic             fw_ready,
  output logic             fw_start,
  output cell_type_e       fw_cltype,
  input  logic             ctrl_avail,   // a control/RM cell waits to be sent
  // bus results (cong/ack handler)
  input  logic             cb_avail,
  input  logic             cb_cong,
  input  logic             cb_nack,
  output logic             cb_clear,
  // monitoring pulses
  output logic             ev_retx,      // a cell read (retransmission) request was issued
  output logic             ev_wait_unknown,  // a group was held on unknown status
  output logic             ev_deq_fail   // a dequeue request found no cell
);

  typedef enum logic [4:0] {
    S1_INIT, S2_SERVE, S3_FWD, S5_RDLO, S6_RDHI, S7_DECIDE, S8_ISSUE,
    S9_CBDEQ, S10_CBCHK, S11_CBRDLO, S12_CBRDHI, S13_CBWR,
    S14_WRLO, S15_WRHI, S16_CTRL
  } state_e;
  state_e state;

  // ---------------- status memory: 2 x N_FG words of 16 bits ----------------
  logic [15:0]    sm [2*N_FG];
  logic [FGW:0]   sm_raddr, sm_waddr;
  logic [15:0]    sm_rdata, sm_wdata;
  logic           sm_we;

  always_ff @(posedge clk) begin
    if (sm_we) sm[sm_waddr] <= sm_wdata;
  end
  assign sm_rdata = sm[sm_raddr];

  function automatic logic [15:0] lo_word(input logic [PTR_W-1:0] p, input ptr_status_e s);
    return {8'h00, p[5:0], s};
  endfunction

  // ---------------- FIFOs ----------------
  logic             hist_wr, hist_rd, hist_empty, hist_full, hist_ovf;
  logic [FGW:0]     hist_wdata, hist_rdata;
  logic [$clog2(HIST_DEPTH+1)-1:0] hist_count;
  logic             free_wr, free_full;
  logic [PTR_W-1:0] free_wdata;
  logic [$clog2(FREE_DEPTH+1)-1:0] free_count;

  sync_fifo #(.WIDTH(FGW+1), .DEPTH(HIST_DEPTH)) u_hist (
    .clk(clk), .aclr(aclr), .wrreq(hist_wr), .wdata(hist_wdata), .rdreq(hist_rd),
    .rdata(hist_rdata), .empty(hist_empty), .full(hist_full), .count(hist_count),
    .overflow(hist_ovf));

  sync_fifo #(.WIDTH(PTR_W), .DEPTH(FREE_DEPTH)) u_free (
    .clk(clk), .aclr(aclr), .wrreq(free_wr), .wdata(free_wdata), .rdreq(free_rdreq),
    .rdata(free_ptr), .empty(free_empty), .full(free_full), .count(free_count),
    .overflow(free_overflow));

  // ---------------- registers ----------------
  logic [FGW-1:0]   init_cnt;
  logic             unk_pend;          // a group is held on unknown status
  logic [FGW-1:0]   sv_fg;             // group being served
  logic [15:0]      sv_lo;
  logic             qmop_pending;      // request issued, completion not consumed
  logic             opdone, opvalid;
  logic [PTR_W-1:0] deqptr;
  qm_op_e           q_op;
  logic [FGW-1:0]   q_fg;
  logic [PTR_W-1:0] q_ptr;
  logic [PTR_W-1:0] tx_ptr;
  logic             cb_c, cb_n;
  logic [FGW:0]     cb_ent;
  logic [15:0]      cb_lo;
  logic [PTR_W-1:0] cb_ptr;

  ptr_status_e sv_status;
  assign sv_status = ptr_status_e'(sv_lo[1:0]);

  // combinational outputs and memory controls
  always_comb begin
    elig_rdreq = 1'b0;
    hist_wr    = 1'b0;
    hist_wdata = '0;
    hist_rd    = 1'b0;
    free_wr    = 1'b0;
    free_wdata = cb_ptr;
    sm_we      = 1'b0;
    sm_waddr   = '0;
    sm_wdata   = '0;
    fw_start   = 1'b0;
    fw_cltype  = CL_DATA;
    cb_clear   = 1'b0;
    unique case (state)
      S1_INIT: begin
        sm_we    = 1'b1;
        sm_waddr = {init_cnt, 1'b0};
        sm_wdata = lo_word('0, PS_INVALID);
      end
      S2_SERVE: elig_rdreq = !unk_pend && !elig_empty;
      S16_CTRL: begin
        hist_wr    = 1'b1;
        hist_wdata = {1'b1, FGW'(0)};
        fw_start   = 1'b1;
        fw_cltype  = CL_CTRL;
      end
      S14_WRLO: begin
        sm_we    = 1'b1;
        sm_waddr = {q_fg, 1'b0};
        sm_wdata = (q_op == QM_DEQUEUE && !opvalid) ? lo_word(q_ptr, PS_INVALID)
                                                    : lo_word(tx_ptr, PS_UNKNOWN);
      end
      S15_WRHI: begin
        sm_we      = 1'b1;
        sm_waddr   = {q_fg, 1'b1};
        sm_wdata   = tx_ptr[PTR_W-1:6];
        fw_start   = 1'b1;
        fw_cltype  = CL_DATA;
        hist_wr    = 1'b1;
        hist_wdata = {1'b0, q_fg};
      end
      S9_CBDEQ: begin
        hist_rd  = 1'b1;
        cb_clear = 1'b1;
      end
      S13_CBWR: begin
        sm_we    = 1'b1;
        sm_waddr = {cb_ent[FGW-1:0], 1'b0};
        sm_wdata = lo_word(cb_ptr, cb_n ? PS_VALID : PS_INVALID);
        free_wr  = !cb_n;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or posedge aclr) begin
    if (aclr) begin
      state        <= S1_INIT;
      init_cnt     <= '0;
      unk_pend     <= 1'b0;
      sv_fg        <= '0;
      sv_lo        <= '0;
      sm_raddr     <= '0;
      qmop_pending <= 1'b0;
      opdone       <= 1'b0;
      opvalid      <= 1'b0;
      deqptr       <= '0;
      qm_opavail   <= 1'b0;
      qm_op        <= QM_DEQUEUE;
      qm_operand   <= '0;
      q_op         <= QM_DEQUEUE;
      q_fg         <= '0;
      q_ptr        <= '0;
      tx_ptr       <= '0;
      cb_c         <= 1'b0;
      cb_n         <= 1'b0;
      cb_ent       <= '0;
      cb_lo        <= '0;
      cb_ptr       <= '0;
      cn_wr        <= 1'b0;
      cn_wraddr    <= '0;
      cn_wrdata    <= '0;
      ev_retx      <= 1'b0;
      ev_wait_unknown <= 1'b0;
      ev_deq_fail  <= 1'b0;
    end else begin
      cn_wr           <= 1'b0;
      ev_retx         <= 1'b0;
      ev_wait_unknown <= 1'b0;
      ev_deq_fail     <= 1'b0;
      // queue-manager side of the handshake flags
      if (qm_take) qm_opavail <= 1'b0;
      if (qm_done) begin
        opdone  <= 1'b1;
        opvalid <= qm_opvalid;
        deqptr  <= qm_deqptr;
      end

      unique case (state)
        S1_INIT: begin
          if (init_cnt == FGW'(N_FG - 1)) state <= S2_SERVE;
          else init_cnt <= init_cnt + 1'b1;
        end
        S2_SERVE: begin
          if (unk_pend) begin
            sm_raddr <= {sv_fg, 1'b0};
            state    <= S5_RDLO;
          end else if (!elig_empty) begin
            sv_fg    <= elig_fgid;
            sm_raddr <= {elig_fgid, 1'b0};
            state    <= S5_RDLO;
          end else begin
            state <= S3_FWD;
          end
        end
        S5_RDLO: begin
          sv_lo    <= sm_rdata;
          sm_raddr <= {sv_fg, 1'b1};
          state    <= S6_RDHI;
        end
        S6_RDHI: begin
          q_ptr <= {sm_rdata, sv_lo[7:2]};
          state <= S7_DECIDE;
        end
        S7_DECIDE: begin
          if (sv_status == PS_UNKNOWN) begin
            unk_pend        <= 1'b1;
            ev_wait_unknown <= !unk_pend;
            state           <= S3_FWD;
          end else begin
            unk_pend <= 1'b0;
            state    <= S8_ISSUE;
          end
        end
        S8_ISSUE: begin
          q_fg         <= sv_fg;
          q_op         <= (sv_status == PS_VALID) ? QM_READ : QM_DEQUEUE;
          qm_op        <= (sv_status == PS_VALID) ? QM_READ : QM_DEQUEUE;
          qm_operand   <= (sv_status == PS_VALID) ? q_ptr : PTR_W'(sv_fg);
          qm_opavail   <= 1'b1;
          qmop_pending <= 1'b1;
          ev_retx      <= (sv_status == PS_VALID);
          state        <= S3_FWD;
        end
        S3_FWD: begin
          if (ctrl_avail && fw_ready && !hist_full) begin
            state <= S16_CTRL;
          end else if (opdone && fw_ready && !hist_full) begin
            tx_ptr <= (q_op == QM_DEQUEUE) ? deqptr : q_ptr;
            state  <= S14_WRLO;
          end else if (cb_avail) begin
            cb_c  <= cb_cong;
            cb_n  <= cb_nack;
            state <= S9_CBDEQ;
          end else if (!qmop_pending) begin
            state <= S2_SERVE;
          end
        end
        S16_CTRL: state <= S3_FWD;
        S14_WRLO: begin
          opdone       <= qm_done;   // a completion in this very cycle is kept
          qmop_pending <= 1'b0;
          if (q_op == QM_DEQUEUE && !opvalid) begin
            ev_deq_fail <= 1'b1;
            state       <= S3_FWD;
          end else begin
            state <= S15_WRHI;
          end
        end
        S15_WRHI: state <= S3_FWD;
        S9_CBDEQ: begin
          cb_ent <= hist_rdata;
          state  <= S10_CBCHK;
        end
        S10_CBCHK: begin
          if (cb_ent[FGW]) begin
            state <= S3_FWD;             // control cell: result ignored
          end else begin
            sm_raddr <= {cb_ent[FGW-1:0], 1'b0};
            state    <= S11_CBRDLO;
          end
        end
        S11_CBRDLO: begin
          cb_lo    <= sm_rdata;
          sm_raddr <= {cb_ent[FGW-1:0], 1'b1};
          state    <= S12_CBRDHI;
        end
        S12_CBRDHI: begin
          cb_ptr    <= {sm_rdata, cb_lo[7:2]};
          cn_wr     <= 1'b1;
          cn_wraddr <= cb_ent[FGW-1:0];
          cn_wrdata <= '{cong: cb_c, nack: cb_n};
          state     <= S13_CBWR;
        end
        S13_CBWR: state <= S3_FWD;
        default: state <= S1_INIT;
      endcase
    end
  end

  assign init_done = (state != S1_INIT);

  // The bus returns one result per cell handed to the forwarder.
  a_result_has_history: assert property (@(posedge clk) disable iff (aclr)
    (state == S9_CBDEQ) |-> !hist_empty);
  // The sender issues a new request only after the previous one completed.
  a_one_request: assert property (@(posedge clk) disable iff (aclr)
    (state == S8_ISSUE) |-> !qmop_pending);

endmodule
