// scheduler: polling-like weighted round-robin scheduler of ABR flow groups.
//
// A flow-group counter visits the N_FG flow groups one per clock, so one
// virtual-time unit is N_FG cycles and the virtual time advances each time the
// counter wraps. Every visited group goes through a fixed four-stage pipeline:
//   stage 1  the group id is the common read address of the five memories
//   stage 2  the memories latch their data out (registered-address,
//            registered-output dual-port memories)
//   stage 3  eligibility and the next service time / back-off values are
//            computed from the memory outputs
//   stage 4  service time and back-off memories are written and, if the
//            group is eligible, its id is pushed into the eligible FIFO.
// A group whose service time (integer part) equals the virtual time gets a new
// service time, old + interval (mod 2^SI_W). If its back-off counter is not
// zero the counter is decremented and the group is skipped; otherwise it is
// eligible when it is not empty or holds a failed transmission (nack). On an
// eligible service the back-off exponent is raised by one if the group is
// congested and lowered by one otherwise, and the counter is reloaded with
// 2^exponent - 1 skips, so the service rate is halved or doubled.
//
// Eligible FIFO: ELIG_DEPTH entries. When its count reaches the stall threshold
// (ELIG_DEPTH-1) the scheduler stalls: the check in stage 4 still completes,
// the checks behind it are flushed, and the flow-group counter and virtual time
// are wound back to the oldest flushed group, so scheduling resumes as if the
// pipeline had never stopped once the count falls to the initiate threshold
// (ELIG_DEPTH/2). All groups are therefore slowed in proportion to their speed.
//
// Initialisation: after `aclr` the block sweeps all memories for N_FG cycles
// (interval 1.0 = fastest speed, service time 0, back off 0, empty, no
// congestion, no nack) and starts scheduling N_FG+3 cycles after aclr;
// `init_done` rises then. Updates arriving before that are ignored.
//
// Write ports: service interval (CPU interface), empty flag (queue manager),
// congestion/nack flags (sender); each may be written in any cycle.
//
// From the document: the memories, the 4-stage pipeline, the update formula,
// the eligibility rule (Figure 13), stall/initiate thresholds, exponential back
// off/restore and the initial values. This design's own choices: the widths,
// the exponent encoding of the back-off amount, the rewind on a stall and the
// event outputs for monitoring.
module scheduler
  import abr_pkg::*;
#(
  parameter int unsigned N_FG       = 128,
  parameter int unsigned ELIG_DEPTH = 10,
  parameter int unsigned STALL_TH   = ELIG_DEPTH - 1,
  parameter int unsigned INIT_TH    = ELIG_DEPTH / 2,
  localparam int unsigned FGW = (N_FG > 1) ? $clog2(N_FG) : 1,
  localparam int unsigned ECW = $clog2(ELIG_DEPTH + 1)
) (
  input  logic                clk,
  input  logic                aclr,
  output logic                init_done,
  // service interval updates (CPU interface)
  input  logic                si_wr,
  input  logic [FGW-1:0]      si_wraddr,
  input  logic [SI_W-1:0]     si_wrdata,
  // empty flag updates (queue manager), 1 = no cell in the flow group
  input  logic                em_wr,
  input  logic [FGW-1:0]      em_wraddr,
  input  logic                em_wrdata,
  // congestion / nack updates (sender)
  input  logic                cn_wr,
  input  logic [FGW-1:0]      cn_wraddr,
  input  congnack_t           cn_wrdata,
  // eligible FIFO read port (sender)
  input  logic                elig_rdreq,
  output logic [FGW-1:0]      elig_fgid,
  output logic                elig_empty,
  output logic [ECW-1:0]      elig_count,
  // monitoring
  output logic [SI_INT_W-1:0] vtime,
  output logic                stalled,
  output logic                ev_stall,     // pulse: scheduler entered stall
  output logic                ev_backoff,   // pulse: a due service was skipped for back off
  output logic                ev_elig       // pulse: a group id was enqueued
);

  typedef enum logic [1:0] {ST_INIT, ST_NORMAL, ST_STALLED} state_e;
  state_e state;

  localparam logic [BO_W-1:0] BO_MAX_EXP = BO_W[BO_W-1:0];

  // ---------------- memories ----------------
  logic [SI_W-1:0] si_mem [N_FG];
  logic [SI_W-1:0] st_mem [N_FG];
  backoff_t        bo_mem [N_FG];
  logic            em_mem [N_FG];
  congnack_t       cn_mem [N_FG];

  logic [FGW-1:0]  init_cnt;
  logic [FGW+1:0]  init_cyc;
  logic            init_wr;

  // stage-4 write port of service time / back off
  logic            s4_valid, s4_hit, s4_elig;
  logic [FGW-1:0]  s4_fg;
  logic [SI_W-1:0] s4_new_st;
  backoff_t        s4_new_bo;

  assign init_wr = (state == ST_INIT) && (init_cyc < (FGW+2)'(N_FG));

  always_ff @(posedge clk) begin
    if (init_wr) begin
      si_mem[init_cnt] <= SI_ONE;
      st_mem[init_cnt] <= '0;
      bo_mem[init_cnt] <= '0;
      em_mem[init_cnt] <= 1'b1;
      cn_mem[init_cnt] <= '0;
    end else if (state != ST_INIT) begin
      if (si_wr) si_mem[si_wraddr] <= si_wrdata;
      if (em_wr) em_mem[em_wraddr] <= em_wrdata;
      if (cn_wr) cn_mem[cn_wraddr] <= cn_wrdata;
      if (s4_valid && s4_hit) begin
        st_mem[s4_fg] <= s4_new_st;
        bo_mem[s4_fg] <= s4_new_bo;
      end
    end
  end

  // ---------------- stage 1: counters ----------------
  logic [FGW-1:0]      fg_cnt;
  logic [SI_INT_W-1:0] vt;
  logic                stall_now;

  // registered read address and registered outputs of the memories
  logic [FGW-1:0]  rd_addr_q;
  logic [SI_W-1:0] si_q, st_q;
  backoff_t        bo_q;
  logic            em_q;
  congnack_t       cn_q;

  logic                s2_valid, s3_valid;
  logic [FGW-1:0]      s2_fg, s3_fg;
  logic [SI_INT_W-1:0] s2_vt, s3_vt;

  assign stall_now = (state == ST_NORMAL) && (elig_count >= ECW'(STALL_TH));

  always_ff @(posedge clk) begin
    rd_addr_q <= fg_cnt;
    si_q <= si_mem[rd_addr_q];
    st_q <= st_mem[rd_addr_q];
    bo_q <= bo_mem[rd_addr_q];
    em_q <= em_mem[rd_addr_q];
    cn_q <= cn_mem[rd_addr_q];
  end

  // ---------------- stage 3: eligibility ----------------
  logic            s3_hit, s3_elig, s3_skip;
  logic [SI_W-1:0] s3_new_st;
  backoff_t        s3_new_bo;
  logic [BO_W-1:0] s3_exp;

  always_comb begin
    s3_hit    = s3_valid && (st_q[SI_W-1:SI_FRAC_W] == s3_vt);
    s3_new_st = st_q + si_q;
    s3_new_bo = bo_q;
    s3_elig   = 1'b0;
    s3_skip   = 1'b0;
    s3_exp    = bo_q.amount;
    if (s3_hit) begin
      if (bo_q.counter != '0) begin
        s3_new_bo.counter = bo_q.counter - 1'b1;
        s3_skip = 1'b1;
      end else if (cn_q.nack || !em_q) begin
        s3_elig = 1'b1;
        if (cn_q.cong) s3_exp = (bo_q.amount < BO_MAX_EXP) ? bo_q.amount + 1'b1 : BO_MAX_EXP;
        else           s3_exp = (bo_q.amount != '0) ? bo_q.amount - 1'b1 : '0;
        s3_new_bo.amount  = s3_exp;
        s3_new_bo.counter = BO_W'((BO_W+1)'(1) << s3_exp) - BO_W'(1);
      end
    end
  end

  // ---------------- pipeline and control ----------------
  always_ff @(posedge clk or posedge aclr) begin
    if (aclr) begin
      state     <= ST_INIT;
      init_cnt  <= '0;
      init_cyc  <= '0;
      fg_cnt    <= '0;
      vt        <= '0;
      s2_valid  <= 1'b0;
      s3_valid  <= 1'b0;
      s4_valid  <= 1'b0;
      s2_fg     <= '0;
      s3_fg     <= '0;
      s4_fg     <= '0;
      s2_vt     <= '0;
      s3_vt     <= '0;
      s4_hit    <= 1'b0;
      s4_elig   <= 1'b0;
      s4_new_st <= '0;
      s4_new_bo <= '0;
      ev_stall  <= 1'b0;
      ev_backoff <= 1'b0;
    end else begin
      ev_stall   <= 1'b0;
      ev_backoff <= s3_skip;
      // stage 3 -> 4
      s4_valid  <= s3_valid && !stall_now;
      s4_fg     <= s3_fg;
      s4_hit    <= s3_hit;
      s4_elig   <= s3_elig;
      s4_new_st <= s3_new_st;
      s4_new_bo <= s3_new_bo;
      if (stall_now) ev_backoff <= 1'b0;
      // stage 2 -> 3
      s3_valid <= s2_valid && !stall_now;
      s3_fg    <= s2_fg;
      s3_vt    <= s2_vt;
      // stage 1 -> 2
      s2_valid <= (state == ST_NORMAL) && !stall_now;
      s2_fg    <= fg_cnt;
      s2_vt    <= vt;

      unique case (state)
        ST_INIT: begin
          init_cyc <= init_cyc + 1'b1;
          if (init_cnt != FGW'(N_FG - 1)) init_cnt <= init_cnt + 1'b1;
          if (init_cyc == (FGW+2)'(N_FG + 2)) begin
            state  <= ST_NORMAL;
            fg_cnt <= '0;
            vt     <= '0;
          end
        end
        ST_NORMAL: begin
          if (stall_now) begin
            state    <= ST_STALLED;
            ev_stall <= 1'b1;
            // wind the counters back to the oldest check that is flushed
            if (s3_valid) begin
              fg_cnt <= s3_fg;
              vt     <= s3_vt;
            end else if (s2_valid) begin
              fg_cnt <= s2_fg;
              vt     <= s2_vt;
            end
          end else if (fg_cnt == FGW'(N_FG - 1)) begin
            fg_cnt <= '0;
            vt     <= vt + 1'b1;
          end else begin
            fg_cnt <= fg_cnt + 1'b1;
          end
        end
        ST_STALLED: begin
          if (elig_count <= ECW'(INIT_TH)) state <= ST_NORMAL;
        end
        default: state <= ST_INIT;
      endcase
    end
  end

  // ---------------- eligible FIFO ----------------
  logic elig_full, elig_ovf;

  sync_fifo #(.WIDTH(FGW), .DEPTH(ELIG_DEPTH)) u_elig (
    .clk      (clk),
    .aclr     (aclr),
    .wrreq    (s4_valid && s4_elig),
    .wdata    (s4_fg),
    .rdreq    (elig_rdreq),
    .rdata    (elig_fgid),
    .empty    (elig_empty),
    .full     (elig_full),
    .count    (elig_count),
    .overflow (elig_ovf)
  );

  assign ev_elig   = s4_valid && s4_elig;
  assign init_done = (state != ST_INIT);
  assign stalled   = (state == ST_STALLED);
  assign vtime     = vt;

  // The stall threshold keeps the eligible FIFO from overflowing.
  a_no_elig_overflow: assert property (@(posedge clk) disable iff (aclr)
    !(s4_valid && s4_elig && elig_full && !elig_rdreq));

endmodule
