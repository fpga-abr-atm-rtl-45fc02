// tb_sender: self-checking test of the sender with 8 flow groups. The test
// bench plays the eligible FIFO, the queue manager, the forwarder and the bus
// results. It checks: invalidation after reset, a new cell (dequeue request,
// forwarder start, ack -> pointer freed, scheduler told), a failed transmission
// (nack -> scheduler told, next service is a cell read of the same pointer),
// priority of control cells and that their bus results are ignored, holding a
// group whose last cell has no result yet, a dequeue that finds no cell, and
// the six-cycle cost of issuing a request; then 300 random services ($urandom)
// with random acks, congestion, control cells and empty dequeues, checked
// against a model of each group's pointer status.
`timescale 1ns/1ps
module tb_sender;
  import abr_pkg::*;
  localparam int N = 8;
  logic clk = 0, aclr = 0;
  initial #1 aclr = 1;
  always #5 clk = ~clk;

  logic init_done, elig_rdreq, elig_empty;
  logic [2:0] elig_fgid;
  logic cn_wr; logic [2:0] cn_wraddr; congnack_t cn_wrdata;
  logic qm_opavail; qm_op_e qm_op; logic [PTR_W-1:0] qm_operand;
  logic qm_take = 0, qm_done = 0, qm_opvalid = 0; logic [PTR_W-1:0] qm_deqptr = 0;
  logic free_rdreq = 0; logic [PTR_W-1:0] free_ptr; logic free_empty, free_overflow;
  logic fw_ready = 1, fw_start; cell_type_e fw_cltype; logic ctrl_avail;
  int ctrl_cnt = 0;
  assign ctrl_avail = (ctrl_cnt > 0);
  logic cb_avail, cb_cong, cb_nack, cb_clear;
  logic ev_retx, ev_wait_unknown, ev_deq_fail;

  sender #(.N_FG(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // eligible FIFO: the real FIFO block, written by the test at negedges
  logic e_wr = 0; logic [2:0] e_wdata = 0;
  logic e_full, e_ovf; logic [3:0] e_count;
  sync_fifo #(.WIDTH(3), .DEPTH(10)) u_elig (.clk(clk), .aclr(aclr), .wrreq(e_wr), .wdata(e_wdata),
    .rdreq(elig_rdreq), .rdata(elig_fgid), .empty(elig_empty), .full(e_full), .count(e_count), .overflow(e_ovf));
  task automatic push_elig(input int fg);
    @(negedge clk); e_wr = 1; e_wdata = 3'(fg);
    @(negedge clk); e_wr = 0;
  endtask

  // queue manager model: answers each request after a few cycles
  typedef struct { qm_op_e op; int operand; } req_t;
  req_t reqs[$];
  int   deq_ptr_next = 'h2A000;
  bit   deq_fail = 0;
  int   last_deq_ptr;
  int   req_time[$];
  initial begin
    forever begin
      @(posedge clk);
      if (qm_opavail) begin
        reqs.push_back('{qm_op, int'(qm_operand)});
        req_time.push_back($time / 10);
        @(negedge clk); qm_take = 1;
        @(negedge clk); qm_take = 0;
        repeat (3) @(negedge clk);
        qm_done = 1;
        qm_opvalid = !deq_fail;
        last_deq_ptr = deq_ptr_next;
        qm_deqptr = PTR_W'(deq_ptr_next);
        if (reqs[$].op == QM_DEQUEUE && !deq_fail) deq_ptr_next += 'h111;
        @(negedge clk); qm_done = 0;
      end
    end
  end

  // forwarder model
  cell_type_e starts[$];
  always @(posedge clk) begin
    if (fw_start) begin
      starts.push_back(fw_cltype);
      if (fw_cltype == CL_CTRL) ctrl_cnt <= ctrl_cnt - 1;
      fw_ready <= 0;
    end else if (!fw_ready) fw_ready <= 1;
  end

  // bus results model
  typedef struct { bit cong; bit nack; } res_t;
  res_t res_q[$];
  assign cb_avail = (res_q.size() != 0);
  assign cb_cong  = res_q.size() ? res_q[0].cong : 0;
  assign cb_nack  = res_q.size() ? res_q[0].nack : 0;
  always @(negedge clk) if (cb_clear && res_q.size()) void'(res_q.pop_front());

  // scheduler updates and freed pointers
  typedef struct { int fg; bit cong; bit nack; } upd_t;
  upd_t upds[$];
  always @(posedge clk) if (cn_wr) upds.push_back('{int'(cn_wraddr), cn_wrdata.cong, cn_wrdata.nack});
  int freed[$];
  always @(negedge clk) begin
    free_rdreq = !free_empty;
    if (!free_empty) freed.push_back(int'(free_ptr));
  end
  int n_unknown = 0, n_retx = 0, n_fail = 0;
  always @(posedge clk) begin
    if (ev_wait_unknown) n_unknown++;
    if (ev_retx) n_retx++;
    if (ev_deq_fail) n_fail++;
  end

  task automatic settle(input int n = 40); repeat (n) @(posedge clk); endtask

  int p1, p4, t0;
  initial begin
    repeat (2) @(negedge clk);
    aclr = 0;
    t0 = 0;
    while (!init_done) begin @(posedge clk); #1; t0++; end
    check(t0 <= N + 3, $sformatf("sender init took %0d cycles", t0));

    // ---- new cell for group 3, acknowledged
    push_elig(3);
    t0 = $time / 10;
    settle();
    check(reqs.size() == 1 && reqs[0].op == QM_DEQUEUE && reqs[0].operand == 3, "dequeue request for group 3");
    check(req_time.size() == 1 && req_time[0] - t0 <= 6, $sformatf("request issued after %0d cycles", req_time[0] - t0));
    check(starts.size() == 1 && starts[0] == CL_DATA, "data cell forwarded");
    p1 = last_deq_ptr;
    res_q.push_back('{0, 0});
    settle();
    check(upds.size() == 1 && upds[0].fg == 3 && !upds[0].cong && !upds[0].nack, "scheduler told ack of group 3");
    check(freed.size() == 1 && freed[0] == p1, $sformatf("freed pointer %h, expected %h", freed.size() ? freed[0] : -1, p1));

    // ---- group 4: congested nack, then retransmission by cell read
    push_elig(4);
    settle();
    p4 = last_deq_ptr;
    check(reqs.size() == 2 && reqs[1].op == QM_DEQUEUE && reqs[1].operand == 4, "dequeue request for group 4");
    res_q.push_back('{1, 1});
    settle();
    check(upds.size() == 2 && upds[1].fg == 4 && upds[1].cong && upds[1].nack, "scheduler told cong+nack of group 4");
    check(freed.size() == 1, "pointer of a failed cell was freed");
    push_elig(4);
    settle();
    check(reqs.size() == 3 && reqs[2].op == QM_READ && reqs[2].operand == p4,
          $sformatf("retransmission reads pointer %h, expected %h", reqs.size() > 2 ? reqs[2].operand : -1, p4));
    check(starts.size() == 3, "retransmitted cell forwarded");
    res_q.push_back('{0, 0});
    settle();
    check(freed.size() == 2 && freed[1] == p4, "retransmitted pointer freed");

    // ---- control cells first, their results ignored
    ctrl_cnt = 1;
    push_elig(6);
    settle();
    check(starts.size() == 5 && starts[3] == CL_CTRL && starts[4] == CL_DATA, "control cell not sent first");
    res_q.push_back('{1, 1});   // result of the control cell
    res_q.push_back('{0, 0});   // result of group 6's cell
    settle();
    check(upds.size() == 4 && upds[3].fg == 6 && !upds[3].nack, "control result reached scheduler or group 6 missing");

    // ---- group 2 served twice before its first result: second is held
    push_elig(2);
    settle();
    push_elig(2);
    settle(60);
    check(n_unknown == 1, "group with unknown status not held");
    check(reqs.size() == 5, $sformatf("request issued for an unknown status (%0d requests)", reqs.size()));
    res_q.push_back('{0, 0});
    settle(60);
    check(reqs.size() == 6 && reqs[5].op == QM_DEQUEUE && reqs[5].operand == 2, "held group served after its result");
    res_q.push_back('{0, 0});
    settle();

    // ---- dequeue that finds no cell
    deq_fail = 1;
    push_elig(7);
    settle();
    deq_fail = 0;
    check(n_fail == 1 && starts.size() == 7, $sformatf("failed dequeue: fails %0d starts %0d", n_fail, starts.size()));
    push_elig(7);
    settle();
    check(reqs[$].op == QM_DEQUEUE && reqs[$].operand == 7, "after a failed dequeue a new dequeue follows");
    check(n_retx == 1, "retransmission count");

    // ---- random services against a model of each group's pointer status:
    // no pointer -> dequeue of the group; failed pointer -> read of that
    // pointer; an ack frees the pointer, a nack keeps it for the next service.
    begin
      int mptr[N];
      bit mval[N];
      int g, nreq, nst, nupd, nfree, nexp_start;
      bit c, k, f, ctl;
      foreach (mval[i]) mval[i] = 0;
      res_q.push_back('{0, 0});   // result of group 7's last cell above
      settle();
      for (int it = 0; it < 300; it++) begin
        g = $urandom % N;
        f = !mval[g] && ($urandom % 8 == 0);
        ctl = ($urandom % 6 == 0);
        c = $urandom % 2;
        k = ($urandom % 3 != 0);
        nreq = reqs.size(); nst = starts.size(); nupd = upds.size(); nfree = freed.size();
        deq_fail = f;
        ctrl_cnt = ctl;
        push_elig(g);
        settle();
        deq_fail = 0;
        if (mval[g])
          check(reqs.size() == nreq + 1 && reqs[nreq].op == QM_READ && reqs[nreq].operand == mptr[g],
                $sformatf("random %0d: group %0d should read pointer %h", it, g, mptr[g]));
        else
          check(reqs.size() == nreq + 1 && reqs[nreq].op == QM_DEQUEUE && reqs[nreq].operand == g,
                $sformatf("random %0d: group %0d should dequeue", it, g));
        nexp_start = nst + (f ? 0 : 1) + (ctl ? 1 : 0);
        check(starts.size() == nexp_start && (!ctl || starts[nst] == CL_CTRL),
              $sformatf("random %0d: %0d cells forwarded, expected %0d", it, starts.size() - nst, nexp_start - nst));
        if (ctl) res_q.push_back('{$urandom % 2, $urandom % 2});
        if (!f) begin
          if (!mval[g]) mptr[g] = last_deq_ptr;
          res_q.push_back('{c, !k});
          settle();
          check(upds.size() == nupd + 1 && upds[nupd].fg == g && upds[nupd].cong == c && upds[nupd].nack == !k,
                $sformatf("random %0d: scheduler update for group %0d wrong", it, g));
          if (k) check(freed.size() == nfree + 1 && freed[nfree] == mptr[g],
                       $sformatf("random %0d: pointer %h of group %0d not freed", it, mptr[g], g));
          else   check(freed.size() == nfree, $sformatf("random %0d: failed pointer freed", it));
          mval[g] = !k;
        end else begin
          if (ctl) settle();
          check(freed.size() == nfree, $sformatf("random %0d: pointer freed after an empty dequeue", it));
        end
      end
      check(res_q.size() == 0, "bus results left unread");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
