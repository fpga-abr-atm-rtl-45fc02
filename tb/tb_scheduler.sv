// tb_scheduler: self-checking test of the polling-like scheduler with 8 flow
// groups. It checks the self-initialisation time (N+3 cycles), that empty
// groups are never served, the fractional-interval schedule of a group served
// every 2.3 virtual-time units, exponential back off and restore under
// congestion, service of an empty group holding a failed transmission, and the
// stall / initiate behaviour of the eligible FIFO (count reaches the FIFO size,
// the pipeline stops, then resumes without losing any group), and finally
// random fractional intervals ($urandom) on all groups at the same time.
`timescale 1ns/1ps
module tb_scheduler;
  import abr_pkg::*;
  localparam int N = 8;
  localparam int K = 10;
  logic clk = 0, aclr = 1;
  always #5 clk = ~clk;

  logic si_wr = 0, em_wr = 0, cn_wr = 0, elig_rdreq = 0;
  logic [2:0] si_wraddr = 0, em_wraddr = 0, cn_wraddr = 0;
  logic [SI_W-1:0] si_wrdata = 0;
  logic em_wrdata = 0;
  congnack_t cn_wrdata = '0;
  logic [2:0] elig_fgid;
  logic elig_empty, init_done, stalled, ev_stall, ev_backoff, ev_elig;
  logic [3:0] elig_count;
  logic [SI_INT_W-1:0] vtime;

  scheduler #(.N_FG(N), .ELIG_DEPTH(K)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr_si(input int fg, input int val);
    @(negedge clk); si_wr = 1; si_wraddr = 3'(fg); si_wrdata = SI_W'(val);
    @(negedge clk); si_wr = 0;
  endtask
  task automatic wr_em(input int fg, input bit v);
    @(negedge clk); em_wr = 1; em_wraddr = 3'(fg); em_wrdata = v;
    @(negedge clk); em_wr = 0;
  endtask
  task automatic wr_cn(input int fg, input bit c, input bit n);
    @(negedge clk); cn_wr = 1; cn_wraddr = 3'(fg); cn_wrdata = '{cong: c, nack: n};
    @(negedge clk); cn_wr = 0;
  endtask

  // Pop every id as it appears and record (id, virtual time).
  int got_fg[$];
  int got_vt[$];
  bit auto_pop = 1;
  int man_left = 0;
  always @(negedge clk) begin
    elig_rdreq = 0;
    if ((auto_pop || man_left > 0) && !elig_empty && !aclr) begin
      if (man_left > 0) man_left--;
      elig_rdreq = 1;
      got_fg.push_back(int'(elig_fgid));
      got_vt.push_back(int'(vtime));
    end
  end

  task automatic do_reset();
    int cyc;
    @(negedge clk); aclr = 1;
    @(negedge clk); aclr = 0;
    cyc = 0;
    while (!init_done) begin @(posedge clk); #1; cyc++; end
    check(cyc == N + 3, $sformatf("init took %0d cycles, expected %0d", cyc, N + 3));
  endtask

  task automatic wait_vt(input int v);
    while (int'(vtime) < v) @(posedge clk);
  endtask

  int exp_vt[$];
  int n, st, idx, ok_seq;
  int si_val[N];

  initial begin
    // ---- 1: initialisation, empty groups are never served
    do_reset();
    wait_vt(5);
    check(got_fg.size() == 0, "empty flow groups were served");

    // ---- 2: group 2 at 2.3 virtual-time units (Figure 12 example)
    do_reset();
    got_fg.delete(); got_vt.delete();
    wr_si(2, 589);            // 2.30078 = 589/256
    wr_em(2, 0);
    wait_vt(22);
    // independent model: service k happens at floor(k*589/256)
    exp_vt.delete();
    for (int k = 0; (k * 589) / 256 <= 20; k++) exp_vt.push_back((k * 589) / 256);
    check(got_fg.size() == exp_vt.size(),
          $sformatf("2.3 schedule: %0d services, expected %0d", got_fg.size(), exp_vt.size()));
    for (int i = 0; i < exp_vt.size() && i < got_vt.size(); i++) begin
      check(got_fg[i] == 2 && got_vt[i] == exp_vt[i],
            $sformatf("2.3 schedule service %0d at vt %0d fg %0d, expected vt %0d", i, got_vt[i], got_fg[i], exp_vt[i]));
    end

    // ---- 3: back off / restore of congested group 6, interval 1.0
    do_reset();
    got_fg.delete(); got_vt.delete();
    wr_cn(6, 1, 0);
    wr_em(6, 0);
    while (got_vt.size() < 3) @(posedge clk);
    wr_cn(6, 0, 0);            // congestion clears after the third service
    wait_vt(26);
    exp_vt = '{0, 2, 6, 14, 18, 20, 21, 22};
    for (int i = 0; i < exp_vt.size(); i++)
      check(i < got_vt.size() && got_vt[i] - got_vt[0] == exp_vt[i] && got_fg[i] == 6,
            $sformatf("back off service %0d at vt +%0d, expected +%0d", i, (i < got_vt.size()) ? got_vt[i] - got_vt[0] : -1, exp_vt[i]));

    // ---- 4: empty group with a failed transmission is still served
    do_reset();
    got_fg.delete(); got_vt.delete();
    wr_cn(5, 0, 1);
    wait_vt(6);
    n = 0;
    foreach (got_fg[i]) if (got_fg[i] == 5) n++;
    check(n >= 5 && n == got_fg.size(), $sformatf("nack group served %0d times of %0d", n, got_fg.size()));

    // ---- 5: stall at K-1, FIFO may reach K, resume at K/2, nothing lost
    do_reset();
    auto_pop = 0;
    got_fg.delete(); got_vt.delete();
    for (int g = 0; g < N; g++) wr_em(g, 0);
    repeat (3 * N) @(posedge clk);
    check(stalled == 1, "scheduler did not stall with a full eligible FIFO");
    check(int'(elig_count) == K, $sformatf("eligible FIFO holds %0d, expected %0d", elig_count, K));
    // drain down to just above the initiate threshold: must stay stalled
    man_left = K - K/2 - 1;
    while (man_left > 0) @(posedge clk);
    repeat (4) @(posedge clk);
    check(stalled == 1, "scheduler resumed above the initiate threshold");
    auto_pop = 1;
    repeat (6 * N) @(posedge clk);
    check(stalled == 0, "scheduler did not resume");
    // once all groups are non-empty the ids must follow each other
    // round-robin without a gap, also across the stall (after pop K)
    ok_seq = 1;
    for (int i = 2; i < got_fg.size(); i++) if (got_fg[i] != (got_fg[i-1] + 1) % N) ok_seq = 0;
    check(ok_seq == 1 && got_fg.size() > 2 * N, "flow groups lost or repeated across a stall");
    // rate: with all groups due every unit, one id per cycle while popping
    n = got_fg.size();
    repeat (4 * N) @(posedge clk);
    check(got_fg.size() - n == 4 * N, $sformatf("%0d services in %0d cycles", got_fg.size() - n, 4 * N));

    // ---- 6: random fractional intervals on all groups at once. Each group's
    // gaps must alternate between the two integers around its interval, and
    // the span of its services must match the interval sum (ids are seen when
    // popped, so one unit of slack is allowed on each measured time).
    for (int round = 0; round < 3; round++) begin
      do_reset();
      got_fg.delete(); got_vt.delete();
      for (int g = 0; g < N; g++) begin
        si_val[g] = 256 + $urandom % 1025;
        wr_si(g, si_val[g]);
      end
      for (int g = 0; g < N; g++) wr_em(g, 0);
      st = int'(vtime) + 2;
      wait_vt(st + 300);
      for (int g = 0; g < N; g++) begin
        int first, last, cnt, prev, bad;
        first = -1; last = -1; cnt = 0; prev = -1; bad = 0;
        foreach (got_fg[i]) begin
          if (got_fg[i] != g || got_vt[i] < st) continue;
          if (prev >= 0 && (got_vt[i] - prev < si_val[g] / 256 - 1 ||
                            got_vt[i] - prev > (si_val[g] + 255) / 256 + 1)) bad++;
          if (first < 0) first = got_vt[i];
          last = got_vt[i]; prev = got_vt[i]; cnt++;
        end
        check(cnt > 300 * 256 / si_val[g] - 3 && bad == 0,
              $sformatf("random si %0d/256 group %0d: %0d services, %0d bad gaps", si_val[g], g, cnt, bad));
        check(cnt > 1 && (last - first) * 256 - (cnt - 1) * si_val[g] < 512 &&
              (cnt - 1) * si_val[g] - (last - first) * 256 < 512,
              $sformatf("random si %0d/256 group %0d: span %0d units over %0d services", si_val[g], g, last - first, cnt));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
