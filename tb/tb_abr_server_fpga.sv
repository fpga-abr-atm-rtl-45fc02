// tb_abr_server_fpga: end-to-end test of the ABR server FPGA with every
// parameter at its default (128 flow groups). Behavioural models stand in for
// the parts around the FPGA:
//  - the bus device sends data cells (flow group id in the first word, a
//    sequence number in the third) and RM cells into the 16-bit receive
//    link, takes the cells of the 16-bit transmit link, and returns one
//    result per cell in order: random nacks, congestion on the first cells of
//    flow group 1 and at random;
//  - the queue manager takes cells from the enqueue FIFO into per-group
//    queues, keeps the empty flags of the scheduler, answers dequeue and
//    cell-read requests by writing the cell into the dequeue FIFO, and takes
//    back freed pointers;
//  - the cell processor sends control cells into the 8-bit receive link and
//    takes RM cells from the 8-bit transmit link;
//  - the CPU writes random service intervals (1.0 to 4.0 virtual-time
//    units).
// Checked: every data cell reaches the bus in sequence per flow group and
// exactly once acknowledged, a nacked cell is sent again before the group's
// next cell, a group never has two cells on the bus at once, pointers are
// freed only when in use, control and RM cells arrive intact, no FIFO
// overflows, and the initialisation time. Counted, and a failure if never
// seen: scheduler stall, back-off skip, retransmission, wait on an unknown
// status, failed dequeue, control cell, RM cell to the cell processor, data
// cell enqueued, start-of-cell error (on both receivers, each from one broken
// cell sent after the traffic).
`timescale 1ns/1ps
module tb_abr_server_fpga;
  import abr_pkg::*;
  localparam int N     = 128;
  localparam int FGW   = 7;
  localparam int CELLS_PER_FG = 3;
  localparam int N_DATA = N * CELLS_PER_FG;
  localparam int N_RM   = 12;
  localparam int N_CTRL = 12;

  logic clk = 0, aclr = 0, ciclk = 0, coclk = 0, txclk = 0, rxclk = 0;
  initial begin #1 aclr = 1; #200 aclr = 0; end
  always #10   clk   = ~clk;     // 50 MHz
  always #25   ciclk = ~ciclk;   // 20 MHz
  always #20   coclk = ~coclk;   // 25 MHz
  always #12.5 txclk = ~txclk;   // 40 MHz
  always #12.5 rxclk = ~rxclk;

  logic init_done;
  logic si_wr = 0; logic [FGW-1:0] si_wraddr = 0; logic [SI_W-1:0] si_wrdata = 0;
  logic rm_to_cp = 1;
  logic em_wr = 0; logic [FGW-1:0] em_wraddr = 0; logic em_wrdata = 0;
  logic qm_opavail; qm_op_e qm_op; logic [PTR_W-1:0] qm_operand;
  logic qm_take = 0, qm_done = 0, qm_opvalid = 0; logic [PTR_W-1:0] qm_deqptr = 0;
  logic free_rdreq = 0; logic [PTR_W-1:0] free_ptr; logic free_empty;
  logic enq_rdreq = 0; logic [63:0] enq_data; logic enq_empty;
  logic dq_wrreq = 0; logic [63:0] dq_data = 0; logic [8:0] dq_count;
  logic res_valid = 0, res_ack = 0, res_cong = 0;
  logic ciclav, cienb_n = 1, cisoc; logic [15:0] cidata;
  logic coclav, coenb_n = 1, cosoc = 0; logic [15:0] codata = 0;
  logic txclav = 1, txenb_n, txsoc; logic [7:0] txdata;
  logic rxclav = 0, rxenb_n, rxsoc = 0; logic [7:0] rxdata = 0;
  logic [SI_INT_W-1:0] vtime; logic [3:0] elig_count;
  logic stalled, ev_stall, ev_backoff, ev_elig, ev_retx, ev_wait_unknown, ev_deq_fail;
  logic ev_ctrl_cell, ev_rm_cell, ev_data_cell, socerr_bus, socerr_cp, overflow;

  abr_server_fpga dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ---------------- cell contents ----------------
  typedef logic [25:0][15:0] cell_t;   // 26 words, word i at [i]
  function automatic cell_t make_cell(input int fg, input int seq, input bit rm);
    cell_t c;
    c[0] = 16'(fg);
    c[1] = {8'hA5, 4'h0, rm ? 3'b110 : 3'b000, 1'b0};
    c[2] = 16'(seq);
    for (int i = 3; i < 26; i++) c[i] = 16'(fg * 7919 + seq * 104729 + i * 31);
    return c;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_backoff = 0, n_retx = 0, n_unknown = 0, n_deqfail = 0;
  int n_ctrl_ev = 0, n_rm_ev = 0, n_data_ev = 0, n_socerr = 0, n_socerr_cp = 0;
  always @(posedge clk) if (!aclr) begin
    n_stall   += int'(ev_stall);
    n_backoff += int'(ev_backoff);
    n_retx    += int'(ev_retx);
    n_unknown += int'(ev_wait_unknown);
    n_deqfail += int'(ev_deq_fail);
    n_ctrl_ev += int'(ev_ctrl_cell);
    n_rm_ev   += int'(ev_rm_cell);
    n_data_ev += int'(ev_data_cell);
    n_socerr  += int'(socerr_bus);
    n_socerr_cp += int'(socerr_cp);
  end

  // ---------------- bus device: cells into the FPGA ----------------
  cell_t in_cells[$];
  bit    bad_soc = 0;
  int    n_in = 0;
  initial begin
    int seq [N];
    int rm_left = N_RM;
    foreach (seq[i]) seq[i] = 0;
    // data cells in rounds over all groups, RM cells mixed in
    for (int r = 0; r < CELLS_PER_FG; r++)
      for (int g = 0; g < N; g++) begin
        in_cells.push_back(make_cell(g, seq[g]++, 0));
        if (rm_left > 0 && $urandom % 32 == 0) begin
          in_cells.push_back(make_cell(200 + rm_left, 0, 1));
          rm_left--;
        end
      end
    while (rm_left > 0) begin in_cells.push_back(make_cell(200 + rm_left, 0, 1)); rm_left--; end
  end
  cell_t rm_expect[$];
  initial begin
    cell_t c;
    @(negedge aclr);
    repeat (4) @(posedge coclk);
    while (in_cells.size() > 0) begin
      @(posedge coclk);
      if (coclav) begin
        c = in_cells.pop_front();
        if (c[1][3:1] == 3'b110) rm_expect.push_back(c);
        for (int w = 0; w < 26; w++) begin
          #1 coenb_n = 0; cosoc = (w == 0); codata = c[w];
          @(posedge coclk);
        end
        #1 coenb_n = 1; cosoc = 0;
        n_in++;
        repeat ($urandom % 4) @(posedge coclk);
      end
    end
    wait (bad_soc);
    @(posedge coclk);
    for (int w = 0; w < 30; w++) begin
      #1 coenb_n = 0; cosoc = (w == 0 || w == 10); codata = 16'hBAD0;
      @(posedge coclk);
    end
    #1 coenb_n = 1; cosoc = 0;
  end

  // ---------------- bus device: cells out of the FPGA and results ----------------
  int  next_seq [N];
  int  retx_seq [N];     // -1: none pending
  bit  on_bus   [N];
  int  delivered = 0, nacked = 0, ctrl_rx = 0, data_rx = 0;
  typedef struct { int due; bit ack; bit cong; int fg; } result_t;
  result_t results[$];
  initial foreach (next_seq[i]) begin next_seq[i] = 0; retx_seq[i] = -1; on_bus[i] = 0; end

  logic [1:0] enb_hist = 2'b11;
  int enb_left = 0, gap = 0, wcnt = 0;
  logic [15:0] rx_words [26];
  cell_t ctrl_expect[$];
  always @(posedge ciclk) begin
    if (!enb_hist[1]) begin
      check(cisoc == (wcnt == 0), "cisoc on the first word of an outgoing cell");
      rx_words[wcnt] = cidata;
      wcnt++;
      if (wcnt == 26) begin
        wcnt = 0;
        bus_cell_done();
      end
    end
    enb_hist <= {enb_hist[0], cienb_n};
    if (enb_left > 0) begin
      enb_left <= enb_left - 1;
      cienb_n  <= (enb_left == 1);
      if (enb_left == 1) gap <= 2;
    end else if (gap > 0) gap <= gap - 1;
    else if (ciclav) begin
      cienb_n  <= 1'b0;
      enb_left <= 26;
    end
  end

  task automatic bus_cell_done();
    result_t r;
    int fg, sq;
    bit ok;
    r.due = $time / 20 + 10 + $urandom % 20;
    if (rx_words[1][3:1] == 3'b110) begin
      // control cell from the cell processor
      check(ctrl_expect.size() > 0, "control cell expected");
      if (ctrl_expect.size() > 0) begin
        ok = 1;
        for (int i = 0; i < 26; i++) ok &= (rx_words[i] == ctrl_expect[0][i]);
        check(ok, "control cell intact");
        void'(ctrl_expect.pop_front());
      end
      ctrl_rx++;
      r.ack = 1; r.cong = 0; r.fg = -1;
    end else begin
      fg = int'(rx_words[0]);
      sq = int'(rx_words[2]);
      data_rx++;
      ok = (fg < N);
      if (ok) begin
        cell_t c = make_cell(fg, sq, 0);
        for (int i = 0; i < 26; i++) ok &= (rx_words[i] == c[i]);
      end
      check(ok, $sformatf("data cell intact (fg %0d seq %0d)", fg, sq));
      if (fg < N) begin
        check(!on_bus[fg], $sformatf("group %0d has one cell on the bus at a time", fg));
        if (retx_seq[fg] >= 0) check(sq == retx_seq[fg], $sformatf("group %0d resends nacked cell %0d (got %0d)", fg, retx_seq[fg], sq));
        else check(sq == next_seq[fg], $sformatf("group %0d in sequence: %0d (got %0d)", fg, next_seq[fg], sq));
        on_bus[fg] = 1;
        r.fg   = fg;
        r.ack  = ($urandom % 10 != 0);
        r.cong = (fg == 1 && sq < 2) || ($urandom % 40 == 0);
        if (r.ack) begin next_seq[fg] = sq + 1; retx_seq[fg] = -1; delivered++; end
        else begin retx_seq[fg] = sq; nacked++; end
      end else r.fg = -1;
    end
    results.push_back(r);
  endtask

  always @(negedge clk) begin
    res_valid = 0;
    if (results.size() > 0 && results[0].due <= $time / 20) begin
      res_valid = 1; res_ack = results[0].ack; res_cong = results[0].cong;
      if (results[0].fg >= 0) on_bus[results[0].fg] = 0;
      void'(results.pop_front());
    end
  end

  // ---------------- queue manager ----------------
  int     fgq [N][$];
  cell_t  store [int];
  bit     in_use [int];
  int     pool[$];
  int     em_q_fg[$]; bit em_q_val[$];
  initial for (int p = 0; p < 1024; p++) pool.push_back(p * 3 + 5);

  // empty-flag writes, one per cycle
  always @(negedge clk) begin
    em_wr = 0;
    if (em_q_fg.size() > 0 && init_done) begin
      em_wr = 1; em_wraddr = FGW'(em_q_fg.pop_front()); em_wrdata = em_q_val.pop_front();
    end
  end

  // enqueue: seven 64-bit words per cell
  logic [63:0] enq_words [7];
  int enq_n = 0;
  always @(negedge clk) begin
    enq_rdreq = 0;
    if (!enq_empty && !aclr) begin
      enq_rdreq = 1;
      enq_words[enq_n] = enq_data;
      enq_n++;
      if (enq_n == 7) begin
        cell_t c;
        int p, fg;
        enq_n = 0;
        for (int i = 0; i < 26; i++) c[i] = enq_words[i / 4][63 - 16 * (i % 4) -: 16];
        check(enq_words[6][31:0] == 32'h0, "last enqueue word padded with zeros");
        fg = int'(c[0]);
        check(fg < N && c[1][3:1] != 3'b110, "only data cells are enqueued");
        if (fg < N) begin
          check(pool.size() > 0, "pointer pool not empty");
          p = pool.pop_front();
          store[p] = c;
          if (fgq[fg].size() == 0) begin em_q_fg.push_back(fg); em_q_val.push_back(0); end
          fgq[fg].push_back(p);
        end
      end
    end
  end

  // freed pointers
  int n_freed = 0;
  always @(negedge clk) begin
    free_rdreq = !free_empty && !aclr;
    if (free_rdreq) begin
      check(in_use.exists(int'(free_ptr)) && in_use[int'(free_ptr)], "freed pointer was in use");
      in_use[int'(free_ptr)] = 0;
      pool.push_back(int'(free_ptr));
      n_freed++;
    end
  end

  // requests: take, fetch (about 20 cycles), write 7 words, report done
  initial begin
    cell_t c;
    int p, fg;
    bit valid;
    forever begin
      @(posedge clk);
      if (qm_opavail && !aclr) begin
        @(negedge clk); qm_take = 1;
        @(negedge clk); qm_take = 0;
        valid = 1;
        if (qm_op == QM_DEQUEUE) begin
          fg = int'(qm_operand);
          if (fgq[fg].size() == 0) valid = 0;
          else begin
            p = fgq[fg].pop_front();
            in_use[p] = 1;
            if (fgq[fg].size() == 0) begin em_q_fg.push_back(fg); em_q_val.push_back(1); end
          end
        end else begin
          p = int'(qm_operand);
          check(in_use.exists(p) && in_use[p], "cell read of a pointer in use");
        end
        repeat (12 + $urandom % 10) @(negedge clk);
        if (valid) begin
          c = store[p];
          for (int k = 0; k < 7; k++) begin
            dq_wrreq = 1;
            dq_data = {c[4*k], (4*k+1 < 26) ? c[4*k+1] : 16'h0,
                       (4*k+2 < 26) ? c[4*k+2] : 16'h0, (4*k+3 < 26) ? c[4*k+3] : 16'h0};
            @(negedge clk);
          end
          dq_wrreq = 0;
        end
        qm_done = 1; qm_opvalid = valid; qm_deqptr = PTR_W'(valid ? p : 0);
        @(negedge clk); qm_done = 0;
      end
    end
  end

  // ---------------- cell processor ----------------
  // control cells into the FPGA
  cell_t cp_cells[$];
  int cp_bytes = 0, cp_cell_total = 0, run = 0;
  bit cp_bad = 0;        // the cell being sent has a second rxsoc at byte 20
  initial for (int i = 0; i < N_CTRL; i++) cp_cells.push_back(make_cell(300 + i, i, 1));
  logic [7:0] cp_byte;
  always @(posedge rxclk) begin
    if (!rxenb_n && cp_cells.size() > 0) begin
      cp_byte = (cp_bytes % 2 == 0) ? cp_cells[0][cp_bytes / 2][15:8] : cp_cells[0][cp_bytes / 2][7:0];
      rxdata <= cp_byte;
      rxsoc  <= (cp_bytes == 0) || (cp_bad && cp_bytes == 20);
      cp_bytes++;
      if (cp_bytes == 52) begin
        if (cp_bad) void'(cp_cells.pop_front());
        else ctrl_expect.push_back(cp_cells.pop_front());
        cp_bad = 0;
        cp_bytes = 0;
      end
    end else rxsoc <= 0;
    // offer a control cell now and then
    rxclav <= (cp_cells.size() > 0) && !aclr && init_done && ($urandom % 200 == 0 || cp_bytes != 0 || rxclav);
  end
  // once all traffic is done, one broken cell: a start-of-cell inside it
  initial begin
    wait (bad_soc);
    @(posedge rxclk);
    cp_bad = 1;
    cp_cells.push_back(make_cell(399, 0, 1));
  end
  // RM cells out of the FPGA
  int tm_bytes = 0, rm_rx = 0;
  logic [15:0] tm_words [26];
  always @(posedge txclk) begin
    if (!txenb_n) begin
      check(txsoc == (tm_bytes == 0), "txsoc on the first byte of an RM cell");
      if (tm_bytes % 2 == 0) tm_words[tm_bytes / 2][15:8] = txdata;
      else tm_words[tm_bytes / 2][7:0] = txdata;
      tm_bytes++;
      if (tm_bytes == 52) begin
        bit ok = 1;
        tm_bytes = 0;
        check(rm_expect.size() > 0, "RM cell expected at the cell processor");
        if (rm_expect.size() > 0) begin
          for (int i = 0; i < 26; i++) ok &= (tm_words[i] == rm_expect[0][i]);
          check(ok, "RM cell intact at the cell processor");
          void'(rm_expect.pop_front());
        end
        rm_rx++;
      end
    end
  end

  // ---------------- CPU ----------------
  initial begin
    @(negedge aclr);
    wait (init_done);
    for (int g = 0; g < N; g++) begin
      @(negedge clk);
      si_wr = 1; si_wraddr = FGW'(g);
      si_wrdata = SI_W'(256 + $urandom % 769);   // 1.0 .. 4.0
    end
    @(negedge clk); si_wr = 0;
  end

  // ---------------- run ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog: delivered %0d/%0d ctrl %0d rm %0d in %0d", delivered, N_DATA, ctrl_rx, rm_rx, n_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int t0;
    @(negedge aclr);
    t0 = 0;
    while (!init_done) begin @(posedge clk); t0++; end
    check(t0 <= N + 4, $sformatf("initialisation in %0d cycles", t0));
    wait (delivered == N_DATA && ctrl_rx == N_CTRL && rm_rx == N_RM);
    repeat (200) @(posedge clk);
    check(results.size() == 0, "all results returned");
    check(n_freed == N_DATA, $sformatf("every delivered cell's pointer freed (%0d)", n_freed));
    check(!overflow, "no FIFO overflow");
    check(n_socerr == 0 && n_socerr_cp == 0, "no start-of-cell error in normal traffic");
    bad_soc = 1;
    repeat (400) @(posedge clk);
    while (cp_bad) @(posedge clk);
    repeat (100) @(posedge clk);
    $display("mechanisms: stall %0d backoff %0d retx %0d unknown-wait %0d deq-fail %0d ctrl %0d rm-to-cp %0d enqueued %0d socerr %0d/%0d",
             n_stall, n_backoff, n_retx, n_unknown, n_deqfail, n_ctrl_ev, n_rm_ev, n_data_ev, n_socerr, n_socerr_cp);
    $display("cells: data on bus %0d (nacked %0d), delivered %0d, control %0d, RM %0d, time %0t",
             data_rx, nacked, delivered, ctrl_rx, rm_rx, $time);
    check(n_stall > 0, "scheduler stall happened");
    check(n_backoff > 0, "back-off skip happened");
    check(n_retx > 0 && n_retx == nacked, $sformatf("retransmissions %0d for %0d nacks", n_retx, nacked));
    check(n_unknown > 0, "wait on unknown status happened");
    check(n_deqfail > 0, "failed dequeue happened");
    check(n_ctrl_ev == N_CTRL, "control cells forwarded");
    check(n_rm_ev == N_RM, "RM cells passed to the cell processor");
    check(n_data_ev == N_DATA, "data cells enqueued");
    check(n_socerr == 1, "start-of-cell error reported on the bus side");
    check(n_socerr_cp == 1, "start-of-cell error reported on the cell processor side");
    check(ctrl_rx == N_CTRL, "a broken control cell was forwarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
