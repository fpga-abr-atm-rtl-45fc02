// tb_sender_rate: measures the sender's cost per cell at its default size
// (128 flow groups) under full load, the figure behind the outgoing-traffic
// limit of the design: every departing cell needs a queue-manager request,
// a forwarder start and the handling of its bus result. The eligible FIFO is
// kept full, the queue manager answers as fast as the handshake allows (take
// one cycle after the request, done the cycle after), the forwarder is
// always ready and every cell's acknowledge is available one cycle after the
// cell starts. Over 3000 cycles the test counts the cells started and the
// cycles spent waiting on the queue manager, and reports the sender's own
// cycles per cell. Checked: all cells acknowledged and freed in order, and at
// most 15 sender cycles per cell (the budget of 6 to issue a request, 6 to
// handle a result and 3 to start the forwarder).
`timescale 1ns/1ps
module tb_sender_rate;
  import abr_pkg::*;
  localparam int N = 128;
  logic clk = 0, aclr = 0;
  initial #1 aclr = 1;
  always #10 clk = ~clk;

  logic init_done, elig_rdreq, elig_empty;
  logic [6:0] elig_fgid;
  logic cn_wr; logic [6:0] cn_wraddr; congnack_t cn_wrdata;
  logic qm_opavail; qm_op_e qm_op; logic [PTR_W-1:0] qm_operand;
  logic qm_take = 0, qm_done = 0, qm_opvalid = 0; logic [PTR_W-1:0] qm_deqptr = 0;
  logic free_rdreq = 0; logic [PTR_W-1:0] free_ptr; logic free_empty, free_overflow;
  logic fw_ready = 1, fw_start; cell_type_e fw_cltype; logic ctrl_avail = 0;
  logic cb_avail, cb_cong, cb_nack, cb_clear;
  logic ev_retx, ev_wait_unknown, ev_deq_fail;

  sender dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // eligible FIFO kept full, groups in turn
  logic e_wr = 0; logic [6:0] e_wdata = 0; logic e_full; int next_fg = 0;
  sync_fifo #(.WIDTH(7), .DEPTH(10)) u_elig (.clk, .aclr, .wrreq(e_wr), .wdata(e_wdata),
    .rdreq(elig_rdreq), .rdata(elig_fgid), .empty(elig_empty), .full(e_full), .count(), .overflow());
  always @(negedge clk) begin
    e_wr = !e_full && init_done;
    if (e_wr) begin e_wdata = 7'(next_fg); next_fg = (next_fg + 1) % N; end
  end

  // queue manager: fastest handshake
  int ptr_next = 100, qm_wait = 0;
  bit measuring = 0;
  int issued[$];
  always @(posedge clk) if (measuring && qm_opavail) qm_wait++;
  always @(negedge clk) begin
    qm_take = 0; qm_done = 0;
    if (qm_opavail && !qm_take) begin
      qm_take = 1;
      qm_done = 1; qm_opvalid = 1; qm_deqptr = PTR_W'(ptr_next);
      issued.push_back(ptr_next);
      ptr_next++;
    end
  end

  // bus results: acknowledge one cycle after each data cell starts
  int res_pending = 0;
  assign cb_avail = (res_pending > 0);
  assign cb_cong  = 1'b0;
  assign cb_nack  = 1'b0;
  int starts = 0;
  always @(posedge clk) begin
    if (fw_start) begin
      if (measuring) starts++;
      res_pending <= res_pending + 1 - int'(cb_clear);
    end else if (cb_clear) res_pending <= res_pending - 1;
  end

  // freed pointers must come back in order
  int freed = 0;
  always @(negedge clk) begin
    free_rdreq = !free_empty;
    if (free_rdreq) begin
      check(issued.size() > 0 && int'(free_ptr) == issued[0], "pointer freed in order");
      if (issued.size() > 0) void'(issued.pop_front());
      freed++;
    end
  end

  localparam int WINDOW = 3000;
  initial begin
    real per_cell, own;
    repeat (3) @(posedge clk);
    aclr = 0;
    wait (init_done);
    repeat (300) @(posedge clk);
    measuring = 1;
    repeat (WINDOW) @(posedge clk);
    measuring = 0;
    per_cell = real'(WINDOW) / starts;
    own = real'(WINDOW - qm_wait) / starts;
    $display("cells %0d in %0d cycles: %0.2f cycles per cell, %0.2f of them in the sender (queue manager waits %0d cycles)",
             starts, WINDOW, per_cell, own, qm_wait);
    $display("outgoing rate at 50 MHz: %0.0f Mbit/s (53-byte cells)", 424.0 * 50.0 / per_cell);
    check(starts > 0, "cells sent");
    // the window edges cut one cell, so allow a fraction of a cycle
    check(own < 15.5, $sformatf("sender cycles per cell %0.2f within 15", own));
    repeat (50) @(posedge clk);
    check(freed > 0 && freed >= starts, "acknowledged cells freed");
    check(!free_overflow, "free pointer FIFO never overflows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
