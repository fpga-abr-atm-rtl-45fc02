// tb_forwarder: self-checking test of the forwarder. The 64-bit cell dequeue
// FIFO and the byte FIFO of the cell-processor receiver are real FIFO blocks
// filled by the test; the receiver's cell-available flag and the
// transmitter's cell-space flag are modelled. Random sequences of data and
// control cells are started through the sender handshake. Checked: the
// 16-bit words written for each cell (data: top 16 bits of each 64-bit word
// first; control: byte pairs, first byte high), one cellinc before each
// cell, no word while cellspc was low at the start, fw_ready falling on the
// start and rising after the cell, one rm_celldec per control cell,
// ctrl_avail masked while a control cell is under way, and a data cell
// taking 26 consecutive cycles once started.
`timescale 1ns/1ps
module tb_forwarder;
  import abr_pkg::*;
  logic clk = 0, aclr = 0;
  initial #1 aclr = 1;
  always #5 clk = ~clk;

  logic fw_start = 0, fw_ready, ctrl_avail;
  cell_type_e fw_cltype = CL_DATA;
  logic dq_rdreq, dq_empty; logic [63:0] dq_data;
  logic rm_rdreq, rm_cellav = 0, rm_celldec; logic [7:0] rm_data;
  logic cellspc = 1, cellinc, tx_wrreq; logic [15:0] tx_data;

  forwarder dut (.*);

  // source FIFOs
  logic dq_wr = 0, rm_wr = 0; logic [63:0] dq_wd = 0; logic [7:0] rm_wd = 0;
  sync_fifo #(.WIDTH(64), .DEPTH(32)) u_dq (.clk, .aclr, .wrreq(dq_wr), .wdata(dq_wd),
    .rdreq(dq_rdreq), .rdata(dq_data), .empty(dq_empty), .full(), .count(), .overflow());
  sync_fifo #(.WIDTH(8), .DEPTH(128)) u_rm (.clk, .aclr, .wrreq(rm_wr), .wdata(rm_wd),
    .rdreq(rm_rdreq), .rdata(rm_data), .empty(), .full(), .count(), .overflow());

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] expect_q[$];
  int n_inc = 0, n_dec = 0, n_words = 0, first_word_t = 0, last_word_t = 0;
  always @(posedge clk) if (!aclr) begin
    if (cellinc) begin
      n_inc++;
      check(cellspc, "cellinc only with cellspc");
    end
    if (rm_celldec) n_dec++;
    if (tx_wrreq) begin
      check(expect_q.size() > 0 && tx_data == expect_q[0], $sformatf("word %0d", n_words));
      if (expect_q.size() > 0) void'(expect_q.pop_front());
      if (n_words % 26 == 0) first_word_t = $time / 10;
      last_word_t = $time / 10;
      n_words++;
    end
  end

  task automatic load_data_cell();
    logic [15:0] w[26];
    foreach (w[i]) begin w[i] = 16'($urandom); expect_q.push_back(w[i]); end
    for (int k = 0; k < 7; k++) begin
      @(negedge clk);
      dq_wr = 1;
      dq_wd = {w[4*k], (4*k+1 < 26) ? w[4*k+1] : 16'h0,
               (4*k+2 < 26) ? w[4*k+2] : 16'h0, (4*k+3 < 26) ? w[4*k+3] : 16'h0};
    end
    @(negedge clk); dq_wr = 0;
  endtask
  task automatic load_ctrl_cell();
    logic [7:0] b[52];
    foreach (b[i]) b[i] = 8'($urandom);
    for (int i = 0; i < 26; i++) expect_q.push_back({b[2*i], b[2*i+1]});
    for (int i = 0; i < 52; i++) begin
      @(negedge clk); rm_wr = 1; rm_wd = b[i];
    end
    @(negedge clk); rm_wr = 0;
    repeat (3) @(negedge clk);
    rm_cellav = 1;
  endtask

  initial begin
    int n_data = 0, n_ctrl = 0, inc0;
    repeat (3) @(posedge clk);
    aclr = 0;
    repeat (2) @(posedge clk);
    check(fw_ready, "ready after reset");
    for (int c = 0; c < 60; c++) begin
      bit ctrl;
      ctrl = ($urandom % 3 == 0);
      if (ctrl) load_ctrl_cell(); else load_data_cell();
      if (ctrl) begin
        repeat (2) @(negedge clk);
        check(ctrl_avail, "ctrl_avail follows the receiver's cellav");
      end
      // sometimes the transmitter is full at the start
      cellspc = ($urandom % 4 != 0);
      @(negedge clk);
      while (!fw_ready) @(negedge clk);
      inc0 = n_inc;
      fw_start = 1; fw_cltype = ctrl ? CL_CTRL : CL_DATA;
      @(negedge clk);
      fw_start = 0;
      check(!fw_ready, "fw_ready falls on fw_start");
      if (ctrl) begin
        rm_cellav = 0;   // the receiver no longer counts the cell once read
        check(!ctrl_avail, "ctrl_avail masked during a control cell");
      end
      if (!cellspc) begin
        repeat (10) @(negedge clk);
        check(n_inc == inc0 && expect_q.size() == 26, "nothing sent while cellspc is low");
        cellspc = 1;
      end
      while (!fw_ready) @(negedge clk);
      check(expect_q.size() == 0, "whole cell written");
      check(n_inc == inc0 + 1, "one cellinc per cell");
      if (!ctrl) check(last_word_t - first_word_t == 25, "data cell in 26 consecutive cycles");
      if (ctrl) n_ctrl++; else n_data++;
      repeat (2) @(negedge clk);
      check(n_dec == n_ctrl, "one rm_celldec per control cell");
      repeat ($urandom % 20) @(negedge clk);
    end
    check(n_ctrl > 5 && n_data > 5, "both cell types exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
