// tb_demux: self-checking test of the cell demultiplexer. The receiver's
// word FIFO is a real FIFO block filled by the test, with its cell-available
// flag modelled; the enqueue FIFO and the cell-processor transmitter are
// observed at their write ports. Random data and RM cells (PTI 110 in the
// fourth header byte) are sent with the RM routing switch on and off.
// Checked: each cell goes to the right place (RM cells to the cell processor
// only when the switch is on), byte order towards the cell processor (high
// byte first) with one cellinc per cell, the 64-bit packing (seven words,
// four cell words per word from the top, the last word's lower half zero),
// one celldec per cell, the event pulses, and that nothing is read while
// the enqueue FIFO or the transmitter has no room.
`timescale 1ns/1ps
module tb_demux;
  logic clk = 0, aclr = 0;
  initial #1 aclr = 1;
  always #5 clk = ~clk;

  logic rm_to_cp = 0;
  logic rx_rdreq, rx_cellav = 0, rx_celldec; logic [15:0] rx_data;
  logic tm_wrreq, tm_cellspc = 1, tm_cellinc; logic [7:0] tm_data;
  logic enq_wrreq, enq_room = 1; logic [63:0] enq_data;
  logic ev_rm_cell, ev_data_cell;

  demux dut (.*);

  logic rx_wr = 0; logic [15:0] rx_wd = 0;
  sync_fifo #(.WIDTH(16), .DEPTH(64)) u_rx (.clk, .aclr, .wrreq(rx_wr), .wdata(rx_wd),
    .rdreq(rx_rdreq), .rdata(rx_data), .empty(), .full(), .count(), .overflow());

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

  logic [7:0]  exp_tm[$];
  logic [63:0] exp_enq[$];
  int n_tm_inc = 0, n_dec = 0, n_ev_rm = 0, n_ev_data = 0, n_enq = 0, n_tm = 0;
  always @(posedge clk) if (!aclr) begin
    if (tm_cellinc) n_tm_inc++;
    if (rx_celldec) n_dec++;
    if (ev_rm_cell) n_ev_rm++;
    if (ev_data_cell) n_ev_data++;
    if (tm_wrreq) begin
      check(exp_tm.size() > 0 && tm_data == exp_tm[0], $sformatf("byte %0d to the cell processor", n_tm));
      if (exp_tm.size() > 0) void'(exp_tm.pop_front());
      n_tm++;
    end
    if (enq_wrreq) begin
      check(exp_enq.size() > 0 && enq_data == exp_enq[0], $sformatf("enqueue word %0d", n_enq));
      if (exp_enq.size() > 0) void'(exp_enq.pop_front());
      n_enq++;
    end
  end

  initial begin
    int n_rm = 0, n_data = 0, dec0;
    logic [15:0] w[26];
    bit is_rm, to_cp, block;
    repeat (3) @(posedge clk);
    aclr = 0;
    for (int c = 0; c < 80; c++) begin
      rm_to_cp = (c / 20) % 2;
      is_rm = ($urandom % 2);
      foreach (w[i]) w[i] = 16'($urandom);
      // H4 is the low byte of the second word; PTI is its bits 3..1
      w[1][3:1] = is_rm ? 3'b110 : 3'(($urandom % 6));
      to_cp = is_rm && rm_to_cp;
      if (to_cp) begin
        foreach (w[i]) begin exp_tm.push_back(w[i][15:8]); exp_tm.push_back(w[i][7:0]); end
        n_rm++;
      end else begin
        for (int k = 0; k < 7; k++)
          exp_enq.push_back({w[4*k], (4*k+1 < 26) ? w[4*k+1] : 16'h0,
                             (4*k+2 < 26) ? w[4*k+2] : 16'h0, (4*k+3 < 26) ? w[4*k+3] : 16'h0});
        n_data++;
      end
      for (int i = 0; i < 26; i++) begin
        @(negedge clk); rx_wr = 1; rx_wd = w[i];
      end
      @(negedge clk); rx_wr = 0;
      block = ($urandom % 4 == 0);
      if (block) begin
        if ($urandom % 2) enq_room = 0; else tm_cellspc = 0;
      end
      dec0 = n_dec;
      rx_cellav = 1;
      if (block) begin
        repeat (20) @(negedge clk);
        check(exp_tm.size() + exp_enq.size() == (to_cp ? 52 : 7), "nothing read without room");
        enq_room = 1; tm_cellspc = 1;
      end
      while (n_dec == dec0) @(negedge clk);
      rx_cellav = 0;
      check(exp_tm.size() == 0 && exp_enq.size() == 0, $sformatf("cell %0d fully routed", c));
      check(n_tm_inc == n_rm, "one cellinc per cell to the cell processor");
      repeat (3) @(negedge clk);
      check(n_ev_rm == n_rm && n_ev_data == n_data, "event pulses");
    end
    check(n_rm > 5 && n_data > 20, "both routes exercised");
    check(n_enq == 7 * n_data, "seven enqueue words per cell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
