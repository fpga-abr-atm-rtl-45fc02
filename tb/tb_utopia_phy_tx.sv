// tb_utopia_phy_tx: self-checking test of the 16-bit utopia transmitter
// towards the bus device, with a 50 MHz internal clock and a 25 MHz link
// clock. A writer plays the forwarder (waits for cellspc, pulses cellinc,
// writes 26 words with occasional gaps); a model of the bus device enables a
// whole cell whenever it sees ciclav, and takes a word two link edges after
// each enable edge. Checked: every word arrives in order, cisoc marks exactly
// the first word of each cell, ciclav is low when no cell is held, the
// cut-through start (the first word leaves before the cell is complete in
// the FIFO) and flow control (while the bus device pauses, cellspc stops the
// writer with at most 9 cells held).
`timescale 1ns/1ps
module tb_utopia_phy_tx;
  logic clk = 0, ciclk = 0, reset = 0;
  initial begin #1 reset = 1; #100 reset = 0; end
  always #10 clk = ~clk;
  always #20 ciclk = ~ciclk;

  logic wrreq = 0, cellinc = 0, cellspc;
  logic [15:0] data = 0;
  logic ciclav, cienb_n = 1, cisoc;
  logic [15:0] cidata;

  utopia_phy_tx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog (written %0d received %0d words %0d pause %0d cc %0d wc %0d clav %0d)", cells_written, cells_received, words_received, pause, dut.cell_cnt, dut.word_cnt, ciclav);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NCELLS = 60;
  logic [15:0] sent[$];
  int cells_written = 0, cells_received = 0, words_received = 0;
  int max_held = 0;
  bit pause = 0;
  bit writing = 0;
  int cut_through = 0;

  // writer (forwarder side)
  initial begin
    @(negedge reset);
    repeat (5) @(posedge clk);
    for (int c = 0; c < NCELLS; c++) begin
      @(negedge clk);
      while (!cellspc) @(negedge clk);
      cellinc = 1;
      writing = 1;
      for (int w = 0; w < 26; w++) begin
        @(negedge clk);
        cellinc = 0;
        while ($urandom % 10 == 0) begin wrreq = 0; @(negedge clk); end
        wrreq = 1;
        data  = 16'($urandom);
        sent.push_back(data);
      end
      @(negedge clk); wrreq = 0; writing = 0;
      cells_written++;
      if (cells_written - cells_received > max_held) max_held = cells_written - cells_received;
    end
  end

  // bus device: enables whole cells, samples two edges after each enable
  logic [1:0] enb_hist = 2'b11;
  int enb_left = 0, gap = 0;
  always @(posedge ciclk) begin
    if (!enb_hist[1]) begin
      check(sent.size() > 0, "a word arrives only after it was written");
      if (sent.size() > 0) begin
        check(cidata == sent[0], $sformatf("word %0d in order", words_received));
        check(cisoc == (words_received % 26 == 0), $sformatf("cisoc on word %0d", words_received));
        if (words_received % 26 == 0 && writing && cells_received == cells_written) cut_through++;
        void'(sent.pop_front());
      end
      words_received++;
      if (words_received % 26 == 0) cells_received++;
    end else begin
      check(!cisoc, "no cisoc without a word");
    end
    enb_hist <= {enb_hist[0], cienb_n};
    if (enb_left > 0) begin
      enb_left <= enb_left - 1;
      cienb_n  <= (enb_left == 1);
      if (enb_left == 1) gap <= 3;
    end else if (gap > 0) begin
      gap <= gap - 1;
    end else if (ciclav && !pause) begin
      check(cells_written + (writing ? 1 : 0) > cells_received, "ciclav only with a cell held");
      cienb_n  <= 1'b0;
      enb_left <= 26;
    end
  end

  initial begin
    @(negedge reset);
    // let some cells through, then pause the bus device
    wait (cells_received >= 10);
    pause = 1;
    repeat (1500) @(posedge clk);
    check(max_held >= 7 && max_held <= 9, $sformatf("flow control holds 7..9 cells (%0d)", max_held));
    check(!cellspc, "cellspc low while the FIFO is full");
    pause = 0;
    wait (cells_received == NCELLS);
    repeat (20) @(posedge ciclk);
    check(!ciclav, "ciclav low once all cells left");
    check(words_received == NCELLS * 26, "all words received");
    check(cut_through > 0, $sformatf("cut-through starts seen (%0d)", cut_through));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
