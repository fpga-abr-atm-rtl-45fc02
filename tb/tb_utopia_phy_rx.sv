// tb_utopia_phy_rx: self-checking test of the 16-bit utopia receiver from the
// bus device, with a 50 MHz internal clock and a 33 MHz link clock. A model
// of the bus device sends a whole cell (26 words, cosoc on the first)
// whenever it sees coclav at a cell boundary; a reader plays the demux
// (waits for cellav, reads 26 words, pulses celldec, waits 16 cycles).
// Checked: words in order, store-and-forward (cellav only when a whole cell
// is held), flow control (with the reader paused coclav falls and at most
// 9 cells are held), and one socerr pulse for a cosoc inside a cell.
`timescale 1ns/1ps
module tb_utopia_phy_rx;
  logic clk = 0, coclk = 0, reset = 0;
  initial begin #1 reset = 1; #100 reset = 0; end
  always #10 clk = ~clk;
  always #15 coclk = ~coclk;

  logic rdreq = 0, cellav, celldec = 0, socerr;
  logic [15:0] data;
  logic coclav, coenb_n = 1, cosoc = 0;
  logic [15:0] codata = 0;

  utopia_phy_rx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NCELLS = 60;
  logic [15:0] sent[$];
  int cells_sent = 0, cells_read = 0, words_read = 0, max_held = 0, n_socerr = 0;
  bit pause_rd = 0, bad_soc = 0, sending = 0;

  // bus device: one cell per burst, coenb_n, cosoc and codata together
  initial begin
    @(negedge reset);
    repeat (4) @(posedge coclk);
    while (cells_sent < NCELLS) begin
      @(posedge coclk);
      if (coclav) begin
        sending = 1;
        for (int w = 0; w < 26; w++) begin
          #1 coenb_n = 0; cosoc = (w == 0); codata = 16'($urandom);
          sent.push_back(codata);
          @(posedge coclk);
        end
        #1 coenb_n = 1; cosoc = 0;
        cells_sent++;
        sending = 0;
        if (cells_sent - cells_read > max_held) max_held = cells_sent - cells_read;
        repeat (2) @(posedge coclk);
      end
    end
    wait (bad_soc);
    // a cell cut short by a new start of cell
    @(posedge coclk);
    for (int w = 0; w < 36; w++) begin
      #1 coenb_n = 0; cosoc = (w == 0 || w == 10); codata = 16'hBAD0;
      @(posedge coclk);
    end
    #1 coenb_n = 1; cosoc = 0;
  end

  always @(posedge clk) if (socerr) n_socerr++;

  // reader (demux side)
  initial begin
    @(negedge reset);
    while (cells_read < NCELLS) begin
      @(negedge clk);
      if (cellav && !pause_rd) begin
        check(cells_sent > cells_read, "cellav only for a completely received cell");
        for (int w = 0; w < 26; w++) begin
          check(data == sent[0], $sformatf("word %0d in order", words_read));
          void'(sent.pop_front());
          words_read++;
          rdreq = 1;
          @(negedge clk);
          rdreq = 0;
        end
        celldec = 1;
        @(negedge clk);
        celldec = 0;
        cells_read++;
        repeat (16) @(negedge clk);
      end
    end
  end

  initial begin
    @(negedge reset);
    wait (cells_read >= 5);
    pause_rd = 1;
    repeat (2000) @(posedge clk);
    check(max_held >= 7 && max_held <= 9, $sformatf("flow control holds 7..9 cells (%0d)", max_held));
    check(!coclav, "coclav low while the FIFO is full");
    pause_rd = 0;
    wait (cells_read == NCELLS);
    check(words_read == NCELLS * 26, "all words read");
    check(n_socerr == 0, "no start-of-cell error in normal traffic");
    bad_soc = 1;
    repeat (200) @(posedge clk);
    check(n_socerr == 1, $sformatf("one socerr pulse for a cosoc inside a cell (%0d)", n_socerr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
