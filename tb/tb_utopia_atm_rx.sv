// tb_utopia_atm_rx: self-checking test of the 8-bit utopia receiver from the
// cell processor (50 MHz internal clock, 40 MHz link clock). A model of the
// cell processor raises rxclav while it has cells and, after every link edge
// at which it sees rxenb_n low, puts out its next byte (rxsoc on the first of
// a cell); a reader plays the forwarder (waits for cellav, reads 52 bytes,
// pulses celldec, waits 16 cycles). Checked: bytes in order, whole-cell
// enables (52 edges), store-and-forward cellav, flow control with the
// reader paused (at most 4 cells held, enable stops), and one socerr pulse
// for an rxsoc inside a cell.
`timescale 1ns/1ps
module tb_utopia_atm_rx;
  logic clk = 0, rxclk = 0, reset = 0;
  initial begin #1 reset = 1; #100 reset = 0; end
  always #10 clk = ~clk;
  always #12.5 rxclk = ~rxclk;

  logic rdreq = 0, cellav, celldec = 0, socerr;
  logic [7:0] data;
  logic rxclav = 0, rxenb_n, rxsoc = 0;
  logic [7:0] rxdata = 0;

  utopia_atm_rx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NCELLS = 40;
  logic [7:0] sent[$];
  int bytes_out = 0, cells_read = 0, bytes_read = 0, max_held = 0, n_socerr = 0, run = 0;
  bit pause_rd = 0, bad_soc = 0;

  // cell processor: a byte after every edge with the enable seen low
  always @(posedge rxclk) begin
    if (!rxenb_n) begin
      check(bytes_out < NCELLS * 52 || bad_soc, "no enable beyond the offered cells");
      rxdata <= bad_soc ? 8'hEE : 8'($urandom);
      rxsoc  <= bad_soc ? (run == 0 || run == 20) : (bytes_out % 52 == 0);
      run    <= run + 1;
      if (!bad_soc) bytes_out <= bytes_out + 1;
    end else begin
      if (run != 0 && !bad_soc) check(run == 52, $sformatf("enable lasts one cell (%0d)", run));
      run    <= 0;
      rxsoc  <= 1'b0;
    end
    rxclav <= bad_soc ? (run == 0) : (bytes_out + (!rxenb_n ? 1 : 0)) < NCELLS * 52;
  end
  // the byte put out after an enable edge is the one stored at the next edge
  always @(posedge rxclk) if (dut.wrreq && !bad_soc) sent.push_back(rxdata);
  always @(posedge clk) if (socerr) n_socerr++;

  initial begin
    @(negedge reset);
    while (cells_read < NCELLS) begin
      @(negedge clk);
      if (cellav && !pause_rd) begin
        check(sent.size() >= 52, "cellav only for a complete cell");
        for (int w = 0; w < 52; w++) begin
          check(data == sent[0], $sformatf("byte %0d in order", bytes_read));
          void'(sent.pop_front());
          bytes_read++;
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
      if (bytes_out / 52 - cells_read > max_held) max_held = bytes_out / 52 - cells_read;
    end
  end

  initial begin
    @(negedge reset);
    wait (cells_read >= 3);
    pause_rd = 1;
    repeat (3000) @(posedge clk);
    check(max_held == 4, $sformatf("flow control holds 4 cells (%0d)", max_held));
    check(rxenb_n, "no enable while the FIFO is full");
    pause_rd = 0;
    wait (cells_read == NCELLS);
    check(n_socerr == 0, "no start-of-cell error in normal traffic");
    bad_soc = 1;
    repeat (300) @(posedge clk);
    check(n_socerr == 1, $sformatf("one socerr pulse for an rxsoc inside a cell (%0d)", n_socerr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
