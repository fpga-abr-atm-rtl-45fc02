// tb_utopia_atm_tx: self-checking test of the 8-bit utopia transmitter
// towards the cell processor (50 MHz internal clock, 40 MHz link clock). A
// writer plays the demux (waits for cellspc, pulses cellinc, writes 52
// bytes); a model of the cell processor raises txclav at random and takes a
// byte at every link edge where txenb_n is low. Checked: bytes in order,
// txsoc exactly on the first byte of each cell, a cell is started only when
// txclav was high, and flow control (with txclav held low the writer is
// stopped by cellspc with at most 4 cells held).
`timescale 1ns/1ps
module tb_utopia_atm_tx;
  logic clk = 0, txclk = 0, reset = 0;
  initial begin #1 reset = 1; #100 reset = 0; end
  always #10 clk = ~clk;
  always #12.5 txclk = ~txclk;

  logic wrreq = 0, cellinc = 0, cellspc;
  logic [7:0] data = 0;
  logic txclav = 0, txenb_n, txsoc;
  logic [7:0] txdata;

  utopia_atm_tx dut (.*);

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
  int cells_written = 0, bytes_rx = 0, max_held = 0;
  bit block = 0;

  initial begin
    @(negedge reset);
    repeat (5) @(posedge clk);
    for (int c = 0; c < NCELLS; c++) begin
      @(negedge clk);
      while (!cellspc) @(negedge clk);
      cellinc = 1;
      for (int w = 0; w < 52; w++) begin
        @(negedge clk);
        cellinc = 0;
        wrreq = 1;
        data  = 8'($urandom);
        sent.push_back(data);
      end
      @(negedge clk); wrreq = 0;
      cells_written++;
      if (cells_written - bytes_rx / 52 > max_held) max_held = cells_written - bytes_rx / 52;
    end
  end

  // cell processor: random room, samples each enabled byte
  logic clav_q = 0;
  always @(posedge txclk) begin
    if (!txenb_n) begin
      if (bytes_rx % 52 == 0) check(clav_q, "a cell starts only after txclav");
      check(sent.size() > 0 && txdata == sent[0], $sformatf("byte %0d in order", bytes_rx));
      check(txsoc == (bytes_rx % 52 == 0), $sformatf("txsoc on byte %0d", bytes_rx));
      void'(sent.pop_front());
      bytes_rx++;
    end else check(!txsoc, "no txsoc without enable");
    clav_q <= txclav;
    txclav <= !block && ($urandom % 4 != 0);
  end

  initial begin
    @(negedge reset);
    wait (bytes_rx >= 52 * 5);
    block = 1;
    repeat (3000) @(posedge clk);
    check(max_held >= 3 && max_held <= 4, $sformatf("flow control holds 3..4 cells (%0d)", max_held));
    check(!cellspc, "cellspc low while the cell processor is blocked");
    block = 0;
    wait (bytes_rx == NCELLS * 52);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
