// tb_synchro: self-checking test of the two-flop level synchroniser. A
// random level is held for random lengths; after every destination edge the
// output must equal the input as it was two destination edges earlier, and
// reset must clear the output.
`timescale 1ns/1ps
module tb_synchro;
  logic dclk = 0, aclr = 0, din = 0, dout;
  initial #1 aclr = 1;
  always #7 dclk = ~dclk;

  synchro dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (5000) @(posedge dclk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit hist[$];
  initial begin
    repeat (2) @(posedge dclk);
    check(dout == 1'b0, "cleared by reset");
    aclr = 0;
    hist = '{0, 0};
    for (int i = 0; i < 2000; i++) begin
      @(negedge dclk);
      if ($urandom % 4 == 0) din = !din;
      @(posedge dclk);
      hist.push_back(din);
      #1 check(dout == hist[hist.size() - 2], $sformatf("cycle %0d: output is input two edges back", i));
      void'(hist.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
