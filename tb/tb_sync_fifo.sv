// tb_sync_fifo: self-checking test of the single-clock FIFO with a depth
// that is not a power of two (10, the eligible FIFO's). Random writes and
// reads, including writes when full and reads when empty, are compared cycle
// by cycle with a queue model: head data, empty, full, count and the
// overflow pulse.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int W = 12, D = 10;
  logic clk = 0, aclr = 0;
  initial #1 aclr = 1;
  always #5 clk = ~clk;

  logic wrreq = 0, rdreq = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic empty, full, overflow;
  logic [$clog2(D+1)-1:0] count;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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

  logic [W-1:0] model[$];
  bit exp_ovf;
  int n_ovf = 0, n_full = 0;
  initial begin
    repeat (3) @(posedge clk);
    aclr = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // bias phases: fill, drain, mixed
      wrreq = ($urandom % 100) < ((i / 500) % 2 ? 30 : 70);
      rdreq = ($urandom % 100) < ((i / 500) % 2 ? 70 : 30) && !empty;
      wdata = W'($urandom);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(count == model.size(), $sformatf("count %0d vs %0d", count, model.size()));
      if (model.size() > 0) check(rdata == model[0], "head data");
      // a write into a full FIFO is dropped even when a read frees a place
      exp_ovf = wrreq && model.size() == D;
      if (model.size() == D) n_full++;
      @(posedge clk);
      if (wrreq && !exp_ovf) model.push_back(wdata);
      if (rdreq) void'(model.pop_front());
      #1;
      check(overflow == exp_ovf, "overflow pulse");
      if (exp_ovf) n_ovf++;
    end
    check(n_ovf > 0 && n_full > 0, "full and overflow reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
