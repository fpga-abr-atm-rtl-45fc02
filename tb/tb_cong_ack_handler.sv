// tb_cong_ack_handler: self-checking test of the bus-result collector. Random
// (ack, cong) results arrive while a random reader consumes them; the head
// shown to the sender must follow the arrival order with nack = !ack, the
// pending count must match, and a burst past the depth must set the sticky
// overflow flag.
`timescale 1ns/1ps
module tb_cong_ack_handler;
  localparam int D = 8;
  logic clk = 0, aclr = 0;
  initial #1 aclr = 1;
  always #5 clk = ~clk;

  logic res_valid = 0, res_ack = 0, res_cong = 0;
  logic cb_avail, cb_cong, cb_nack, cb_clear = 0, overflow;
  logic [$clog2(D+1)-1:0] pending;

  cong_ack_handler #(.DEPTH(D)) dut (.*);

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

  typedef struct packed { logic cong, nack; } res_t;
  res_t model[$];
  initial begin
    repeat (3) @(posedge clk);
    aclr = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(cb_avail == (model.size() != 0), "avail");
      check(pending == model.size(), "pending count");
      if (model.size() != 0) check({cb_cong, cb_nack} == model[0], $sformatf("head %0d", i));
      check(!overflow, "no overflow in normal use");
      res_valid = ($urandom % 3 == 0) && model.size() < D;
      res_ack   = $urandom % 2;
      res_cong  = $urandom % 2;
      cb_clear  = cb_avail && ($urandom % 3 == 0);
      @(posedge clk);
      if (res_valid) model.push_back({res_cong, !res_ack});
      if (cb_clear) void'(model.pop_front());
    end
    @(negedge clk); res_valid = 0; cb_clear = 0;
    // burst beyond the depth
    for (int i = 0; i < D + 2; i++) begin
      @(negedge clk); res_valid = 1; res_ack = 1; res_cong = 0;
    end
    @(negedge clk); res_valid = 0;
    repeat (2) @(posedge clk);
    check(overflow, "overflow flag after a burst past the depth");
    check(pending == D, "FIFO full after the burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
