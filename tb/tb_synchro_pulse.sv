// tb_synchro_pulse: self-checking test of the edge-to-pulse synchroniser,
// with a fast source clock (10 ns) and a slow destination clock (26 ns), and
// then the other way round. Single-cycle source pulses spaced at least four
// destination cycles apart must each give exactly one one-cycle destination
// pulse, within four destination edges; a held-high input gives one pulse.
`timescale 1ns/1ps
module tb_synchro_pulse;
  logic clk_a = 0, clk_b = 0, aclr = 0;
  initial #1 aclr = 1;
  always #5  clk_a = ~clk_a;
  always #13 clk_b = ~clk_b;

  // fast -> slow and slow -> fast instances
  logic din_f = 0, dout_s, din_s = 0, dout_f;
  synchro_pulse dut_fs (.sclk(clk_a), .dclk(clk_b), .aclr(aclr), .din(din_f), .dout(dout_s));
  synchro_pulse dut_sf (.sclk(clk_b), .dclk(clk_a), .aclr(aclr), .din(din_s), .dout(dout_f));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk_a);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_s = 0, n_f = 0, long_s = 0, long_f = 0;
  logic dout_s_q = 0, dout_f_q = 0;
  always @(posedge clk_b) begin
    if (dout_s) n_s++;
    if (dout_s && dout_s_q) long_s++;
    dout_s_q <= dout_s;
  end
  always @(posedge clk_a) begin
    if (dout_f) n_f++;
    if (dout_f && dout_f_q) long_f++;
    dout_f_q <= dout_f;
  end

  initial begin
    int sent;
    repeat (3) @(posedge clk_b);
    aclr = 0;
    // fast source, one-cycle pulses
    sent = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk_a); din_f = 1;
      @(negedge clk_a); din_f = 0;
      sent++;
      repeat (4) @(posedge clk_b);
      #1 check(n_s == sent, $sformatf("fast->slow pulse %0d arrived once (%0d)", i, n_s));
      repeat ($urandom % 3) @(posedge clk_b);
    end
    // held-high input
    @(negedge clk_a); din_f = 1;
    repeat (20) @(posedge clk_b);
    @(negedge clk_a); din_f = 0;
    repeat (4) @(posedge clk_b);
    check(n_s == sent + 1, "a held level gives one pulse");
    check(long_s == 0, "destination pulses last one cycle (fast->slow)");
    // slow source, one-cycle pulses
    sent = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk_b); din_s = 1;
      @(negedge clk_b); din_s = 0;
      sent++;
      repeat (4) @(posedge clk_a);
      #1 check(n_f == sent, $sformatf("slow->fast pulse %0d arrived once (%0d)", i, n_f));
      repeat ($urandom % 3) @(posedge clk_b);
    end
    check(long_f == 0, "destination pulses last one cycle (slow->fast)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
