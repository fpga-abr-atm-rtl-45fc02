// synchro_pulse: produces one destination-clock pulse for every 0-to-1 change
// of its input (the 'synchro pulse' sub-module of the utopia interfaces).
// The source side turns each rising edge of `din` into a toggle of a source
// register, the toggle is carried over by two destination flip-flops and each
// change of the synchronised toggle gives a one-cycle `dout` pulse three
// destination edges later. Turning edges into toggles is this design's choice:
// it lets a one-cycle pulse of a faster source clock reach a slower
// destination. Rising edges closer together than about three destination
// cycles may merge into one pulse.
module synchro_pulse (
  input  logic sclk,   // source clock
  input  logic dclk,   // destination clock
  input  logic aclr,
  input  logic din,
  output logic dout
);
  logic din_q, tog;
  logic m1, m2, m3;

  always_ff @(posedge sclk or posedge aclr) begin
    if (aclr) begin
      din_q <= 1'b0;
      tog   <= 1'b0;
    end else begin
      din_q <= din;
      if (din && !din_q) tog <= !tog;
    end
  end

  always_ff @(posedge dclk or posedge aclr) begin
    if (aclr) begin
      m1 <= 1'b0;
      m2 <= 1'b0;
      m3 <= 1'b0;
    end else begin
      m1 <= tog;
      m2 <= m1;
      m3 <= m2;
    end
  end

  assign dout = m2 ^ m3;
endmodule
